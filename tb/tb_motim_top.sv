// tb_motim_top: end-to-end test of the full MOTIM switch at its default size
// (4x4 mesh, 24 data ports, n = 2 lanes, m = 4 sessions, p = 256 entries).
//
// Each data port has a MAC model: it sends frames one byte every 4 cycles
// (100 Mb/s against a 50 MHz core, ratio 4) and accepts one byte every 4
// cycles on transmit. Frames carry their source port, a sequence number and
// their length in bytes 12-15 and a pattern computed from these, so every
// received frame is checked byte for byte without a reference model.
//
// Phases:
//  1. port 2 sends to an address nobody has learned: flooded to all 23 other
//     data ports (broadcast by the NI);
//  2. port 4 sends an Ethernet broadcast frame: flooded, and every port
//     learns port 4's address;
//  3. port 2 sends to port 4: a table hit, delivered to port 4 only; its
//     latency is checked;
//  4. five ports send three 1500-byte frames each to port 4 at full rate:
//     more sources than sessions, shared links and more offered load than
//     one output can drain, so requests are refused and retried, several
//     sessions and both lanes of a link are in use at once, and cell buffers
//     overflow. Every frame sent must be delivered intact once, or counted as
//     dropped by its source.
// Each mechanism is counted and must occur at least once.
module tb_motim_top;
  import motim_pkg::*;

  localparam int NLP = 32;
  localparam int BR  = 4;
  localparam int BCAST_DST = 255;
  localparam logic [NLP-1:0] DMASK = NLP'(data_port_mask(4, 4));

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]        pkt_priority [NLP];
  logic              mac_rx_valid [NLP];
  logic [7:0]        mac_rx_data  [NLP];
  logic              mac_rx_eop   [NLP];
  logic              mac_tx_valid [NLP];
  logic [7:0]        mac_tx_data  [NLP];
  logic              mac_tx_eop   [NLP];
  logic              mac_tx_ready [NLP];
  flit_t             sp_in        [NLP];
  logic              sp_credit    [NLP];
  resp_t             sp_resp      [NLP];
  flit_t             sp_out       [NLP];
  logic [1:0]        sp_session   [NLP];
  logic [3:0]        sp_release   [NLP];
  logic              ev_nack      [NLP];
  logic              ev_bcast     [NLP];
  logic              ev_hit       [NLP];
  logic              ev_overflow  [NLP];
  logic              ev_dropped   [NLP];
  logic              ev_discarded [NLP];

  motim_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // ---------------- frame contents ----------------
  function automatic logic [7:0] fbyte(int src, int dst, int idx, int len, int k);
    if (k < 6)   return (dst == BCAST_DST) ? 8'hFF : ((k == 5) ? 8'(dst) : (k == 0 ? 8'h02 : 8'h00));
    if (k < 12)  return (k == 11) ? 8'(src) : (k == 6 ? 8'h02 : 8'h00);
    if (k == 12) return 8'(src);
    if (k == 13) return 8'(idx);
    if (k == 14) return 8'(len >> 8);
    if (k == 15) return 8'(len);
    return 8'(src * 31 + idx * 17 + k);
  endfunction

  // ---------------- MAC transmit models (frames into the switch) ----------------
  localparam int MAXJ = 8;
  int jdst [NLP][MAXJ];
  int jlen [NLP][MAXJ];
  int jidx [NLP][MAXJ];
  int njobs [NLP];
  int jptr  [NLP];
  bit act   [NLP];
  int kpos  [NLP];
  int gap   [NLP];
  int ipg = 24;                         // 0.96 us gap at 25 ns per byte
  longint t_start [NLP][MAXJ];
  int sent_frames [NLP];

  always @(posedge clk) begin
    for (int p = 0; p < NLP; p++) begin
      mac_rx_valid[p] <= 1'b0;
      mac_rx_eop[p]   <= 1'b0;
      if (rst_n && cyc % BR == 0) begin
        if (act[p]) begin
          int j;
          j = jptr[p];
          if (kpos[p] == 0) t_start[p][jidx[p][j]] = cyc;
          mac_rx_valid[p] <= 1'b1;
          mac_rx_data[p]  <= fbyte(p, jdst[p][j], jidx[p][j], jlen[p][j], kpos[p]);
          mac_rx_eop[p]   <= (kpos[p] == jlen[p][j] - 1);
          if (kpos[p] == jlen[p][j] - 1) begin
            act[p]  <= 1'b0;
            jptr[p] <= j + 1;
            gap[p]  <= ipg;
            sent_frames[p]++;
          end
          kpos[p] <= kpos[p] + 1;
        end else if (gap[p] > 0) begin
          gap[p] <= gap[p] - 1;
        end else if (jptr[p] < njobs[p]) begin
          act[p]  <= 1'b1;
          kpos[p] <= 0;
        end
      end
    end
  end

  task automatic add_job(int p, int dst, int idx, int len);
    jdst[p][njobs[p]] = dst;
    jidx[p][njobs[p]] = idx;
    jlen[p][njobs[p]] = len;
    njobs[p]++;
  endtask

  // ---------------- MAC receive models (frames out of the switch) ----------------
  logic [7:0] rbuf [NLP][2048];
  int rlen [NLP];
  logic [NLP-1:0] rx_at [NLP][MAXJ];    // which ports received frame (src, idx)
  int rx_cnt [NLP][MAXJ];
  longint t_end [NLP][MAXJ];
  int bad_frames = 0;

  always_comb for (int p = 0; p < NLP; p++) mac_tx_ready[p] = (cyc % BR == 2);

  always @(posedge clk) begin
    for (int p = 0; p < NLP; p++) begin
      if (mac_tx_valid[p] && mac_tx_ready[p]) begin
        rbuf[p][rlen[p]] = mac_tx_data[p];
        rlen[p]++;
        if (mac_tx_eop[p]) begin
          int src, idx, len;
          bit ok;
          src = int'(rbuf[p][12]);
          idx = int'(rbuf[p][13]);
          len = {rbuf[p][14], rbuf[p][15]};
          ok  = (len == rlen[p]) && src < NLP && idx < MAXJ;
          if (ok) begin
            int dst;
            dst = (rbuf[p][0] == 8'hFF) ? BCAST_DST : int'(rbuf[p][5]);
            for (int k = 0; k < len; k++)
              if (rbuf[p][k] !== fbyte(src, dst, idx, len, k)) ok = 0;
          end
          check(ok, $sformatf("frame at port %0d corrupted (len %0d)", p, rlen[p]));
          if (ok) begin
            rx_at[src][idx][p] = 1'b1;
            rx_cnt[src][idx]++;
            t_end[src][idx] = cyc;
          end else bad_frames++;
          rlen[p] = 0;
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_nack = 0, n_bcast = 0, n_hit = 0, n_ovf = 0, n_drop = 0, n_disc = 0;
  int n_multi_sess = 0, n_both_lanes = 0;
  int drop_of [NLP];
  logic [15:0] both_busy;

  for (genvar r = 0; r < 16; r++) begin : g_probe
    // both lanes of the same output direction reserved at once
    assign both_busy[r] =
      (dut.u_noc.g_r[r].u_router.obusy[3:2] == 2'b11) ||
      (dut.u_noc.g_r[r].u_router.obusy[5:4] == 2'b11) ||
      (dut.u_noc.g_r[r].u_router.obusy[7:6] == 2'b11) ||
      (dut.u_noc.g_r[r].u_router.obusy[9:8] == 2'b11);
  end

  int n_sp_rx = 0;
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NLP; p++) begin
      if (!DMASK[p] && sp_out[p].valid) n_sp_rx++;
      n_nack  += int'(ev_nack[p]);
      n_bcast += int'(ev_bcast[p]);
      n_hit   += int'(ev_hit[p]);
      n_ovf   += int'(ev_overflow[p]);
      n_drop  += int'(ev_dropped[p]);
      n_disc  += int'(ev_discarded[p]);
      drop_of[p] += int'(ev_dropped[p]);
    end
    if ($countones(dut.u_noc.g_r[2].u_router.s_busy[0]) >= 2) n_multi_sess++;
    if (both_busy != '0) n_both_lanes++;
  end

  task automatic wait_idle(int max_cycles);
    // wait until no MAC has frames left to send and the switch is quiet
    int quiet;
    quiet = 0;
    for (int c = 0; c < max_cycles && quiet < 3000; c++) begin
      @(posedge clk);
      quiet++;
      for (int p = 0; p < NLP; p++)
        if (act[p] || jptr[p] < njobs[p] || mac_tx_valid[p] || dut.u_noc.lp_in[p].valid ||
            dut.u_noc.lp_out[p].valid)
          quiet = 0;
    end
  endtask

  int others;
  int phase4_sent, phase4_rx, phase4_drop;
  longint lat;

  initial begin
    for (int p = 0; p < NLP; p++) begin
      pkt_priority[p] = 8'(p);
      sp_in[p] = '0;
      sp_release[p] = '0;
      mac_rx_data[p] = '0;
      njobs[p] = 0; jptr[p] = 0; act[p] = 0; kpos[p] = 0; gap[p] = 0;
      rlen[p] = 0; sent_frames[p] = 0; drop_of[p] = 0;
      for (int j = 0; j < MAXJ; j++) begin
        rx_at[p][j] = '0; rx_cnt[p][j] = 0;
      end
    end
    others = $countones(DMASK) - 1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // phase 1: unknown destination -> flooded
    add_job(2, 9, 0, 100);
    wait_idle(200000);
    check(rx_cnt[2][0] == others, $sformatf("phase 1: flood reached %0d ports, expected %0d", rx_cnt[2][0], others));
    check(rx_at[2][0] == (DMASK & ~(NLP'(1) << 2)), "phase 1: flood reached the wrong ports");

    // phase 2: Ethernet broadcast from port 4
    add_job(4, BCAST_DST, 0, 64);
    wait_idle(200000);
    check(rx_cnt[4][0] == others, $sformatf("phase 2: broadcast reached %0d ports", rx_cnt[4][0]));

    // phase 3: learned destination -> unicast
    add_job(2, 4, 1, 200);
    wait_idle(200000);
    check(rx_cnt[2][1] == 1 && rx_at[2][1] == (NLP'(1) << 4), "phase 3: unicast not delivered to port 4 only");
    lat = t_end[2][1] - t_start[2][1];
    $display("phase 3: 200-byte frame, 2 hops, latency %0d cycles", lat);
    // in 200*4 cycles, two cells of 128 bytes, out 200*4 cycles: about 1900
    check(lat > 2 * 200 * BR && lat < 2 * 200 * BR + 600, $sformatf("phase 3: latency %0d out of range", lat));

    // phase 4a: four sources to one port, 1500-byte frames 400 us apart:
    // the load fits the output port and sessions, nothing may be lost
    ipg = 5000;                                  // 400 us in byte times
    for (int j = 2; j < 4; j++) begin
      add_job(6, 4, j, 1500); add_job(8, 4, j, 1500);
      add_job(12, 4, j, 1500); add_job(14, 4, j, 1500);
    end
    wait_idle(400000);
    phase4_rx = 0;
    for (int j = 2; j < 4; j++) begin
      phase4_rx += rx_cnt[6][j] + rx_cnt[8][j] + rx_cnt[12][j] + rx_cnt[14][j];
      check(rx_at[6][j] == (NLP'(1) << 4) && rx_at[8][j] == (NLP'(1) << 4) &&
            rx_at[12][j] == (NLP'(1) << 4) && rx_at[14][j] == (NLP'(1) << 4),
            "phase 4a: frame missing or at the wrong port");
    end
    $display("phase 4a: 8 frames sent, %0d delivered, %0d dropped (cycle %0d)", phase4_rx, n_drop, cyc);
    check(phase4_rx == 8 && n_drop == 0, "phase 4a: frames lost at an admissible load");

    // phase 4b: five sources at full rate into one port: overload
    ipg = 24;
    for (int j = 4; j < 7; j++) begin
      add_job(6, 4, j, 1500); add_job(8, 4, j, 1500); add_job(12, 4, j, 1500);
      add_job(14, 4, j, 1500); add_job(16, 4, j, 1500);
    end
    wait_idle(1500000);
    phase4_sent = 15; phase4_rx = 0; phase4_drop = 0;
    for (int p = 0; p < NLP; p++) if (p == 6 || p == 8 || p == 12 || p == 14 || p == 16) begin
      phase4_drop += drop_of[p];
      for (int j = 4; j < 7; j++) begin
        check(rx_cnt[p][j] <= 1, "phase 4b: frame delivered twice");
        check(rx_cnt[p][j] == 0 || rx_at[p][j] == (NLP'(1) << 4), "phase 4b: frame delivered to the wrong port");
        phase4_rx += rx_cnt[p][j];
      end
    end
    $display("phase 4b: %0d frames sent, %0d delivered, %0d dropped at the sources (cycle %0d)", phase4_sent, phase4_rx, phase4_drop, cyc);
    check(phase4_rx + phase4_drop == phase4_sent, "phase 4b: frames lost without being counted as dropped");
    check(phase4_rx > 0, "phase 4b: nothing delivered");
    check(bad_frames == 0, "corrupted frames seen");
    check(n_sp_rx == 0, "traffic reached a special (non-data) port");

    $display("mechanisms: broadcast=%0d hit=%0d nack/retry=%0d overflow=%0d dropped=%0d discarded-at-dest=%0d multi-session-cycles=%0d both-lanes-cycles=%0d",
             n_bcast, n_hit, n_nack, n_ovf, n_drop, n_disc, n_multi_sess, n_both_lanes);
    check(n_bcast > 0, "no broadcast happened");
    check(n_hit > 0, "no address table hit happened");
    check(n_nack > 0, "no nack/retry happened");
    check(n_ovf > 0, "no cell buffer overflow happened");
    check(n_disc > 0, "no errored packet was discarded at a destination");
    check(n_multi_sess > 0, "never two sessions open at one port");
    check(n_both_lanes > 0, "never both SDM lanes of a link in use");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
