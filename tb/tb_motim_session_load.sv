// tb_motim_session_load: the session-control workload of the switch.
//
// Four ports (4, 14, 16 and 22) each send 50 frames of 1500 bytes to port 27,
// bytes at the full 100 Mb/s and a long gap between frames, twice:
//  * gap 400 us (5000 byte times): 4 x 23.1 Mb/s, less than the 100 Mb/s
//    port 27 can send on, so no frame may be lost;
//  * gap 300 us (3750 byte times): 4 x 28.6 Mb/s, more than port 27 can
//    send on, so the backlog grows until cell buffers overflow and frames
//    are dropped; every frame must then be either delivered intact or
//    counted as dropped by its source.
// Port 27 first sends one broadcast frame so that all ports know it. The
// four senders share port 27's four sessions, so their packets are taken in
// in parallel. Latency (first byte in to first byte out) per source is
// printed.
module tb_motim_session_load;
  import motim_pkg::*;
  localparam int NLP = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

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

  for (genvar p = 0; p < NLP; p++) begin : g_mac
    tb_eth_port #(.MY_PORT(p)) u_mac (
      .clk, .rst_n, .cyc,
      .rx_valid (mac_rx_valid[p]), .rx_data (mac_rx_data[p]), .rx_eop (mac_rx_eop[p]),
      .tx_valid (mac_tx_valid[p]), .tx_data (mac_tx_data[p]), .tx_eop (mac_tx_eop[p]),
      .tx_ready (mac_tx_ready[p])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int drop_of [NLP];
  int n_max_sess = 0;
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NLP; p++) drop_of[p] += int'(ev_dropped[p]);
    // port 27 = router 13, local port 1
    if ($countones(dut.u_noc.g_r[13].u_router.s_busy[1]) > n_max_sess)
      n_max_sess = $countones(dut.u_noc.g_r[13].u_router.s_busy[1]);
  end

  bit tx_busy [NLP];
  for (genvar p = 0; p < NLP; p++) begin : g_busy
    always @(posedge clk) tx_busy[p] = g_mac[p].u_mac.busy();
  end

  task automatic wait_quiet(int quiet_cycles, longint limit);
    int q = 0;
    longint c = 0;
    while (q < quiet_cycles && c < limit) begin
      @(posedge clk);
      c++; q++;
      for (int p = 0; p < NLP; p++)
        if (tx_busy[p] || mac_tx_valid[p] || dut.u_noc.lp_in[p].valid) q = 0;
    end
  endtask

  int src_l [4] = '{4, 14, 16, 22};

  task automatic run(int gap, bit expect_loss, string name);
    int total, dropped;
    g_mac[27].u_mac.clear_stats();
    for (int p = 0; p < NLP; p++) drop_of[p] = 0;
    for (int i = 0; i < 50; i++) begin
      g_mac[4].u_mac.add_job(27, i, 1500, gap);
      g_mac[14].u_mac.add_job(27, i, 1500, gap);
      g_mac[16].u_mac.add_job(27, i, 1500, gap);
      g_mac[22].u_mac.add_job(27, i, 1500, gap);
    end
    wait_quiet(20000, 6000000);
    total = 0; dropped = 0;
    $display("%s: source  delivered dropped  min    avg    max   (cycle %0d)", name, cyc);
    for (int s = 0; s < 4; s++) begin
      int n;
      n = g_mac[27].u_mac.n_from[src_l[s]];
      $display("   %2d -> 27   %3d     %3d   %6d %6d %6d", src_l[s], n, drop_of[src_l[s]],
               g_mac[27].u_mac.lat_min[src_l[s]], (n > 0) ? g_mac[27].u_mac.lat_sum[src_l[s]] / n : 0,
               g_mac[27].u_mac.lat_max[src_l[s]]);
      total += n;
      dropped += drop_of[src_l[s]];
      check(n + drop_of[src_l[s]] == 50, $sformatf("%s: source %0d frames unaccounted for", name, src_l[s]));
    end
    check(g_mac[27].u_mac.n_bad == 0, $sformatf("%s: corrupted frames", name));
    if (expect_loss) check(dropped > 0, $sformatf("%s: overload produced no loss", name));
    else             check(dropped == 0 && total == 200, $sformatf("%s: frames lost", name));
  endtask

  initial begin
    for (int p = 0; p < NLP; p++) begin
      pkt_priority[p] = '0; sp_in[p] = '0; sp_release[p] = '0; drop_of[p] = 0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    g_mac[27].u_mac.add_job(255, 0, 64, 0);
    wait_quiet(3000, 200000);

    run(5000, 0, "gap 400 us");
    check(n_max_sess == 4, $sformatf("at most %0d sessions open at port 27", n_max_sess));
    run(3750, 1, "gap 300 us");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
