// tb_motim_table1: the switch's functional-validation workload.
//
// Twelve flows between local ports run at the same time, each at the full
// 100 Mb/s with the minimum inter-packet gap (0.96 us = 12 byte times), with
// the packet counts and sizes of the evaluation (2250 packets, 1.43 MB):
//   0->29 200x500, 3->17 100x100, 4->11 50x1500, 11->4 200x500,
//   16->5 100x1500, 17->16 50x1500, 21->31 200x1500, 22->1 150x500,
//   27->28 300x100, 29->30 300x1500, 30->9 500x70, 31->8 400x80.
// Several of these ports sit on diagonal routers, so every port is made a
// data port here (DATA_MASK all ones). First every port sends one broadcast
// frame so that all address tables know all ports. Then the flows run. Every
// packet must arrive intact at its target and none may be dropped. The
// smallest latency of each flow (first byte in to first byte out) must lie
// within 15% of the estimate published for the flow (its third column, in
// 50 MHz cycles); minimum, average and maximum are printed next to it.
module tb_motim_table1;
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

  motim_top #(.DATA_MASK('1)) dut (.*);

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

  int n_drop = 0, n_nack = 0;
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < NLP; p++) begin
      n_drop += int'(ev_dropped[p]);
      n_nack += int'(ev_nack[p]);
    end

  // traffic of the evaluation
  int f_src [12] = '{0, 3, 4, 11, 16, 17, 21, 22, 27, 29, 30, 31};
  int f_dst [12] = '{29, 17, 11, 4, 5, 16, 31, 1, 28, 30, 9, 8};
  int f_num [12] = '{200, 100, 50, 200, 100, 50, 200, 150, 300, 300, 500, 400};
  int f_len [12] = '{500, 100, 1500, 500, 1500, 1500, 1500, 500, 100, 1500, 70, 80};
  int f_est [12] = '{2368, 614, 6256, 2320, 6288, 6224, 6256, 2368, 598, 6240, 510, 550};

  // per-port activity, for waiting until the switch is quiet
  function automatic bit any_busy();
    bit b = 0;
    for (int p = 0; p < NLP; p++)
      if (mac_rx_valid[p] || mac_tx_valid[p] || dut.u_noc.lp_in[p].valid || dut.u_noc.lp_out[p].valid) b = 1;
    return b;
  endfunction

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
      if (any_busy()) q = 0;
      for (int p = 0; p < NLP; p++) if (tx_busy[p]) q = 0;
    end
  endtask

  initial begin
    for (int p = 0; p < NLP; p++) begin
      pkt_priority[p] = '0; sp_in[p] = '0; sp_release[p] = '0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1;

    // every port announces itself
    for (int p = 0; p < NLP; p++) begin
      case (p)
        0: g_mac[0].u_mac.add_job(255, 0, 64, 0);   1: g_mac[1].u_mac.add_job(255, 0, 64, 0);
        2: g_mac[2].u_mac.add_job(255, 0, 64, 0);   3: g_mac[3].u_mac.add_job(255, 0, 64, 0);
        4: g_mac[4].u_mac.add_job(255, 0, 64, 0);   5: g_mac[5].u_mac.add_job(255, 0, 64, 0);
        6: g_mac[6].u_mac.add_job(255, 0, 64, 0);   7: g_mac[7].u_mac.add_job(255, 0, 64, 0);
        8: g_mac[8].u_mac.add_job(255, 0, 64, 0);   9: g_mac[9].u_mac.add_job(255, 0, 64, 0);
        10: g_mac[10].u_mac.add_job(255, 0, 64, 0); 11: g_mac[11].u_mac.add_job(255, 0, 64, 0);
        12: g_mac[12].u_mac.add_job(255, 0, 64, 0); 13: g_mac[13].u_mac.add_job(255, 0, 64, 0);
        14: g_mac[14].u_mac.add_job(255, 0, 64, 0); 15: g_mac[15].u_mac.add_job(255, 0, 64, 0);
        16: g_mac[16].u_mac.add_job(255, 0, 64, 0); 17: g_mac[17].u_mac.add_job(255, 0, 64, 0);
        18: g_mac[18].u_mac.add_job(255, 0, 64, 0); 19: g_mac[19].u_mac.add_job(255, 0, 64, 0);
        20: g_mac[20].u_mac.add_job(255, 0, 64, 0); 21: g_mac[21].u_mac.add_job(255, 0, 64, 0);
        22: g_mac[22].u_mac.add_job(255, 0, 64, 0); 23: g_mac[23].u_mac.add_job(255, 0, 64, 0);
        24: g_mac[24].u_mac.add_job(255, 0, 64, 0); 25: g_mac[25].u_mac.add_job(255, 0, 64, 0);
        26: g_mac[26].u_mac.add_job(255, 0, 64, 0); 27: g_mac[27].u_mac.add_job(255, 0, 64, 0);
        28: g_mac[28].u_mac.add_job(255, 0, 64, 0); 29: g_mac[29].u_mac.add_job(255, 0, 64, 0);
        30: g_mac[30].u_mac.add_job(255, 0, 64, 0); 31: g_mac[31].u_mac.add_job(255, 0, 64, 0);
        default: ;
      endcase
      wait_quiet(300, 100000);
    end
    wait_quiet(3000, 200000);
    check(n_drop == 0, "announcement frames dropped");
    for (int p = 0; p < NLP; p++) begin
      case (p)
        0: g_mac[0].u_mac.clear_stats();   1: g_mac[1].u_mac.clear_stats();   2: g_mac[2].u_mac.clear_stats();
        3: g_mac[3].u_mac.clear_stats();   4: g_mac[4].u_mac.clear_stats();   5: g_mac[5].u_mac.clear_stats();
        6: g_mac[6].u_mac.clear_stats();   7: g_mac[7].u_mac.clear_stats();   8: g_mac[8].u_mac.clear_stats();
        9: g_mac[9].u_mac.clear_stats();   10: g_mac[10].u_mac.clear_stats(); 11: g_mac[11].u_mac.clear_stats();
        12: g_mac[12].u_mac.clear_stats(); 13: g_mac[13].u_mac.clear_stats(); 14: g_mac[14].u_mac.clear_stats();
        15: g_mac[15].u_mac.clear_stats(); 16: g_mac[16].u_mac.clear_stats(); 17: g_mac[17].u_mac.clear_stats();
        18: g_mac[18].u_mac.clear_stats(); 19: g_mac[19].u_mac.clear_stats(); 20: g_mac[20].u_mac.clear_stats();
        21: g_mac[21].u_mac.clear_stats(); 22: g_mac[22].u_mac.clear_stats(); 23: g_mac[23].u_mac.clear_stats();
        24: g_mac[24].u_mac.clear_stats(); 25: g_mac[25].u_mac.clear_stats(); 26: g_mac[26].u_mac.clear_stats();
        27: g_mac[27].u_mac.clear_stats(); 28: g_mac[28].u_mac.clear_stats(); 29: g_mac[29].u_mac.clear_stats();
        30: g_mac[30].u_mac.clear_stats(); 31: g_mac[31].u_mac.clear_stats();
        default: ;
      endcase
    end
    $display("announcements done at cycle %0d", cyc);

    // the twelve flows
    for (int f = 0; f < 12; f++)
      for (int i = 0; i < f_num[f]; i++)
        case (f_src[f])
          0:  g_mac[0].u_mac.add_job(f_dst[f], i % 256, f_len[f], 12);
          3:  g_mac[3].u_mac.add_job(f_dst[f], i % 256, f_len[f], 12);
          4:  g_mac[4].u_mac.add_job(f_dst[f], i % 256, f_len[f], 12);
          11: g_mac[11].u_mac.add_job(f_dst[f], i % 256, f_len[f], 12);
          16: g_mac[16].u_mac.add_job(f_dst[f], i % 256, f_len[f], 12);
          17: g_mac[17].u_mac.add_job(f_dst[f], i % 256, f_len[f], 12);
          21: g_mac[21].u_mac.add_job(f_dst[f], i % 256, f_len[f], 12);
          22: g_mac[22].u_mac.add_job(f_dst[f], i % 256, f_len[f], 12);
          27: g_mac[27].u_mac.add_job(f_dst[f], i % 256, f_len[f], 12);
          29: g_mac[29].u_mac.add_job(f_dst[f], i % 256, f_len[f], 12);
          30: g_mac[30].u_mac.add_job(f_dst[f], i % 256, f_len[f], 12);
          31: g_mac[31].u_mac.add_job(f_dst[f], i % 256, f_len[f], 12);
          default: ;
        endcase
    wait_quiet(3000, 4000000);
    $display("flows done at cycle %0d; %0d refused requests, %0d dropped packets", cyc, n_nack, n_drop);
    check(n_drop == 0, "packets dropped");
    $display("flow     hops  estimate   min    avg    max   packets");
    for (int f = 0; f < 12; f++) begin
      int n; longint mn, mx, sm;
      int bad;
      case (f_dst[f])
        29: begin n = g_mac[29].u_mac.n_from[f_src[f]]; mn = g_mac[29].u_mac.lat_min[f_src[f]]; mx = g_mac[29].u_mac.lat_max[f_src[f]]; sm = g_mac[29].u_mac.lat_sum[f_src[f]]; bad = g_mac[29].u_mac.n_bad; end
        17: begin n = g_mac[17].u_mac.n_from[f_src[f]]; mn = g_mac[17].u_mac.lat_min[f_src[f]]; mx = g_mac[17].u_mac.lat_max[f_src[f]]; sm = g_mac[17].u_mac.lat_sum[f_src[f]]; bad = g_mac[17].u_mac.n_bad; end
        11: begin n = g_mac[11].u_mac.n_from[f_src[f]]; mn = g_mac[11].u_mac.lat_min[f_src[f]]; mx = g_mac[11].u_mac.lat_max[f_src[f]]; sm = g_mac[11].u_mac.lat_sum[f_src[f]]; bad = g_mac[11].u_mac.n_bad; end
        4:  begin n = g_mac[4].u_mac.n_from[f_src[f]];  mn = g_mac[4].u_mac.lat_min[f_src[f]];  mx = g_mac[4].u_mac.lat_max[f_src[f]];  sm = g_mac[4].u_mac.lat_sum[f_src[f]];  bad = g_mac[4].u_mac.n_bad; end
        5:  begin n = g_mac[5].u_mac.n_from[f_src[f]];  mn = g_mac[5].u_mac.lat_min[f_src[f]];  mx = g_mac[5].u_mac.lat_max[f_src[f]];  sm = g_mac[5].u_mac.lat_sum[f_src[f]];  bad = g_mac[5].u_mac.n_bad; end
        16: begin n = g_mac[16].u_mac.n_from[f_src[f]]; mn = g_mac[16].u_mac.lat_min[f_src[f]]; mx = g_mac[16].u_mac.lat_max[f_src[f]]; sm = g_mac[16].u_mac.lat_sum[f_src[f]]; bad = g_mac[16].u_mac.n_bad; end
        31: begin n = g_mac[31].u_mac.n_from[f_src[f]]; mn = g_mac[31].u_mac.lat_min[f_src[f]]; mx = g_mac[31].u_mac.lat_max[f_src[f]]; sm = g_mac[31].u_mac.lat_sum[f_src[f]]; bad = g_mac[31].u_mac.n_bad; end
        1:  begin n = g_mac[1].u_mac.n_from[f_src[f]];  mn = g_mac[1].u_mac.lat_min[f_src[f]];  mx = g_mac[1].u_mac.lat_max[f_src[f]];  sm = g_mac[1].u_mac.lat_sum[f_src[f]];  bad = g_mac[1].u_mac.n_bad; end
        28: begin n = g_mac[28].u_mac.n_from[f_src[f]]; mn = g_mac[28].u_mac.lat_min[f_src[f]]; mx = g_mac[28].u_mac.lat_max[f_src[f]]; sm = g_mac[28].u_mac.lat_sum[f_src[f]]; bad = g_mac[28].u_mac.n_bad; end
        30: begin n = g_mac[30].u_mac.n_from[f_src[f]]; mn = g_mac[30].u_mac.lat_min[f_src[f]]; mx = g_mac[30].u_mac.lat_max[f_src[f]]; sm = g_mac[30].u_mac.lat_sum[f_src[f]]; bad = g_mac[30].u_mac.n_bad; end
        9:  begin n = g_mac[9].u_mac.n_from[f_src[f]];  mn = g_mac[9].u_mac.lat_min[f_src[f]];  mx = g_mac[9].u_mac.lat_max[f_src[f]];  sm = g_mac[9].u_mac.lat_sum[f_src[f]];  bad = g_mac[9].u_mac.n_bad; end
        8:  begin n = g_mac[8].u_mac.n_from[f_src[f]];  mn = g_mac[8].u_mac.lat_min[f_src[f]];  mx = g_mac[8].u_mac.lat_max[f_src[f]];  sm = g_mac[8].u_mac.lat_sum[f_src[f]];  bad = g_mac[8].u_mac.n_bad; end
        default: begin n = 0; mn = 0; mx = 0; sm = 0; bad = 0; end
      endcase
      $display("%2d->%2d   %5d  %6d  %5d  %5d  %5d   %0d/%0d", f_src[f], f_dst[f],
               1 + (((f_src[f] / 2) % 4 > (f_dst[f] / 2) % 4) ? (f_src[f] / 2) % 4 - (f_dst[f] / 2) % 4 : (f_dst[f] / 2) % 4 - (f_src[f] / 2) % 4)
                 + (((f_src[f] / 8) > (f_dst[f] / 8)) ? (f_src[f] / 8) - (f_dst[f] / 8) : (f_dst[f] / 8) - (f_src[f] / 8)),
               f_est[f], mn, (n > 0) ? sm / n : 0, mx, n, f_num[f]);
      check(n == f_num[f], $sformatf("flow %0d->%0d: %0d of %0d packets delivered", f_src[f], f_dst[f], n, f_num[f]));
      check(bad == 0, $sformatf("flow %0d->%0d: corrupted packets", f_src[f], f_dst[f]));
      check(mn * 100 >= f_est[f] * 85 && mn * 100 <= f_est[f] * 115,
            $sformatf("flow %0d->%0d: minimum latency %0d not within 15%% of %0d", f_src[f], f_dst[f], mn, f_est[f]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
