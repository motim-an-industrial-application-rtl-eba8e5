// tb_motim_proto3x3: the reduced hardware-prototype configuration.
//
// The switch is built on a 3x3 mesh (18 local ports, every one a data port)
// and five ports exchange traffic without competing for links:
//   2->16, 16->2, 3->4, 4->11, 11->3, each 200 frames of 500 bytes at the
//   full 100 Mb/s with the minimum gap of 12 byte times.
// The five ports first send one broadcast frame each so that all address
// tables know them. Every frame must then arrive intact, none may be
// dropped, and the average latency of each flow (first byte in to first
// byte out, 50 MHz cycles) must be within 15% of the published estimate for
// that flow (2336, 2336, 2304, 2304, 2320).
module tb_motim_proto3x3;
  import motim_pkg::*;
  localparam int NLP = 18;

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

  motim_top #(.MESH_X(3), .MESH_Y(3), .DATA_MASK('1)) dut (.*);

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

  int n_drop = 0;
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < NLP; p++) n_drop += int'(ev_dropped[p]);

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

  // per-flow results, collected from the target ports
  task automatic report(int src, int dst, int est, int n, longint mn, longint mx, longint sm, int bad);
    longint avg;
    avg = (n > 0) ? sm / n : 0;
    $display("  %2d -> %2d   %5d  %6d %6d %6d   %0d/200", src, dst, est, mn, avg, mx, n);
    check(n == 200, $sformatf("flow %0d->%0d delivered %0d of 200", src, dst, n));
    check(bad == 0, $sformatf("corrupted frames at port %0d", dst));
    check(avg * 100 >= longint'(est) * 85 && avg * 100 <= longint'(est) * 115,
          $sformatf("flow %0d->%0d average latency %0d, estimate %0d", src, dst, avg, est));
  endtask

  initial begin
    for (int p = 0; p < NLP; p++) begin
      pkt_priority[p] = '0; sp_in[p] = '0; sp_release[p] = '0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    g_mac[2].u_mac.add_job(255, 0, 64, 0);  wait_quiet(300, 100000);
    g_mac[3].u_mac.add_job(255, 0, 64, 0);  wait_quiet(300, 100000);
    g_mac[4].u_mac.add_job(255, 0, 64, 0);  wait_quiet(300, 100000);
    g_mac[11].u_mac.add_job(255, 0, 64, 0); wait_quiet(300, 100000);
    g_mac[16].u_mac.add_job(255, 0, 64, 0); wait_quiet(3000, 100000);
    g_mac[2].u_mac.clear_stats();  g_mac[3].u_mac.clear_stats();  g_mac[4].u_mac.clear_stats();
    g_mac[11].u_mac.clear_stats(); g_mac[16].u_mac.clear_stats();

    for (int i = 0; i < 200; i++) begin
      g_mac[2].u_mac.add_job(16, i, 500, 12);
      g_mac[16].u_mac.add_job(2, i, 500, 12);
      g_mac[3].u_mac.add_job(4, i, 500, 12);
      g_mac[4].u_mac.add_job(11, i, 500, 12);
      g_mac[11].u_mac.add_job(3, i, 500, 12);
    end
    wait_quiet(3000, 2000000);
    $display("flows done at cycle %0d, %0d frames dropped", cyc, n_drop);
    check(n_drop == 0, "frames dropped");
    $display("  flow     estimate   min    avg    max   delivered");
    report(2, 16, 2336, g_mac[16].u_mac.n_from[2], g_mac[16].u_mac.lat_min[2], g_mac[16].u_mac.lat_max[2], g_mac[16].u_mac.lat_sum[2], g_mac[16].u_mac.n_bad);
    report(16, 2, 2336, g_mac[2].u_mac.n_from[16], g_mac[2].u_mac.lat_min[16], g_mac[2].u_mac.lat_max[16], g_mac[2].u_mac.lat_sum[16], g_mac[2].u_mac.n_bad);
    report(3, 4, 2304, g_mac[4].u_mac.n_from[3], g_mac[4].u_mac.lat_min[3], g_mac[4].u_mac.lat_max[3], g_mac[4].u_mac.lat_sum[3], g_mac[4].u_mac.n_bad);
    report(4, 11, 2304, g_mac[11].u_mac.n_from[4], g_mac[11].u_mac.lat_min[4], g_mac[11].u_mac.lat_max[4], g_mac[11].u_mac.lat_sum[4], g_mac[11].u_mac.n_bad);
    report(11, 3, 2320, g_mac[3].u_mac.n_from[11], g_mac[3].u_mac.lat_min[11], g_mac[3].u_mac.lat_max[11], g_mac[3].u_mac.lat_sum[11], g_mac[3].u_mac.n_bad);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
