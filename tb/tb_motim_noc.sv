// tb_motim_noc: checks the 4x4 MOTIM mesh with the testbench acting as the
// network interfaces.
// Covers: one circuit from port 2 to port 29 (5 routers: the cell arrives
// intact, 5 cycles per byte after it was sent); then the 12 flows of the
// evaluation scenario of the switch (sources and targets given as local
// ports) running at the same time, 3 cells each, with retry after a nack.
// Every cell must arrive once, intact, at its target, the 3 cells of a flow
// in one session, which the receiver then releases. Refused requests must
// occur, since flows share links.
module tb_motim_noc;
  import motim_pkg::*;
  localparam int NLP = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t      lp_in      [NLP];
  logic       lp_credit  [NLP];
  resp_t      lp_resp    [NLP];
  flit_t      lp_out     [NLP];
  logic [1:0] lp_session [NLP];
  logic [3:0] lp_release [NLP];

  motim_noc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int nacks = 0;
  longint t_first_sent [NLP];

  // network interface model: request, retry after nack, then the cell
  task automatic send_cell(int src, int dst, int idx, int n, int seed);
    int res;
    forever begin
      @(negedge clk);
      while (!lp_credit[src]) @(negedge clk);
      lp_in[src] = '{valid: 1, eop: 0, data: 8'({idx == 0, 7'(dst)})};
      @(negedge clk);
      lp_in[src] = '{valid: 1, eop: 0, data: 8'(src)};
      @(negedge clk);
      lp_in[src] = '0;
      res = 0;
      while (res == 0) begin
        if (lp_resp[src].ack) res = 1;
        else if (lp_resp[src].nack) res = 2;
        else @(negedge clk);
      end
      if (res == 1) break;
      nacks++;
      repeat (20 + src) @(negedge clk);
    end
    @(negedge clk);
    t_first_sent[src] = cyc;
    for (int k = 0; k < 128; k++) begin
      lp_in[src] = '{valid: 1, eop: (k == 127),
                     data: (k == 0) ? 8'(seed) : (k == 1) ? 8'(idx) : (k == 2) ? 8'(n) : 8'(seed + k)};
      @(negedge clk);
    end
    lp_in[src] = '0;
  endtask

  // receivers
  int rx_cells [NLP][256];          // per target, per seed
  int sess_of  [NLP][256];
  int bad = 0, sess_bad = 0;
  longint t_first_rx [NLP];
  logic [7:0] rb [NLP][128];
  int rpos [NLP];
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NLP; p++) begin
      lp_release[p] <= '0;
      if (lp_out[p].valid) begin
        if (rpos[p] == 0) t_first_rx[p] = cyc;
        rb[p][rpos[p]] = lp_out[p].data;
        rpos[p]++;
        if (lp_out[p].eop) begin
          int seed;
          bit ok;
          seed = int'(rb[p][0]);
          ok = (rpos[p] == 128);
          for (int k = 3; k < 128 && ok; k++) if (rb[p][k] != 8'(seed + k)) ok = 0;
          if (!ok) bad++;
          else begin
            if (rx_cells[p][seed] == 0) sess_of[p][seed] = int'(lp_session[p]);
            else if (sess_of[p][seed] != int'(lp_session[p])) sess_bad++;
            rx_cells[p][seed]++;
            if (int'(rb[p][1]) == int'(rb[p][2]) - 1)
              lp_release[p] <= 4'(1 << lp_session[p]);
          end
          rpos[p] = 0;
        end
      end
    end
  end

  int src_l [12] = '{0, 3, 4, 11, 16, 17, 21, 22, 27, 29, 30, 31};
  int dst_l [12] = '{29, 17, 11, 4, 5, 16, 31, 1, 28, 30, 9, 8};

  initial begin
    for (int p = 0; p < NLP; p++) begin
      lp_in[p] = '0; rpos[p] = 0;
      for (int s = 0; s < 256; s++) rx_cells[p][s] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    send_cell(2, 29, 0, 1, 100);
    repeat (10) @(negedge clk);
    check(rx_cells[29][100] == 1, "cell 2->29 not delivered");
    check(t_first_rx[29] - t_first_sent[2] == 5,
          $sformatf("cell 2->29 took %0d cycles per byte, expected 5", t_first_rx[29] - t_first_sent[2]));

    for (int f = 0; f < 12; f++) begin
      automatic int ff = f;
      fork
        for (int c = 0; c < 3; c++) send_cell(src_l[ff], dst_l[ff], c, 3, 10 + ff);
      join_none
    end
    wait fork;
    repeat (20) @(negedge clk);
    for (int f = 0; f < 12; f++)
      check(rx_cells[dst_l[f]][10 + f] == 3,
            $sformatf("flow %0d->%0d delivered %0d of 3 cells", src_l[f], dst_l[f], rx_cells[dst_l[f]][10 + f]));
    check(bad == 0, "corrupted cells");
    check(sess_bad == 0, "cells of one flow in different sessions");
    $display("12 flows: %0d refused requests, finished at cycle %0d", nacks, cyc);
    check(nacks > 0, "no contention seen");

    // three sources interleave cells into one port: three sessions
    fork
      send_cell(2, 29, 0, 2, 60);
      begin repeat (3) @(negedge clk); send_cell(8, 29, 0, 2, 61); end
      begin repeat (6) @(negedge clk); send_cell(20, 29, 0, 2, 62); end
    join
    fork
      send_cell(2, 29, 1, 2, 60);
      begin repeat (3) @(negedge clk); send_cell(8, 29, 1, 2, 61); end
      begin repeat (6) @(negedge clk); send_cell(20, 29, 1, 2, 62); end
    join
    repeat (20) @(negedge clk);
    check(rx_cells[29][60] == 2 && rx_cells[29][61] == 2 && rx_cells[29][62] == 2, "interleaved cells lost");
    check(sess_of[29][60] != sess_of[29][61] && sess_of[29][61] != sess_of[29][62] &&
          sess_of[29][60] != sess_of[29][62], "interleaved packets share a session");
    check(sess_bad == 0, "cells of one packet in different sessions");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
