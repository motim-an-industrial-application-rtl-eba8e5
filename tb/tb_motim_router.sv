// tb_motim_router: checks one router, placed at (1,1) of a 4x4 mesh, with
// its neighbours played by the testbench.
// Covers: a local-to-local circuit (ack 2 cycles after the request, data
// 1 cycle per byte through the router, session number shown, circuit freed
// by eop); XY routing of requests to the four directions (X first); both
// SDM lanes of one link used by two circuits and a third request refused;
// a nack from downstream passed back and the lane freed; session control at
// a local port (4 sessions, a 5th first-cell request refused, later cells
// find their source's session, release frees a session).
module tb_motim_router;
  import motim_pkg::*;
  localparam int NL = 2, NCH = 2 + 4 * NL;
  localparam int EB = 2, WB = 2 + NL, NB = 2 + 2 * NL, SB = 2 + 3 * NL;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t in_fwd [NCH];
  resp_t in_resp [NCH];
  flit_t out_fwd [NCH];
  resp_t out_resp [NCH];
  logic [1:0] local_credit;
  logic [1:0] local_session [2];
  logic [3:0] sess_release [2];

  motim_router #(.X_POS(1), .Y_POS(1), .MESH_X(4), .MESH_Y(4), .NLANES(NL), .NSESS(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int lp_of(int x, int y, int p);
    return 2 * (y * 4 + x) + p;
  endfunction

  // request on input ch; returns 1 = ack, 2 = nack, 0 = none within 'wait_c'
  // cycles; if out >= 0 the testbench answers as the downstream router
  task automatic request(int ch, bit first, int tgt, int src, int out, bit down_ack,
                         output int res, output int lat);
    @(negedge clk);
    in_fwd[ch] = '{valid: 1, eop: 0, data: 8'({first, 7'(tgt)})};
    @(negedge clk);
    in_fwd[ch] = '{valid: 1, eop: 0, data: 8'(src)};
    @(negedge clk);
    in_fwd[ch] = '0;
    res = 0; lat = 1;
    for (int c = 0; c < 10 && res == 0; c++) begin
      if (out >= 0 && out_fwd[out].valid && out_fwd[out].data == 8'(src)) begin
        // second header byte seen downstream: answer
        out_resp[out] = down_ack ? '{ack: 1, nack: 0} : '{ack: 0, nack: 1};
        @(negedge clk);
        out_resp[out] = '0;
        lat++;
      end
      if (in_resp[ch].ack) res = 1;
      else if (in_resp[ch].nack) res = 2;
      else begin @(negedge clk); lat++; end
    end
  endtask

  // stream n bytes on input ch and check them 1 cycle later on output out
  task automatic stream(int ch, int out, int n, int seed);
    int bad = 0;
    for (int k = 0; k < n; k++) begin
      in_fwd[ch] = '{valid: 1, eop: (k == n - 1), data: 8'(seed + k)};
      @(negedge clk);
      if (!(out_fwd[out].valid && out_fwd[out].data == 8'(seed + k) && out_fwd[out].eop == (k == n - 1)))
        bad++;
    end
    in_fwd[ch] = '0;
    check(bad == 0, $sformatf("stream %0d->%0d: %0d bytes wrong or late", ch, out, bad));
  endtask

  int res, lat, me0, me1;

  initial begin
    for (int c = 0; c < NCH; c++) begin in_fwd[c] = '0; out_resp[c] = '0; end
    sess_release[0] = '0; sess_release[1] = '0;
    me0 = lp_of(1, 1, 0); me1 = lp_of(1, 1, 1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(local_credit == 2'b11, "no credit after reset");

    // local port 0 -> local port 1
    request(0, 1, me1, me0, -1, 1, res, lat);
    check(res == 1, "local request not acked");
    check(lat == 2, $sformatf("local ack after %0d cycles, expected 2", lat));
    check(local_credit[0] == 1'b0, "credit kept during a circuit");
    check(local_session[1] == 2'd0, "first session is not 0");
    stream(0, 1, 128, 7);
    repeat (3) @(negedge clk);
    check(!out_fwd[1].valid && local_credit[0], "circuit not freed after eop");

    // XY routing
    request(0, 1, lp_of(3, 3, 0), me0, EB, 0, res, lat);
    check(res == 2, "east request (X first) not answered via lane E0");
    request(0, 1, lp_of(0, 2, 1), me0, WB, 0, res, lat);
    check(res == 2, "west request not routed west");
    request(0, 1, lp_of(1, 3, 0), me0, NB, 0, res, lat);
    check(res == 2, "north request not routed north");
    request(0, 1, lp_of(1, 0, 1), me0, SB, 0, res, lat);
    check(res == 2, "south request not routed south");

    // two circuits share the east link, a third is refused
    request(0, 1, lp_of(2, 1, 0), me0, EB, 1, res, lat);
    check(res == 1, "first east circuit not set up on lane 0");
    request(1, 1, lp_of(3, 1, 1), me1, EB + 1, 1, res, lat);
    check(res == 1, "second east circuit not set up on lane 1");
    request(WB, 1, lp_of(2, 1, 1), lp_of(0, 1, 0), -1, 1, res, lat);
    check(res == 2, "third east request not refused");
    fork
      stream(0, EB, 60, 20);
      stream(1, EB + 1, 60, 90);
    join
    repeat (3) @(negedge clk);
    check(!out_fwd[EB].valid && !out_fwd[EB + 1].valid, "east lanes not freed");

    // sessions at local port 0: four sources from four inputs
    request(1, 1, me0, 40, -1, 1, res, lat);  check(res == 1, "session A");
    check(local_session[0] == 0, "session A number");
    stream(1, 0, 128, 1);
    request(WB, 1, me0, 41, -1, 1, res, lat); check(res == 1, "session B");
    check(local_session[0] == 1, "session B number");
    stream(WB, 0, 128, 2);
    request(NB, 1, me0, 42, -1, 1, res, lat); check(res == 1, "session C");
    stream(NB, 0, 128, 3);
    request(SB, 1, me0, 43, -1, 1, res, lat); check(res == 1, "session D");
    check(local_session[0] == 3, "session D number");
    stream(SB, 0, 128, 4);
    request(EB, 1, me0, 44, -1, 1, res, lat); check(res == 2, "fifth session not refused");
    request(WB + 1, 0, me0, 41, -1, 1, res, lat);
    check(res == 1 && local_session[0] == 1, "later cell of source B not in session B");
    stream(WB + 1, 0, 128, 5);
    @(negedge clk);
    sess_release[0] = 4'b0100;
    @(negedge clk);
    sess_release[0] = '0;
    request(EB, 1, me0, 44, -1, 1, res, lat);
    check(res == 1 && local_session[0] == 2, "released session not reused");
    stream(EB, 0, 10, 6);
    // busy local output refuses
    request(EB + 1, 0, me0, 44, -1, 1, res, lat);
    check(res == 1, "continuation of source E refused");
    request(NB + 1, 0, me0, 42, -1, 1, res, lat);
    check(res == 2, "request to a busy local output not refused");
    stream(EB + 1, 0, 10, 8);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
