// tb_motim_ni: checks the network interface, with the testbench playing the
// PC on one side and the NoC on the other. The NI is port 6; broadcast goes
// to ports 2, 9 and 20. A cell buffer of 4 slots keeps the test short.
// Covers: a frame to an unknown address is broadcast (one request and one
// intact 128-byte burst per target, first-cell flag and source in the
// request); after a nack the request is repeated exactly RETRY + 2 cycles
// later; a cell arriving from the NoC reaches the PC one cycle later with
// its session number, and its source address is learned, so the next frame
// to that address goes to port 9 only; with the NoC silent the cell buffer
// fills, the next cell is refused with pc_error and the newest stored cell
// gets the error flag.
module tb_motim_ni;
  import motim_pkg::*;
  localparam logic [31:0] MASK = (32'd1 << 2) | (32'd1 << 6) | (32'd1 << 9) | (32'd1 << 20);
  localparam int RETRY = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic pc_rx = 0, pc_offset = 0, pc_credit, pc_error;
  logic [7:0] pc_data = '0;
  logic cell_tx, cell_eop;
  logic [7:0] cell_data;
  logic [1:0] cell_session;
  logic [3:0] pc_release = '0;
  flit_t noc_in;
  logic noc_credit = 1;
  resp_t noc_resp = '0;
  flit_t noc_out = '0;
  logic [1:0] noc_session = '0;
  logic [3:0] noc_release;
  logic ev_nack, ev_bcast, ev_hit, ev_overflow;

  motim_ni #(.LP_W(5), .NLP(32), .MY_LP(5'd6), .BCAST_MASK(MASK), .NCELLS(4), .RETRY(RETRY)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // a cell as the PC builds it
  function automatic logic [7:0] cbyte(int pkt, int c, bit first, bit last, logic [47:0] dmac,
                                       logic [47:0] smac, int k);
    if (k == 0) return {first, 7'h01};
    if (k == 1) return 8'd6;
    if (k == 2) return 8'd0;
    if (first && k >= 3 && k < 9)  return dmac[8 * (8 - k) +: 8];
    if (first && k >= 9 && k < 15) return smac[8 * (14 - k) +: 8];
    if (k == 126) return {first, last, 6'b0} == 8'h0 ? 8'h00 : {last, first, 6'b0};
    if (k == 127) return 8'(c);
    return 8'(pkt * 13 + c * 7 + k);
  endfunction

  task automatic pc_cell(int pkt, int c, bit first, bit last, logic [47:0] dmac);
    for (int k = 0; k < 128; k++) begin
      @(negedge clk);
      while (!pc_credit) @(negedge clk);
      pc_rx = 1; pc_data = cbyte(pkt, c, first, last, dmac, 48'h0200_0000_0006, k);
      pc_offset = (k == 127);
    end
    @(negedge clk); pc_rx = 0; pc_offset = 0;
  endtask

  // ---------------- NoC model ----------------
  int policy = 1;                   // 1 ack, 2 nack once then ack, 0 stay silent
  int nack_left = 0;
  int phase = 0;
  int req_tgt [$];
  bit req_first [$];
  int req_src [$];
  longint req_t [$];
  logic [7:0] bursts [32][128];
  int nburst = 0, bpos = 0;
  int pending = 0;                  // cycles until the response
  longint nack_t = 0;

  always @(posedge clk) if (rst_n) begin
    if (noc_in.valid) begin
      if (phase == 0) begin
        req_tgt.push_back(int'(noc_in.data[6:0]));
        req_first.push_back(noc_in.data[7]);
        req_t.push_back(cyc);
        phase = 1;
      end else if (phase == 1) begin
        req_src.push_back(int'(noc_in.data));
        phase = 2;
        if (policy != 0) pending = 3;
      end else begin
        bursts[nburst][bpos] = noc_in.data;
        bpos++;
        if (noc_in.eop) begin
          check(bpos == 128, "burst is not 128 bytes");
          nburst++; bpos = 0; phase = 0;
        end
      end
    end
  end

  always @(negedge clk) begin
    noc_resp = '0;
    if (pending > 0) begin
      pending--;
      if (pending == 0) begin
        if (nack_left > 0) begin
          nack_left--;
          noc_resp.nack = 1;
          nack_t = cyc;
          phase = 0;
        end else begin
          noc_resp.ack = 1;
          phase = 3;
        end
      end
    end
  end

  int nerr = 0, novf = 0, nb = 0, nh = 0;
  always @(posedge clk) if (rst_n) begin
    if (pc_error) nerr++;
    if (ev_overflow) novf++;
    if (ev_bcast) nb++;
    if (ev_hit) nh++;
  end

  function automatic bit burst_is(int b, int pkt, int c, bit first, bit last, logic [47:0] dmac);
    for (int k = 0; k < 128; k++)
      if (bursts[b][k] != cbyte(pkt, c, first, last, dmac, 48'h0200_0000_0006, k)) return 0;
    return 1;
  endfunction

  logic [47:0] M9 = 48'h0200_0000_0909;
  logic [47:0] UNK = 48'h0200_0000_7777;
  int fwd_bad = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. broadcast of a one-cell frame
    pc_cell(1, 0, 1, 1, UNK);
    wait (nburst == 3);
    repeat (5) @(negedge clk);
    check(req_tgt.size() == 3 && req_tgt[0] == 2 && req_tgt[1] == 9 && req_tgt[2] == 20,
          "broadcast targets wrong");
    check(req_first[0] && req_first[1] && req_first[2], "first-cell flag missing");
    check(req_src[0] == 6, "source port missing in request");
    check(burst_is(0, 1, 0, 1, 1, UNK) && burst_is(1, 1, 0, 1, 1, UNK) && burst_is(2, 1, 0, 1, 1, UNK),
          "broadcast burst differs from the cell");
    check(nb == 1, "broadcast event not counted once");

    // 2. learning: a first cell from port 9 with source address M9
    for (int k = 0; k < 128; k++) begin
      @(negedge clk);
      noc_out = '{valid: 1, eop: (k == 127),
                  data: (k == 0) ? 8'h81 : (k == 1) ? 8'd9 : (k >= 9 && k < 15) ? M9[8 * (14 - k) +: 8] : 8'(k)};
      noc_session = 2'd2;
      @(posedge clk); #1;
      if (!(cell_tx && cell_data == noc_out.data && cell_session == 2'd2 && cell_eop == (k == 127))) fwd_bad++;
    end
    @(negedge clk); noc_out = '0;
    check(fwd_bad == 0, "cell not forwarded to the PC one cycle later with its session");

    // 3. unicast to the learned address, first request refused once
    nack_left = 1;
    pc_cell(2, 0, 1, 0, M9);
    pc_cell(2, 1, 0, 1, M9);
    wait (nburst == 5);
    repeat (5) @(negedge clk);
    check(req_tgt.size() == 6 && req_tgt[3] == 9 && req_tgt[4] == 9 && req_tgt[5] == 9,
          "unicast not sent to the learned port 9");
    check(req_t[4] - nack_t == RETRY + 2, $sformatf("retry after %0d cycles, expected %0d", req_t[4] - nack_t, RETRY + 2));
    check(!req_first[5], "second cell marked as first");
    check(burst_is(3, 2, 0, 1, 0, M9) && burst_is(4, 2, 1, 0, 1, M9), "unicast bursts differ from the cells");
    check(nh == 1, "table hit not counted once");

    // 4. overflow: NoC silent, 4 slots full, 5th cell refused
    policy = 0;
    pc_cell(3, 0, 1, 0, M9);              // taken by the sender, then stuck
    for (int c = 1; c < 4; c++) pc_cell(3, c, 0, 0, M9);
    fork
      pc_cell(3, 4, 0, 0, M9);
      begin wait (pc_error); end
    join_any
    disable fork;
    @(negedge clk); pc_rx = 0; pc_offset = 0;
    repeat (5) @(negedge clk);
    check(nerr >= 1 && novf == 1, "overflow not reported to the PC");
    // release the NoC: the stuck request and the stored cells go out
    policy = 1;
    pending = 3;
    wait (nburst == 9);
    repeat (5) @(negedge clk);
    check(burst_is(5, 3, 0, 1, 0, M9), "cell 0 of packet 3 altered");
    check(burst_is(7, 3, 2, 0, 0, M9), "cell 2 of packet 3 altered");
    check(bursts[8][126] == 8'h20, $sformatf("newest cell byte 126 = %h, error flag expected", bursts[8][126]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
