// tb_motim_addr_mem: checks the MAC address table of the network interface.
// Covers: empty table misses; learning then hitting; re-learning a known
// address leaves it alone; a full set protects entries whose counter is 0;
// the entry with the smallest non-zero counter is replaced; a lookup and a
// learn requested together are served lookup first; every answer comes one
// cycle after the request. Addresses that share a set are found with an
// independent model of the hash (XOR fold of the address to the set index).
module tb_motim_addr_mem;
  localparam int P = 256, WAYS = 4, LP_W = 5;
  localparam int IW = $clog2(P / WAYS);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            lk_req = 0, lk_done, lk_hit;
  logic [47:0]     lk_mac = '0;
  logic [LP_W-1:0] lk_lp;
  logic            ln_req = 0, ln_done;
  logic [47:0]     ln_mac = '0;
  logic [LP_W-1:0] ln_lp = '0;

  motim_addr_mem #(.P(P), .WAYS(WAYS), .LP_W(LP_W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int set_of(logic [47:0] m);
    int h = 0;
    for (int b = 0; b < 48; b++) if (m[b]) h ^= (1 << (b % IW));
    return h;
  endfunction

  task automatic lookup(input logic [47:0] m, output bit hit, output int lp);
    @(negedge clk);
    lk_req = 1; lk_mac = m;
    @(negedge clk);
    check(lk_done === 1'b1, "lookup not answered after one cycle");
    hit = lk_hit; lp = int'(lk_lp);
    lk_req = 0;
  endtask

  task automatic learn(input logic [47:0] m, input int lp);
    @(negedge clk);
    ln_req = 1; ln_mac = m; ln_lp = LP_W'(lp);
    @(negedge clk);
    check(ln_done === 1'b1, "learn not acknowledged after one cycle");
    ln_req = 0;
  endtask

  logic [47:0] same [5];
  bit hit; int lp;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    lookup(48'h0200_0000_0001, hit, lp);
    check(!hit, "empty table hit");

    learn(48'h0200_0000_0001, 7);
    lookup(48'h0200_0000_0001, hit, lp);
    check(hit && lp == 7, "learned address not found");
    learn(48'h0200_0000_0001, 9);
    lookup(48'h0200_0000_0001, hit, lp);
    check(hit && lp == 7, "known address was overwritten by a second learn");

    // five addresses of one set
    begin
      int n = 0;
      for (longint v = 48'h0A00_0000_0000; n < 5; v++)
        if (set_of(v[47:0]) == 5) begin same[n] = v[47:0]; n++; end
    end
    for (int i = 0; i < 4; i++) learn(same[i], 10 + i);
    learn(same[4], 14);                  // set full, all counters 0: refused
    lookup(same[4], hit, lp);
    check(!hit, "recently inserted entries were not protected");
    // counters: same0 = 2, same1 = 1, same2 = 3, same3 = 0
    lookup(same[0], hit, lp); check(hit && lp == 10, "same0 lookup");
    lookup(same[0], hit, lp);
    lookup(same[1], hit, lp); check(hit && lp == 11, "same1 lookup");
    for (int k = 0; k < 3; k++) lookup(same[2], hit, lp);
    check(hit && lp == 12, "same2 lookup");
    learn(same[4], 14);                  // replaces same1 (smallest non-zero)
    lookup(same[4], hit, lp); check(hit && lp == 14, "new entry not inserted");
    lookup(same[1], hit, lp); check(!hit, "entry with the smallest counter not replaced");
    lookup(same[3], hit, lp); check(hit && lp == 13, "entry with counter 0 was replaced");
    lookup(same[0], hit, lp); check(hit && lp == 10, "same0 lost");
    lookup(same[2], hit, lp); check(hit && lp == 12, "same2 lost");

    // simultaneous requests: lookup first, then learn
    @(negedge clk);
    lk_req = 1; lk_mac = 48'h0200_0000_0001;
    ln_req = 1; ln_mac = 48'h0300_0000_0003; ln_lp = 5'd3;
    @(negedge clk);
    check(lk_done && !ln_done, "lookup did not win over learn");
    lk_req = 0;
    @(negedge clk);
    check(ln_done, "learn not served after the lookup");
    ln_req = 0;
    lookup(48'h0300_0000_0003, hit, lp); check(hit && lp == 3, "learned during conflict not found");

    // many addresses spread over the sets: all found
    for (int i = 0; i < 64; i++) learn(48'h0600_0000_0000 + 48'(i * 977), i % 32);
    begin
      int found = 0;
      for (int i = 0; i < 64; i++) begin
        lookup(48'h0600_0000_0000 + 48'(i * 977), hit, lp);
        if (hit && lp == i % 32) found++;
      end
      $display("spread: %0d of 64 found", found);
      check(found >= 48, "too few spread addresses found");
    end

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
