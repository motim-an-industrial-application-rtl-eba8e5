// tb_motim_pc: checks the Packet/Cell module on both of its paths.
// Fragmentation: frames of 300 bytes (3 cells) and 80 bytes (1 cell) enter
// one byte every 4 cycles; every cell must be 128 bytes with the expected
// header, payload, zero padding, payload type and sequence number or
// offset, ni_offset only on byte 127. An ni_error raised at the start of a
// cell must drop the rest of that frame (pkt_dropped) and leave the next
// frame intact.
// Reassembly: cells of two packets are interleaved on sessions 0 and 1 and
// a third packet is ended by a cell with the error flag. The two good packets
// must reach the MAC whole, in the order they completed, starting 2 cycles
// after their last cell; the errored one must be discarded; each session
// must be released once.
module tb_motim_pc;
  import motim_pkg::*;
  localparam logic [4:0] MY_LP = 5'd13;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] pkt_priority = 8'h5A;
  logic mac_rx_valid = 0, mac_rx_eop = 0;
  logic [7:0] mac_rx_data = '0;
  logic ni_rx, ni_offset;
  logic [7:0] ni_data;
  logic ni_credit = 1, ni_error = 0;
  logic cell_tx = 0, cell_eop = 0;
  logic [7:0] cell_data = '0;
  logic [1:0] cell_session = '0;
  logic [3:0] sess_release;
  logic mac_tx_valid, mac_tx_eop;
  logic [7:0] mac_tx_data;
  logic mac_tx_ready = 1;
  logic pkt_dropped, pkt_discarded;

  motim_pc #(.LP_W(5), .MY_LP(MY_LP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] pbyte(int pkt, int k);
    return 8'(pkt * 41 + k * 3 + 1);
  endfunction

  // ---------------- fragmentation ----------------
  task automatic send_frame(int pkt, int len);
    for (int k = 0; k < len; k++) begin
      @(negedge clk);
      mac_rx_valid = 1; mac_rx_data = pbyte(pkt, k); mac_rx_eop = (k == len - 1);
      @(negedge clk); mac_rx_valid = 0; mac_rx_eop = 0;
      repeat (2) @(negedge clk);
    end
  endtask

  int cpos = 0, ncells = 0, offset_bad = 0;
  logic [7:0] cells [16][128];
  always @(posedge clk) if (rst_n && ni_rx) begin
    if (ni_offset != (cpos == 127)) offset_bad++;
    cells[ncells][cpos] = ni_data;
    if (cpos == 127) begin cpos = 0; ncells++; end
    else cpos++;
  end

  task automatic check_cells(int pkt, int len, int first_cell);
    int n = (len + 122) / 123;
    for (int c = 0; c < n; c++) begin
      int nsig = (c == n - 1) ? len - 123 * c : 123;
      bit ok = 1;
      logic [1:0] pt;
      pt = (n == 1) ? 2'b11 : (c == 0) ? 2'b01 : (c == n - 1) ? 2'b10 : 2'b00;
      if (cells[first_cell + c][0] != {c == 0, 7'h01}) ok = 0;
      if (cells[first_cell + c][1] != 8'(MY_LP)) ok = 0;
      if (cells[first_cell + c][2] != 8'h5A) ok = 0;
      for (int k = 0; k < 123; k++)
        if (cells[first_cell + c][3 + k] != ((k < nsig) ? pbyte(pkt, 123 * c + k) : 8'h00)) ok = 0;
      if (cells[first_cell + c][126] != {pt, 6'b0}) ok = 0;
      if (cells[first_cell + c][127] != ((c == n - 1) ? 8'(nsig) : 8'(c))) ok = 0;
      check(ok, $sformatf("packet %0d cell %0d malformed", pkt, c));
    end
  endtask

  // ---------------- reassembly ----------------
  task automatic put_cell(int sess, int pkt, int c, int n, int len, bit err);
    logic [7:0] b [128];
    int nsig = (c == n - 1) ? len - 123 * c : 123;
    b[0] = {c == 0, 7'h01}; b[1] = 8'd3; b[2] = 8'd0;
    for (int k = 0; k < 123; k++) b[3 + k] = (k < nsig) ? pbyte(pkt, 123 * c + k) : 8'h00;
    b[126] = {(n == 1) ? 2'b11 : (c == 0) ? 2'b01 : (c == n - 1) ? 2'b10 : 2'b00, err, 5'b0};
    b[127] = (c == n - 1) ? 8'(nsig) : 8'(c);
    for (int k = 0; k < 128; k++) begin
      @(negedge clk);
      cell_tx = 1; cell_data = b[k]; cell_eop = (k == 127); cell_session = 2'(sess);
    end
    @(negedge clk); cell_tx = 0; cell_eop = 0;
  endtask

  logic [7:0] rx [2][2048];
  int rxlen [2];
  int rxpkt [2];
  int nrx = 0, cur = 0;
  longint cyc = 0, last_eop_cyc = 0, first_tx_cyc [2];
  int rel_cnt [4];
  int ndisc = 0, ndrop = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
    if (cell_tx && cell_eop) last_eop_cyc = cyc;
    if (mac_tx_valid && mac_tx_ready && nrx < 2) begin
      if (cur == 0) first_tx_cyc[nrx] = cyc;
      rx[nrx][cur] = mac_tx_data;
      cur++;
      if (mac_tx_eop) begin rxlen[nrx] = cur; cur = 0; nrx++; end
    end
    for (int s = 0; s < 4; s++) if (sess_release[s]) rel_cnt[s]++;
    if (pkt_discarded) ndisc++;
    if (pkt_dropped) ndrop++;
    end
  end

  initial begin
    for (int s = 0; s < 4; s++) rel_cnt[s] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // fragmentation
    send_frame(1, 300);
    repeat (200) @(negedge clk);
    check(ncells == 3, $sformatf("300-byte frame gave %0d cells", ncells));
    check_cells(1, 300, 0);
    send_frame(2, 80);
    repeat (200) @(negedge clk);
    check(ncells == 4, "80-byte frame did not give one cell");
    check_cells(2, 80, 3);
    check(offset_bad == 0, "ni_offset not exactly on byte 127");

    // NI refuses the second cell of a 400-byte frame
    fork
      send_frame(3, 400);
      begin
        wait (ncells == 5 && cpos == 1);
        @(negedge clk); ni_error = 1; ni_credit = 0;
        repeat (2) @(negedge clk); ni_error = 0; ni_credit = 1;
      end
    join
    repeat (200) @(negedge clk);
    check(ndrop == 1, "refused cell did not drop the frame");
    check(ncells == 5 && cpos <= 2, "bytes of the dropped frame kept coming");
    cpos = 0;
    send_frame(4, 130);
    repeat (200) @(negedge clk);
    check(ncells == 7, "frame after a drop not cut into 2 cells");
    check_cells(4, 130, 5);

    // reassembly: packet 10 (250 B, session 1), packet 11 (200 B, session 0)
    put_cell(1, 10, 0, 3, 250, 0);
    put_cell(0, 11, 0, 2, 200, 0);
    put_cell(2, 12, 0, 2, 200, 0);
    put_cell(0, 11, 1, 2, 200, 0);        // packet 11 completes first
    put_cell(2, 12, 1, 2, 200, 1);        // packet 12 ends in error
    put_cell(1, 10, 1, 3, 250, 0);
    put_cell(1, 10, 2, 3, 250, 0);
    repeat (600) @(negedge clk);
    check(nrx == 2, $sformatf("%0d packets reached the MAC", nrx));
    check(rxlen[0] == 200 && rxlen[1] == 250, "wrong packet order or length");
    begin
      bit ok = 1;
      for (int k = 0; k < 200; k++) if (rx[0][k] != pbyte(11, k)) ok = 0;
      for (int k = 0; k < 250; k++) if (rx[1][k] != pbyte(10, k)) ok = 0;
      check(ok, "reassembled packet content wrong");
    end
    check(first_tx_cyc[1] - last_eop_cyc == 2, $sformatf("packet started %0d cycles after its last cell",
          first_tx_cyc[1] - last_eop_cyc));
    check(ndisc == 1, "errored packet not discarded");
    check(rel_cnt[0] == 1 && rel_cnt[1] == 1 && rel_cnt[2] == 1 && rel_cnt[3] == 0,
          "sessions not released exactly once");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
