// tb_eth_port: testbench model of the Ethernet MAC of one switch port.
//
// Transmit side (frames into the switch): frames queued with add_job() are
// sent one byte every BR cycles, with a gap of 'ipg' byte times between
// frames. A frame is: destination MAC (02:00:00:00:00:dst, or all ones for
// an Ethernet broadcast), source MAC 02:00:00:00:00:MY_PORT, then source
// port, sequence number, length (2 bytes), the 4-byte cycle count at which
// its first byte left, and a pattern computed from the source, sequence
// number and position.
// Receive side (frames out of the switch): one byte every BR cycles is
// accepted; every frame is checked byte for byte against the same formula,
// and its latency (first byte out minus first byte in, taken from the
// timestamp) is accumulated per source port.
module tb_eth_port #(
  parameter int MY_PORT = 0,
  parameter int BR      = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  longint      cyc,
  output logic        rx_valid,
  output logic [7:0]  rx_data,
  output logic        rx_eop,
  input  logic        tx_valid,
  input  logic [7:0]  tx_data,
  input  logic        tx_eop,
  output logic        tx_ready
);
  localparam int MAXJ = 512;
  localparam int BCAST = 255;

  function automatic logic [7:0] fbyte(int src, int dst, int idx, int len, longint ts, int k);
    if (k < 6)   return (dst == BCAST) ? 8'hFF : ((k == 5) ? 8'(dst) : (k == 0 ? 8'h02 : 8'h00));
    if (k < 12)  return (k == 11) ? 8'(src) : (k == 6 ? 8'h02 : 8'h00);
    if (k == 12) return 8'(src);
    if (k == 13) return 8'(idx);
    if (k == 14) return 8'(len >> 8);
    if (k == 15) return 8'(len);
    if (k < 20)  return 8'(ts >> (8 * (19 - k)));
    return 8'(src * 31 + idx * 17 + k);
  endfunction

  // ---------------- transmit ----------------
  int jdst [MAXJ], jlen [MAXJ], jidx [MAXJ], jipg [MAXJ];
  int njobs = 0, jptr = 0, kpos = 0, gap = 0;
  bit act = 0;
  longint ts = 0;
  int sent = 0;

  task automatic add_job(int dst, int idx, int len, int ipg);
    jdst[njobs] = dst; jidx[njobs] = idx; jlen[njobs] = len; jipg[njobs] = ipg;
    njobs++;
  endtask

  function automatic bit busy();
    return act || jptr < njobs;
  endfunction

  always @(posedge clk) begin
    rx_valid <= 1'b0;
    rx_eop   <= 1'b0;
    if (rst_n && cyc % BR == 0) begin
      if (act) begin
        if (kpos == 0) ts = cyc;
        rx_valid <= 1'b1;
        rx_data  <= fbyte(MY_PORT, jdst[jptr], jidx[jptr], jlen[jptr], (kpos == 0) ? cyc : ts, kpos);
        rx_eop   <= (kpos == jlen[jptr] - 1);
        if (kpos == jlen[jptr] - 1) begin
          act = 0;
          gap = jipg[jptr];
          jptr++;
          sent++;
        end
        kpos++;
      end else if (gap > 0) begin
        gap--;
      end else if (jptr < njobs) begin
        act  = 1;
        kpos = 0;
      end
    end
  end

  // ---------------- receive ----------------
  assign tx_ready = (cyc % BR == 2);
  logic [7:0] rbuf [2048];
  int rlen = 0;
  int n_rx = 0, n_bad = 0;
  int n_from [64];
  longint lat_min [64], lat_max [64], lat_sum [64];
  longint t_first = 0;
  initial for (int s = 0; s < 64; s++) begin
    n_from[s] = 0; lat_min[s] = 0; lat_max[s] = 0; lat_sum[s] = 0;
  end

  task automatic clear_stats();
    n_rx = 0;
    for (int s = 0; s < 64; s++) begin
      n_from[s] = 0; lat_min[s] = 0; lat_max[s] = 0; lat_sum[s] = 0;
    end
  endtask

  always @(posedge clk) begin
    if (tx_valid && tx_ready) begin
      if (rlen == 0) t_first = cyc;
      if (rlen < 2048) rbuf[rlen] = tx_data;
      rlen++;
      if (tx_eop) begin
        int src, idx, len, dst;
        longint t0;
        bit ok;
        src = int'(rbuf[12]); idx = int'(rbuf[13]); len = {rbuf[14], rbuf[15]};
        t0  = {rbuf[16], rbuf[17], rbuf[18], rbuf[19]};
        dst = (rbuf[0] == 8'hFF) ? BCAST : int'(rbuf[5]);
        ok  = (len == rlen) && src < 64;
        for (int k = 0; k < len && ok; k++)
          if (rbuf[k] !== fbyte(src, dst, idx, len, t0, k)) ok = 0;
        if (!ok) n_bad++;
        else begin
          longint l;
          l = t_first - t0;
          if (n_from[src] == 0 || l < lat_min[src]) lat_min[src] = l;
          if (l > lat_max[src]) lat_max[src] = l;
          lat_sum[src] += l;
          n_from[src]++;
          n_rx++;
        end
        rlen = 0;
      end
    end
  end
endmodule
