// motim_pc: the Packet/Cell module of one MOTIM switch port.
//
// What it does: it sits between an Ethernet MAC and the network interface.
// Towards the NoC it cuts each Ethernet packet into 128-byte cells; from the
// NoC it rebuilds packets from cells in NSESS session buffers and hands each
// complete packet to the MAC.
//
// Fragmentation (MAC -> NI): the MAC delivers one byte every few cycles,
// far slower than the one byte per cycle the NI accepts, so no packet buffer
// is needed: a 32-byte elastic FIFO absorbs the header bytes inserted at the
// start of every cell and the zero padding that completes the last cell of a
// packet while the next packet is already arriving. A cell is
//   byte 0      {first-cell flag, 7-bit cell type}
//   byte 1      source local port number
//   byte 2      priority (pkt_priority input)
//   bytes 3-125 123 payload bytes, zero padded in the last cell
//   byte 126    {payload type (2 bits: middle/first/last/single), error, 5'b0}
//   byte 127    cell sequence number, or in the last cell the number of
//               significant payload bytes (offset); ni_offset marks this byte.
// Bytes go out on ni_rx/ni_data while ni_credit is high. If the NI reports
// ni_error (its cell buffer was full), the cell being sent is abandoned and
// the rest of the packet is dropped as it arrives from the MAC.
//
// Reassembly (NI -> MAC): each cell arrives in one burst on cell_tx with its
// session number. Its payload is appended to that session's buffer. The last
// cell of a packet completes it and its session enters an output queue, in
// the order packets complete, so packets of one source never overtake each
// other. A cell with the error flag set drops everything stored for that
// session. A complete packet is sent to the MAC, one byte per cycle in which
// mac_tx_ready is high, and its buffer and session are then freed
// (sess_release, one bit per session, for one cycle).
//
// Timing: a byte from the MAC leaves as part of a cell at the earliest 4
// cycles later (3 header bytes ahead of it). A packet starts towards the MAC
// 2 cycles after its last cell ends.
//
// From the document: cell layout and sizes, buffer-less fragmentation,
// m = 4 session buffers, discard on the error flag, sending only complete
// packets. This design's choices: the byte-stream MAC interface, the 32-entry
// elastic FIFO, zero padding, payload-type codes, the completion-order
// output queue, 2048-byte session buffers and the release signal.
module motim_pc import motim_pkg::*; #(
  parameter int LP_W      = 5,
  parameter int NSESS     = 4,
  parameter int BUF_BYTES = 2048,
  parameter logic [LP_W-1:0] MY_LP = '0,
  localparam int SW = (NSESS > 1) ? $clog2(NSESS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        pkt_priority,
  // MAC receive side
  input  logic              mac_rx_valid,
  input  logic [7:0]        mac_rx_data,
  input  logic              mac_rx_eop,
  // cells towards the NI
  output logic              ni_rx,
  output logic [7:0]        ni_data,
  output logic              ni_offset,
  input  logic              ni_credit,
  input  logic              ni_error,
  // cells from the NI
  input  logic              cell_tx,
  input  logic [7:0]        cell_data,
  input  logic              cell_eop,
  input  logic [SW-1:0]     cell_session,
  output logic [NSESS-1:0]  sess_release,
  // MAC transmit side
  output logic              mac_tx_valid,
  output logic [7:0]        mac_tx_data,
  output logic              mac_tx_eop,
  input  logic              mac_tx_ready,
  // events
  output logic              pkt_dropped,
  output logic              pkt_discarded
);

  localparam int FD  = 32;                 // covers 122 padding cycles at BR = 4
  localparam int FDW = $clog2(FD);
  localparam int BW  = $clog2(BUF_BYTES);

  // ================================================================
  // Fragmentation
  // ================================================================
  logic [8:0]  fifo [FD];                  // {eop, data}
  logic [FDW:0] fwp, frp;
  logic        fempty, ffull, fpop;
  logic [8:0]  fhead;
  assign fempty = (fwp == frp);
  assign ffull  = (fwp[FDW-1:0] == frp[FDW-1:0]) && (fwp[FDW] != frp[FDW]);
  assign fhead  = fifo[frp[FDW-1:0]];

  typedef enum logic [3:0] {
    F_IDLE, F_H0, F_H1, F_H2, F_PAY, F_PAD, F_T0, F_T1, F_DISC
  } fstate_e;
  fstate_e     fst;
  logic [6:0]  fcnt;
  logic        ffirst, fend;
  logic [7:0]  fcsn, fnsig;
  ptype_e      fptype;

  always_comb begin
    fpop = 1'b0;
    if (fst == F_PAY && ni_credit && !ni_error && !fempty) fpop = 1'b1;
    if (fst == F_DISC && !fempty) fpop = 1'b1;
    if (ffirst && fend)  fptype = PT_SINGLE;
    else if (ffirst)     fptype = PT_FIRST;
    else if (fend)       fptype = PT_LAST;
    else                 fptype = PT_MIDDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwp <= '0; frp <= '0;
      for (int i = 0; i < FD; i++) fifo[i] <= '0;
      fst <= F_IDLE; fcnt <= '0; ffirst <= 1'b1; fend <= 1'b0;
      fcsn <= '0; fnsig <= '0;
      ni_rx <= 1'b0; ni_data <= '0; ni_offset <= 1'b0;
      pkt_dropped <= 1'b0;
    end else begin
      if (mac_rx_valid && !ffull) begin
        fifo[fwp[FDW-1:0]] <= {mac_rx_eop, mac_rx_data};
        fwp <= fwp + 1'b1;
      end
      if (fpop) frp <= frp + 1'b1;

      ni_rx       <= 1'b0;
      ni_offset   <= 1'b0;
      pkt_dropped <= 1'b0;
      if (ni_error && fst != F_IDLE && fst != F_DISC) begin
        // the NI refused the cell: abandon the rest of this packet
        pkt_dropped <= 1'b1;
        fst <= fend ? F_IDLE : F_DISC;
      end else begin
        unique case (fst)
          F_IDLE: if (!fempty) begin
            ffirst <= 1'b1; fend <= 1'b0; fcsn <= '0;
            fst <= F_H0;
          end
          F_H0: if (ni_credit) begin
            ni_rx <= 1'b1; ni_data <= {ffirst, CELL_TYPE_DATA};
            fst <= F_H1;
          end
          F_H1: if (ni_credit) begin
            ni_rx <= 1'b1; ni_data <= 8'(MY_LP);
            fst <= F_H2;
          end
          F_H2: if (ni_credit) begin
            ni_rx <= 1'b1; ni_data <= pkt_priority;
            fcnt <= '0;
            fst <= F_PAY;
          end
          F_PAY: if (fpop) begin
            ni_rx <= 1'b1; ni_data <= fhead[7:0];
            fcnt <= fcnt + 1'b1;
            if (fhead[8]) begin
              fend  <= 1'b1;
              fnsig <= 8'(fcnt) + 8'd1;
            end
            if (int'(fcnt) == CELL_PAYLOAD - 1) fst <= F_T0;
            else if (fhead[8])                  fst <= F_PAD;
          end
          F_PAD: if (ni_credit) begin
            ni_rx <= 1'b1; ni_data <= '0;
            fcnt <= fcnt + 1'b1;
            if (int'(fcnt) == CELL_PAYLOAD - 1) fst <= F_T0;
          end
          F_T0: if (ni_credit) begin
            ni_rx <= 1'b1; ni_data <= {fptype, 1'b0, 5'b0};
            fst <= F_T1;
          end
          F_T1: if (ni_credit) begin
            ni_rx <= 1'b1; ni_offset <= 1'b1;
            ni_data <= fend ? fnsig : fcsn;
            if (fend) fst <= F_IDLE;
            else begin
              ffirst <= 1'b0;
              fcsn   <= fcsn + 1'b1;
              fst    <= F_H0;
            end
          end
          F_DISC: if (fpop && fhead[8]) fst <= F_IDLE;
          default: fst <= F_IDLE;
        endcase
      end
    end
  end

  // ================================================================
  // Reassembly
  // ================================================================
  logic [7:0]     sbuf [NSESS * BUF_BYTES];
  logic [6:0]     rcnt;
  logic [SW-1:0]  rsess, cur_s;
  logic [1:0]     rptype;
  logic           rerr;
  logic [BW:0]    wptr [NSESS];
  logic [BW:0]    plen [NSESS];
  logic [SW-1:0]  dq [NSESS];               // queue of complete packets
  logic [SW:0]    dwp, drp;
  logic           dempty;
  assign dempty = (dwp == drp);
  assign cur_s  = (rcnt == '0) ? cell_session : rsess;

  typedef enum logic { T_IDLE, T_SEND } tstate_e;
  tstate_e        tst;
  logic [SW-1:0]  ts;
  logic [BW:0]    tptr;

  logic [BW:0]    waddr;
  always_comb begin
    waddr = wptr[cur_s] + (BW+1)'(rcnt) - (BW+1)'(CELL_HDR);
    mac_tx_valid = (tst == T_SEND);
    mac_tx_data  = sbuf[int'(ts) * BUF_BYTES + int'(tptr[BW-1:0])];
    mac_tx_eop   = (tst == T_SEND) && (tptr == plen[ts] - 1'b1);
  end

  always_ff @(posedge clk) begin
    if (cell_tx && int'(rcnt) >= CELL_HDR && int'(rcnt) < CELL_TYPE_POS &&
        int'(waddr) < BUF_BYTES)
      sbuf[int'(cur_s) * BUF_BYTES + int'(waddr[BW-1:0])] <= cell_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcnt <= '0; rsess <= '0; rptype <= '0; rerr <= 1'b0;
      for (int s = 0; s < NSESS; s++) begin
        wptr[s] <= '0; plen[s] <= '0; dq[s] <= '0;
      end
      dwp <= '0; drp <= '0;
      tst <= T_IDLE; ts <= '0; tptr <= '0;
      sess_release <= '0;
      pkt_discarded <= 1'b0;
    end else begin
      sess_release  <= '0;
      pkt_discarded <= 1'b0;
      if (cell_tx) begin
        rsess <= cur_s;
        rcnt  <= cell_eop ? '0 : rcnt + 1'b1;
        if (int'(rcnt) == CELL_TYPE_POS) begin
          rptype <= cell_data[7:6];
          rerr   <= cell_data[5];
        end
        if (cell_eop) begin
          if (rerr) begin
            wptr[cur_s] <= '0;
            sess_release[cur_s] <= 1'b1;
            pkt_discarded <= 1'b1;
          end else if (rptype == PT_LAST || rptype == PT_SINGLE) begin
            plen[cur_s] <= wptr[cur_s] + (BW+1)'(cell_data);
            dq[dwp[SW-1:0]] <= cur_s;
            dwp <= dwp + 1'b1;
          end else begin
            wptr[cur_s] <= wptr[cur_s] + (BW+1)'(CELL_PAYLOAD);
          end
        end
      end

      unique case (tst)
        T_IDLE: if (!dempty) begin
          ts   <= dq[drp[SW-1:0]];
          drp  <= drp + 1'b1;
          tptr <= '0;
          tst  <= T_SEND;
        end
        T_SEND: if (mac_tx_ready) begin
          tptr <= tptr + 1'b1;
          if (mac_tx_eop) begin
            wptr[ts] <= '0;
            sess_release[ts] <= 1'b1;
            tst <= T_IDLE;
          end
        end
        default: tst <= T_IDLE;
      endcase
    end
  end

  a_fifo_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    mac_rx_valid |-> !ffull) else $error("pc: MAC byte arrived with the fragmentation FIFO full");
  a_cell_len: assert property (@(posedge clk) disable iff (!rst_n)
    (cell_tx && cell_eop) |-> int'(rcnt) == CELL_BYTES - 1) else $error("pc: received cell is not 128 bytes");

endmodule
