// motim_router: one router of the MOTIM circuit-switched mesh NoC.
//
// What it does: it sets up, holds and tears down byte-wide circuits between
// its 2 local ports and its 4 mesh directions (east, west, north, south).
// Each mesh link is split by space division multiplexing into NLANES
// independent 8-bit lanes, so NLANES flows can share one link at once.
//
// How it works: a source first sends a 2-byte connection packet on a lane:
//   byte 0 = {first_cell, target local port number (7 bits)}
//   byte 1 = {1'b0, source local port number}
// Local port number LP = 2*router + port, router = y*MESH_X + x.
// Every input lane owns a small state machine. Once both header bytes are in,
// the input asks a central round-robin arbiter (one grant per cycle) for a
// route. Routing is deterministic XY. At an intermediate router the granted
// input reserves the first free lane of the output direction and forwards the
// header; if no lane is free it answers nack at once, so a request never
// waits inside the network. At the destination router the request is checked
// against the port's NSESS session entries: a request for the first cell of a
// packet takes a free entry; a later cell reuses the entry its source has
// open. If the local output is busy or no entry fits, the answer is nack;
// otherwise ack. Ack and nack travel back along the reserved path, one
// register per hop; a nack frees every lane on the way. After ack the source
// streams its cell, one byte per cycle with no flow control; the byte marked
// eop frees each lane as it passes. A session entry is freed by the
// sess_release input of its local port, when the buffer behind it empties.
//
// Interface: per channel c (0,1 = local ports; 2+k east, 2+NLANES+k west,
// 2+2*NLANES+k north (y+1), 2+3*NLANES+k south (y-1), lane k): in_fwd/in_resp
// form the input lane, out_fwd/out_resp the output lane. local_credit tells
// a local source that it may send; local_session tags the cell being
// delivered to a local port.
//
// Timing: data bytes take 1 cycle per router. A header is forwarded 2 cycles
// after its second byte arrives when the arbiter grants at once; ack/nack
// take 1 cycle per router on the way back.
//
// From the document: circuit switching set up by packet-switched connection
// requests, ack/nack, XY routing, centralized round-robin arbitration, two
// local ports, SDM with n = 2, session control at the destination router
// with m = 4. This design's own choices: header format, one-register-per-hop
// pipeline, immediate nack when a lane is busy, and the explicit session
// release. Broadcast is carried out by the network interface as a series of
// unicast circuits rather than inside the router.
module motim_router import motim_pkg::*; #(
  parameter int X_POS  = 0,
  parameter int Y_POS  = 0,
  parameter int MESH_X = 4,
  parameter int MESH_Y = 4,
  parameter int NLANES = 2,
  parameter int NSESS  = 4,
  localparam int NCH   = 2 + 4 * NLANES,
  localparam int SW    = (NSESS > 1) ? $clog2(NSESS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  flit_t              in_fwd        [NCH],
  output resp_t              in_resp       [NCH],
  output flit_t              out_fwd       [NCH],
  input  resp_t              out_resp      [NCH],
  output logic [1:0]         local_credit,
  output logic [SW-1:0]      local_session [2],
  input  logic [NSESS-1:0]   sess_release  [2]
);

  localparam int CW = $clog2(NCH);

  typedef enum logic [2:0] {
    I_IDLE, I_HDR1, I_ROUTE, I_FWD1, I_WAIT, I_CONN, I_DRAIN
  } istate_e;

  istate_e         st      [NCH];
  logic [7:0]      hdr0    [NCH];
  logic [7:0]      hdr1    [NCH];
  logic [CW-1:0]   osel    [NCH];
  flit_t           fwd_q   [NCH];
  resp_t           resp_q  [NCH];
  logic [SW-1:0]   sess_q  [NCH];

  logic [NCH-1:0]  obusy;
  logic [CW-1:0]   oown    [NCH];

  logic [NSESS-1:0] s_busy [2];
  logic [NSESS-1:0] s_open [2];
  logic [6:0]       s_orig [2][NSESS];

  logic [CW-1:0]   rr;

  // ------------------------------------------------------------------
  // Output multiplexers: an output lane shows the forward register of the
  // input that owns it; an input lane sees the response of its output.
  // ------------------------------------------------------------------
  always_comb begin
    for (int o = 0; o < NCH; o++)
      out_fwd[o] = obusy[o] ? fwd_q[oown[o]] : '0;
    for (int i = 0; i < NCH; i++)
      in_resp[i] = resp_q[i];
    for (int p = 0; p < 2; p++) begin
      local_session[p] = sess_q[oown[p]];
      local_credit[p]  = (st[p] == I_IDLE);
    end
  end

  // ------------------------------------------------------------------
  // Arbitration and route computation for the granted input
  // ------------------------------------------------------------------
  logic          gnt_vld;
  logic [CW-1:0] gnt;
  always_comb begin
    gnt_vld = 1'b0;
    gnt     = '0;
    for (int k = 0; k < NCH; k++) begin
      int idx;
      idx = (int'(rr) + k) % NCH;
      if (!gnt_vld && st[idx] == I_ROUTE) begin
        gnt_vld = 1'b1;
        gnt     = CW'(idx);
      end
    end
  end

  // Decoded destination of the granted request
  logic [6:0] g_tgt, g_src;
  logic       g_first;
  int         g_tx, g_ty;
  logic       g_local;
  int         g_base;          // first channel of the chosen direction
  logic       g_lane_ok;
  logic [CW-1:0] g_lane;
  logic       g_sess_ok;
  logic [SW-1:0] g_sess;
  always_comb begin
    g_first = hdr0[gnt][7];
    g_tgt   = hdr0[gnt][6:0];
    g_src   = hdr1[gnt][6:0];
    g_tx    = int'(g_tgt[6:1]) % MESH_X;
    g_ty    = int'(g_tgt[6:1]) / MESH_X;
    g_local = 1'b0;
    g_base  = 0;
    if      (g_tx > X_POS) g_base = 2;
    else if (g_tx < X_POS) g_base = 2 + NLANES;
    else if (g_ty > Y_POS) g_base = 2 + 2 * NLANES;
    else if (g_ty < Y_POS) g_base = 2 + 3 * NLANES;
    else                   g_local = 1'b1;
    // first free lane of the direction
    g_lane_ok = 1'b0;
    g_lane    = '0;
    for (int k = NLANES - 1; k >= 0; k--) begin
      if (!obusy[g_base + k]) begin
        g_lane_ok = 1'b1;
        g_lane    = CW'(g_base + k);
      end
    end
    // session lookup at the destination port
    g_sess_ok = 1'b0;
    g_sess    = '0;
    for (int s = NSESS - 1; s >= 0; s--) begin
      if (g_first) begin
        if (!s_busy[g_tgt[0]][s]) begin
          g_sess_ok = 1'b1;
          g_sess    = SW'(s);
        end
      end else if (s_busy[g_tgt[0]][s] && s_open[g_tgt[0]][s] &&
                   s_orig[g_tgt[0]][s] == g_src) begin
        g_sess_ok = 1'b1;
        g_sess    = SW'(s);
      end
    end
  end

  // ------------------------------------------------------------------
  // State
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++) begin
        st[i]     <= I_IDLE;
        hdr0[i]   <= '0;
        hdr1[i]   <= '0;
        osel[i]   <= '0;
        fwd_q[i]  <= '0;
        resp_q[i] <= '0;
        sess_q[i] <= '0;
        oown[i]   <= '0;
      end
      obusy <= '0;
      rr    <= '0;
      for (int p = 0; p < 2; p++) begin
        s_busy[p] <= '0;
        s_open[p] <= '0;
        for (int s = 0; s < NSESS; s++) s_orig[p][s] <= '0;
      end
    end else begin
      // session release from the local buffers
      for (int p = 0; p < 2; p++) begin
        s_busy[p] <= s_busy[p] & ~sess_release[p];
        s_open[p] <= s_open[p] & ~sess_release[p];
      end

      for (int i = 0; i < NCH; i++) begin
        resp_q[i] <= '0;
        unique case (st[i])
          I_IDLE: begin
            fwd_q[i] <= '0;
            if (in_fwd[i].valid) begin
              hdr0[i] <= in_fwd[i].data;
              st[i]   <= I_HDR1;
            end
          end
          I_HDR1: begin
            if (in_fwd[i].valid) begin
              hdr1[i] <= in_fwd[i].data;
              st[i]   <= I_ROUTE;
            end
          end
          I_ROUTE: ;  // served by the arbiter below
          I_FWD1: begin
            fwd_q[i] <= '{valid: 1'b1, eop: 1'b0, data: hdr1[i]};
            st[i]    <= I_WAIT;
          end
          I_WAIT: begin
            fwd_q[i] <= '0;
            if (out_resp[osel[i]].ack) begin
              resp_q[i].ack <= 1'b1;
              st[i]         <= I_CONN;
            end else if (out_resp[osel[i]].nack) begin
              resp_q[i].nack  <= 1'b1;
              obusy[osel[i]]  <= 1'b0;
              st[i]           <= I_IDLE;
            end
          end
          I_CONN: begin
            fwd_q[i] <= in_fwd[i];
            if (in_fwd[i].valid && in_fwd[i].eop) st[i] <= I_DRAIN;
          end
          I_DRAIN: begin
            fwd_q[i]       <= '0;
            obusy[osel[i]] <= 1'b0;
            st[i]          <= I_IDLE;
          end
          default: st[i] <= I_IDLE;
        endcase
      end

      if (gnt_vld) begin
        rr <= (gnt == CW'(NCH - 1)) ? '0 : gnt + 1'b1;
        if (g_local) begin
          if (g_sess_ok && !obusy[CW'(g_tgt[0])]) begin
            obusy[CW'(g_tgt[0])]  <= 1'b1;
            oown[CW'(g_tgt[0])]   <= gnt;
            osel[gnt]        <= CW'(g_tgt[0]);
            sess_q[gnt]      <= g_sess;
            resp_q[gnt].ack  <= 1'b1;
            st[gnt]          <= I_CONN;
            if (g_first) begin
              // a new packet from this source closes its previous session
              for (int s = 0; s < NSESS; s++)
                if (s_orig[g_tgt[0]][s] == g_src) s_open[g_tgt[0]][s] <= 1'b0;
              s_busy[g_tgt[0]][g_sess] <= 1'b1;
              s_open[g_tgt[0]][g_sess] <= 1'b1;
              s_orig[g_tgt[0]][g_sess] <= g_src;
            end
          end else begin
            resp_q[gnt].nack <= 1'b1;
            st[gnt]          <= I_IDLE;
          end
        end else if (g_lane_ok) begin
          obusy[g_lane] <= 1'b1;
          oown[g_lane]  <= gnt;
          osel[gnt]     <= g_lane;
          fwd_q[gnt]    <= '{valid: 1'b1, eop: 1'b0, data: hdr0[gnt]};
          st[gnt]       <= I_FWD1;
        end else begin
          resp_q[gnt].nack <= 1'b1;
          st[gnt]          <= I_IDLE;
        end
      end
    end
  end

  // A lane must stay silent while its request is pending
  for (genvar i = 0; i < NCH; i++) begin : g_chk
    a_no_data_while_pending: assert property (@(posedge clk) disable iff (!rst_n)
      (st[i] == I_ROUTE || st[i] == I_WAIT || st[i] == I_FWD1) |-> !in_fwd[i].valid)
      else $error("router (%0d,%0d): byte on input %0d while its request is pending", X_POS, Y_POS, i);
  end

endmodule
