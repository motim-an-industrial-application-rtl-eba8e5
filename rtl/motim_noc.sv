// motim_noc: the MOTIM switch fabric, a MESH_X x MESH_Y mesh of routers.
//
// What it does: it carries cells between its 2*MESH_X*MESH_Y local ports.
// Local port number LP = 2*router + port; router r sits at x = r % MESH_X,
// y = r / MESH_X. Every mesh link holds NLANES lanes in each direction
// (space division multiplexing), so NLANES circuits may share a link.
//
// How it works: it only wires motim_router instances together. Lane k of a
// router's east output drives lane k of the west input of its east
// neighbour, and likewise north (y+1) and south. Unused border lanes are
// tied off: a request routed off the mesh cannot happen with XY routing.
//
// Interface, per local port: lp_in (2-byte connection request, then the cell,
// last byte marked eop), lp_credit (may send), lp_resp (ack/nack for the
// request); lp_out (the delivered cell), lp_session (its session number) and
// lp_release (one bit per session, frees the session entry).
//
// Timing: see motim_router. A cell crossing h routers arrives h cycles after
// it is sent; a request is answered after about 4 cycles per router.
//
// The 4x4 mesh, two local ports per router and n = 2 lanes are the
// document's; the wiring conventions are this design's.
module motim_noc import motim_pkg::*; #(
  parameter int MESH_X = 4,
  parameter int MESH_Y = 4,
  parameter int NLANES = 2,
  parameter int NSESS  = 4,
  localparam int NLP   = 2 * MESH_X * MESH_Y,
  localparam int SW    = (NSESS > 1) ? $clog2(NSESS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  flit_t             lp_in      [NLP],
  output logic              lp_credit  [NLP],
  output resp_t             lp_resp    [NLP],
  output flit_t             lp_out     [NLP],
  output logic [SW-1:0]     lp_session [NLP],
  input  logic [NSESS-1:0]  lp_release [NLP]
);

  localparam int NR  = MESH_X * MESH_Y;
  localparam int NCH = 2 + 4 * NLANES;
  localparam int EB  = 2;
  localparam int WB  = 2 + NLANES;
  localparam int NB  = 2 + 2 * NLANES;
  localparam int SB  = 2 + 3 * NLANES;

  flit_t rin_fwd  [NR][NCH];
  resp_t rin_resp [NR][NCH];
  flit_t rout_fwd [NR][NCH];
  resp_t rout_resp[NR][NCH];

  for (genvar r = 0; r < NR; r++) begin : g_r
    localparam int X = r % MESH_X;
    localparam int Y = r / MESH_X;
    logic [1:0]         credit;
    logic [SW-1:0]      sess [2];
    logic [NSESS-1:0]   rel  [2];

    motim_router #(
      .X_POS(X), .Y_POS(Y), .MESH_X(MESH_X), .MESH_Y(MESH_Y),
      .NLANES(NLANES), .NSESS(NSESS)
    ) u_router (
      .clk, .rst_n,
      .in_fwd       (rin_fwd[r]),
      .in_resp      (rin_resp[r]),
      .out_fwd      (rout_fwd[r]),
      .out_resp     (rout_resp[r]),
      .local_credit (credit),
      .local_session(sess),
      .sess_release (rel)
    );

    for (genvar p = 0; p < 2; p++) begin : g_lp
      assign rin_fwd[r][p]       = lp_in[2*r+p];
      assign lp_resp[2*r+p]      = rin_resp[r][p];
      assign lp_credit[2*r+p]    = credit[p];
      assign lp_out[2*r+p]       = rout_fwd[r][p];
      assign lp_session[2*r+p]   = sess[p];
      assign rout_resp[r][p]     = '0;
      assign rel[p]              = lp_release[2*r+p];
    end

    for (genvar k = 0; k < NLANES; k++) begin : g_lane
      // inputs from the neighbours, and the responses our outputs receive
      if (X < MESH_X - 1) begin : g_e
        assign rin_fwd[r][EB+k]   = rout_fwd[r+1][WB+k];
        assign rout_resp[r][EB+k] = rin_resp[r+1][WB+k];
      end else begin : g_e0
        assign rin_fwd[r][EB+k]   = '0;
        assign rout_resp[r][EB+k] = '0;
      end
      if (X > 0) begin : g_w
        assign rin_fwd[r][WB+k]   = rout_fwd[r-1][EB+k];
        assign rout_resp[r][WB+k] = rin_resp[r-1][EB+k];
      end else begin : g_w0
        assign rin_fwd[r][WB+k]   = '0;
        assign rout_resp[r][WB+k] = '0;
      end
      if (Y < MESH_Y - 1) begin : g_n
        assign rin_fwd[r][NB+k]   = rout_fwd[r+MESH_X][SB+k];
        assign rout_resp[r][NB+k] = rin_resp[r+MESH_X][SB+k];
      end else begin : g_n0
        assign rin_fwd[r][NB+k]   = '0;
        assign rout_resp[r][NB+k] = '0;
      end
      if (Y > 0) begin : g_s
        assign rin_fwd[r][SB+k]   = rout_fwd[r-MESH_X][NB+k];
        assign rout_resp[r][SB+k] = rin_resp[r-MESH_X][NB+k];
      end else begin : g_s0
        assign rin_fwd[r][SB+k]   = '0;
        assign rout_resp[r][SB+k] = '0;
      end
    end
  end

endmodule
