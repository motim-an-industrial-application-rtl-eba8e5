// motim_top: a MOTIM Ethernet switch core: 24 Fast Ethernet ports joined by
// a 4x4 mesh network on chip.
//
// What it does: every data port owns a chain MAC - PC - NI attached to one
// local port of the NoC. An Ethernet packet entering a port is cut into
// 128-byte cells by its PC (motim_pc), routed by its NI (motim_ni) using the
// learned MAC address table, sent cell by cell over circuits set up in the
// NoC (motim_noc), collected in a session buffer of the destination PC and
// sent out of that port's MAC once complete. Several sources may send to one
// destination at the same time, each into its own session buffer.
//
// Ports: local port LP = 2*router + port, router r at x = r % MESH_X,
// y = r / MESH_X. DATA_MASK selects the ports that get a PC and an NI; by
// default these are the 24 ports of the 12 routers off the main diagonal.
// For a data port, the mac_* ports are the byte streams to and from its MAC
// (the MAC itself is outside this design): mac_rx_* carries a received
// Ethernet frame (destination address first, one byte per valid, eop on the
// last), mac_tx_* a frame to transmit, one byte per cycle with mac_tx_ready.
// For the other ports (default: the 8 ports of the diagonal routers, meant for
// a control processor, bulk memory and system supervision) the NoC local port
// itself is brought out on the sp_* ports; the mac_* outputs of such a port
// are 0 and its mac_* inputs are unused, and vice versa for data ports.
// ev_* outputs pulse once per event of each port, for monitoring.
//
// The structure, port count, 4x4 mesh, two ports per router, n = 2 lanes,
// m = 4 sessions and p = 256 table entries follow the document; the MAC
// byte-stream interface and the event outputs are this design's own.
module motim_top import motim_pkg::*; #(
  parameter int MESH_X = 4,
  parameter int MESH_Y = 4,
  parameter int NLANES = 2,
  parameter int NSESS  = 4,
  parameter int P      = 256,
  parameter int NCELLS = 16,
  parameter int BUF_BYTES = 2048,
  localparam int NLP   = 2 * MESH_X * MESH_Y,
  localparam int LP_W  = $clog2(NLP),
  localparam int SW    = (NSESS > 1) ? $clog2(NSESS) : 1,
  parameter logic [NLP-1:0] DATA_MASK = NLP'(data_port_mask(MESH_X, MESH_Y))
) (
  input  logic              clk,
  input  logic              rst_n,
  // data ports: MAC byte streams
  input  logic [7:0]        pkt_priority [NLP],
  input  logic              mac_rx_valid [NLP],
  input  logic [7:0]        mac_rx_data  [NLP],
  input  logic              mac_rx_eop   [NLP],
  output logic              mac_tx_valid [NLP],
  output logic [7:0]        mac_tx_data  [NLP],
  output logic              mac_tx_eop   [NLP],
  input  logic              mac_tx_ready [NLP],
  // special ports: raw NoC local ports
  input  flit_t             sp_in        [NLP],
  output logic              sp_credit    [NLP],
  output resp_t             sp_resp      [NLP],
  output flit_t             sp_out       [NLP],
  output logic [SW-1:0]     sp_session   [NLP],
  input  logic [NSESS-1:0]  sp_release   [NLP],
  // events
  output logic              ev_nack      [NLP],
  output logic              ev_bcast     [NLP],
  output logic              ev_hit       [NLP],
  output logic              ev_overflow  [NLP],
  output logic              ev_dropped   [NLP],
  output logic              ev_discarded [NLP]
);

  flit_t             lp_in      [NLP];
  logic              lp_credit  [NLP];
  resp_t             lp_resp    [NLP];
  flit_t             lp_out     [NLP];
  logic [SW-1:0]     lp_session [NLP];
  logic [NSESS-1:0]  lp_release [NLP];

  motim_noc #(
    .MESH_X(MESH_X), .MESH_Y(MESH_Y), .NLANES(NLANES), .NSESS(NSESS)
  ) u_noc (
    .clk, .rst_n,
    .lp_in, .lp_credit, .lp_resp, .lp_out, .lp_session, .lp_release
  );

  for (genvar i = 0; i < NLP; i++) begin : g_lp
    if (DATA_MASK[i]) begin : g_data
      logic              ni_rx, ni_offset, ni_credit, ni_error;
      logic [7:0]        ni_data;
      logic              cell_tx, cell_eop;
      logic [7:0]        cell_data;
      logic [SW-1:0]     cell_session;
      logic [NSESS-1:0]  rel;

      motim_pc #(
        .LP_W(LP_W), .NSESS(NSESS), .BUF_BYTES(BUF_BYTES), .MY_LP(LP_W'(i))
      ) u_pc (
        .clk, .rst_n,
        .pkt_priority (pkt_priority[i]),
        .mac_rx_valid (mac_rx_valid[i]),
        .mac_rx_data  (mac_rx_data[i]),
        .mac_rx_eop   (mac_rx_eop[i]),
        .ni_rx, .ni_data, .ni_offset, .ni_credit, .ni_error,
        .cell_tx, .cell_data, .cell_eop, .cell_session,
        .sess_release (rel),
        .mac_tx_valid (mac_tx_valid[i]),
        .mac_tx_data  (mac_tx_data[i]),
        .mac_tx_eop   (mac_tx_eop[i]),
        .mac_tx_ready (mac_tx_ready[i]),
        .pkt_dropped  (ev_dropped[i]),
        .pkt_discarded(ev_discarded[i])
      );

      motim_ni #(
        .LP_W(LP_W), .NLP(NLP), .MY_LP(LP_W'(i)), .BCAST_MASK(DATA_MASK),
        .NSESS(NSESS), .P(P), .NCELLS(NCELLS)
      ) u_ni (
        .clk, .rst_n,
        .pc_rx (ni_rx), .pc_data (ni_data), .pc_offset (ni_offset),
        .pc_credit (ni_credit), .pc_error (ni_error),
        .cell_tx, .cell_data, .cell_eop, .cell_session,
        .pc_release (rel),
        .noc_in      (lp_in[i]),
        .noc_credit  (lp_credit[i]),
        .noc_resp    (lp_resp[i]),
        .noc_out     (lp_out[i]),
        .noc_session (lp_session[i]),
        .noc_release (lp_release[i]),
        .ev_nack     (ev_nack[i]),
        .ev_bcast    (ev_bcast[i]),
        .ev_hit      (ev_hit[i]),
        .ev_overflow (ev_overflow[i])
      );

      assign sp_credit[i]  = 1'b0;
      assign sp_resp[i]    = '0;
      assign sp_out[i]     = '0;
      assign sp_session[i] = '0;
    end else begin : g_special
      assign lp_in[i]        = sp_in[i];
      assign sp_credit[i]    = lp_credit[i];
      assign sp_resp[i]      = lp_resp[i];
      assign sp_out[i]       = lp_out[i];
      assign sp_session[i]   = lp_session[i];
      assign lp_release[i]   = sp_release[i];
      assign mac_tx_valid[i] = 1'b0;
      assign mac_tx_data[i]  = '0;
      assign mac_tx_eop[i]   = 1'b0;
      assign ev_nack[i]      = 1'b0;
      assign ev_bcast[i]     = 1'b0;
      assign ev_hit[i]       = 1'b0;
      assign ev_overflow[i]  = 1'b0;
      assign ev_dropped[i]   = 1'b0;
      assign ev_discarded[i] = 1'b0;
    end
  end

endmodule
