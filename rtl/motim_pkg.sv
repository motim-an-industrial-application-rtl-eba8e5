// motim_pkg: types and constants shared by the MOTIM switch blocks.
//
// A MOTIM switch carries Ethernet packets between ports as fixed 128-byte
// cells over a circuit-switched mesh NoC. This package holds the cell layout
// (3 header bytes, 123 payload bytes, 2 trailer bytes), the flit carried on
// one NoC lane (8-bit data with valid and end-of-packet), the response bundle
// a lane carries backwards (ack/nack of a connection request) and the
// encodings of the cell payload-type field.
//
// Cell sizes, the 8-bit channel, m = 4 sessions and the 200-cycle retry are
// the document's numbers; the field encodings are this design's choice.
package motim_pkg;

  // Cell layout (bytes are numbered from 0)
  localparam int CELL_BYTES    = 128;
  localparam int CELL_PAYLOAD  = 123;
  localparam int CELL_HDR      = 3;                         // bytes 0..2
  localparam int CELL_TYPE_POS = CELL_HDR + CELL_PAYLOAD;   // byte 126
  localparam int CELL_CSN_POS  = CELL_BYTES - 1;            // byte 127

  // Value placed in the 7-bit cell-type field of byte 0 (data cell)
  localparam logic [6:0] CELL_TYPE_DATA = 7'h01;

  // Payload type, bits [7:6] of byte 126; bit 5 is the cell error flag
  typedef enum logic [1:0] {
    PT_MIDDLE = 2'b00,
    PT_FIRST  = 2'b01,
    PT_LAST   = 2'b10,
    PT_SINGLE = 2'b11     // packet fits in one cell: first and last
  } ptype_e;

  // One lane of a NoC link in the forward direction
  typedef struct packed {
    logic       valid;
    logic       eop;
    logic [7:0] data;
  } flit_t;

  // The same lane in the backward direction: result of a connection request
  typedef struct packed {
    logic ack;
    logic nack;
  } resp_t;

  localparam int RETRY_CYCLES = 200;

  // Local ports that carry Ethernet traffic: every port of a router that is
  // not on the main diagonal (x == y); the diagonal routers are reserved for
  // the control processor, bulk memory and supervision blocks.
  function automatic logic [127:0] data_port_mask(input int mesh_x, input int mesh_y);
    logic [127:0] m;
    m = '0;
    for (int r = 0; r < mesh_x * mesh_y; r++)
      if ((r % mesh_x) != (r / mesh_x)) begin
        m[2*r]   = 1'b1;
        m[2*r+1] = 1'b1;
      end
    return m;
  endfunction

endpackage
