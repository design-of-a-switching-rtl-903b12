// ocn_pkg: types and constants shared by the switching node and the mesh.
//
// A link between two switching nodes carries 19 wires in each direction:
// 16 data wires and one forward-control wire travel downstream, two
// reverse-control wires travel upstream (the link widths are the design's;
// the encodings below are this implementation's own choice).
//
// Forward control frames transmissions. A framed word (fwd_ctrl = 1) on an
// input that owns no circuit is a one-word routing request. On an input that
// owns a circuit, the payload is sent as one framed burst (fwd_ctrl = 1 on
// every payload word, no gaps), and the end of that frame (fwd_ctrl back to
// 0) is the cancel that releases the circuit node by node.
//
// Routing request word:  [7:4] destination x, [3:0] destination y,
//                        [15:8] local port index at the destination node
//                        (0 when the node has a single local IP port).
//
// Port numbering follows the order of the address decoder outputs:
// 0 right (east, +x), 1 left (west, -x), 2 top (north, -y),
// 3 bottom (south, +y), 4.. local IP ports.
package ocn_pkg;

  localparam int unsigned DATA_W     = 16;  // forward data wires per link
  localparam int unsigned ADDR_W     = 8;   // destination address field
  localparam int unsigned COORD_W    = 4;   // one coordinate (nibble)
  localparam int unsigned NUM_DIRS   = 4;   // mesh directions per node

  localparam int unsigned PORT_RIGHT  = 0;
  localparam int unsigned PORT_LEFT   = 1;
  localparam int unsigned PORT_TOP    = 2;
  localparam int unsigned PORT_BOTTOM = 3;
  localparam int unsigned PORT_LOCAL  = 4;  // first local IP port

  // Forward half of a link: framing wire plus data.
  typedef struct packed {
    logic              fwd_ctrl;
    logic [DATA_W-1:0] data;
  } fwd_link_t;

  localparam fwd_link_t FWD_IDLE = '{fwd_ctrl: 1'b0, data: '0};

  // Reverse control (2 wires): acknowledgements travelling to the source.
  typedef enum logic [1:0] {
    REV_NONE = 2'b00,
    REV_ACK  = 2'b01,
    REV_NACK = 2'b10
  } rev_ctrl_t;

  // Possible routing directions produced by the address decoder.
  typedef struct packed {
    logic ip_core;
    logic bottom;
    logic top;
    logic left;
    logic right;
  } route_dir_t;

  // Field helpers for a routing request word.
  function automatic logic [7:0] req_local_idx(logic [DATA_W-1:0] w);
    return w[15:8];
  endfunction

  function automatic logic [DATA_W-1:0] make_request(logic [COORD_W-1:0] x,
                                                     logic [COORD_W-1:0] y,
                                                     logic [7:0]         local_idx);
    return {local_idx, x, y};
  endfunction

endpackage
