// ocn_mesh: a ROWS x COLS two-dimensional mesh on-chip network of
// switching nodes (2 x 2 by default, the arrangement of the design's
// example network).
//
// Every node uses four ports for its neighbours (right, left, top, bottom)
// and NUM_LOCAL ports for the IP blocks attached to it. Node (x, y) sits in
// column x and row y, row 0 at the top, and its address is {x, y} in two
// nibbles, so the address decoder in each node sends a request right when
// the destination column is larger and down when the destination row is
// larger. Each neighbour link carries 16 data wires and one forward-control
// wire one way and two reverse-control wires back.
//
// The local ports are brought out; the wrappers that adapt an IP block to
// them (protocol, width, clock domain) are not part of this module. Links
// that would leave the mesh edge carry nothing inwards, and the reverse
// control of an edge output is tied to NACK, so a request addressed outside
// the mesh is refused instead of hanging; that edge rule is this
// implementation's own choice.
//
// Local port k of node (x, y) is element (y * COLS + x) * NUM_LOCAL + k of
// the loc_* arrays. The whole mesh runs on one clock, clk; the design's
// mesochronous link retiming is modelled as the single register that each
// node places on every hop.
module ocn_mesh
  import ocn_pkg::*;
#(
  parameter int unsigned  ROWS      = 2,  // rows of nodes (y), at most 16
  parameter int unsigned  COLS      = 2,  // columns of nodes (x), at most 16
  parameter int unsigned  NUM_LOCAL = 1,  // local IP ports per node
  localparam int unsigned NODES     = ROWS * COLS,
  localparam int unsigned NLOC      = NODES * NUM_LOCAL,
  localparam int unsigned N         = NUM_DIRS + NUM_LOCAL
) (
  input  logic      clk,
  input  logic      rst_n,
  input  fwd_link_t loc_in      [NLOC],  // from each IP wrapper
  output rev_ctrl_t loc_rev_out [NLOC],  // ACK / NACK to each IP wrapper
  output fwd_link_t loc_out     [NLOC],  // to each IP wrapper
  input  rev_ctrl_t loc_rev_in  [NLOC]   // ACK / NACK from each IP wrapper
);

  fwd_link_t nin     [NODES][N];
  rev_ctrl_t nrevout [NODES][N];
  fwd_link_t nout    [NODES][N];
  rev_ctrl_t nrevin  [NODES][N];

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      localparam int unsigned          n    = y * COLS + x;
      localparam logic [ADDR_W-1:0]    ADDR = {COORD_W'(x), COORD_W'(y)};

      switching_node #(.N(N), .NODE_ADDR(ADDR)) u_node (
        .clk      (clk),
        .rst_n    (rst_n),
        .link_in  (nin[n]),
        .rev_out  (nrevout[n]),
        .link_out (nout[n]),
        .rev_in   (nrevin[n])
      );

      // right neighbour: its left port
      if (x + 1 < COLS) begin : g_r
        assign nin[n][PORT_RIGHT]    = nout[n+1][PORT_LEFT];
        assign nrevin[n][PORT_RIGHT] = nrevout[n+1][PORT_LEFT];
      end else begin : g_r_edge
        assign nin[n][PORT_RIGHT]    = FWD_IDLE;
        assign nrevin[n][PORT_RIGHT] = REV_NACK;
      end
      // left neighbour: its right port
      if (x > 0) begin : g_l
        assign nin[n][PORT_LEFT]    = nout[n-1][PORT_RIGHT];
        assign nrevin[n][PORT_LEFT] = nrevout[n-1][PORT_RIGHT];
      end else begin : g_l_edge
        assign nin[n][PORT_LEFT]    = FWD_IDLE;
        assign nrevin[n][PORT_LEFT] = REV_NACK;
      end
      // top neighbour (row above): its bottom port
      if (y > 0) begin : g_t
        assign nin[n][PORT_TOP]    = nout[n-COLS][PORT_BOTTOM];
        assign nrevin[n][PORT_TOP] = nrevout[n-COLS][PORT_BOTTOM];
      end else begin : g_t_edge
        assign nin[n][PORT_TOP]    = FWD_IDLE;
        assign nrevin[n][PORT_TOP] = REV_NACK;
      end
      // bottom neighbour (row below): its top port
      if (y + 1 < ROWS) begin : g_b
        assign nin[n][PORT_BOTTOM]    = nout[n+COLS][PORT_TOP];
        assign nrevin[n][PORT_BOTTOM] = nrevout[n+COLS][PORT_TOP];
      end else begin : g_b_edge
        assign nin[n][PORT_BOTTOM]    = FWD_IDLE;
        assign nrevin[n][PORT_BOTTOM] = REV_NACK;
      end
      // local IP ports
      for (genvar k = 0; k < NUM_LOCAL; k++) begin : g_loc
        assign nin[n][PORT_LOCAL+k]          = loc_in[n*NUM_LOCAL+k];
        assign nrevin[n][PORT_LOCAL+k]       = loc_rev_in[n*NUM_LOCAL+k];
        assign loc_out[n*NUM_LOCAL+k]        = nout[n][PORT_LOCAL+k];
        assign loc_rev_out[n*NUM_LOCAL+k]    = nrevout[n][PORT_LOCAL+k];
      end
    end
  end

endmodule
