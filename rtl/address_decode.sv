// address_decode: turns the 8-bit destination address of a routing packet
// into the set of directions that lead towards the destination.
//
// The address holds two 4-bit coordinates. The upper nibble (x) and the
// lower nibble (y) of the destination are compared with the same nibbles of
// this node's own address by two 4-bit magnitude comparators:
//   dest x > node x -> route_to_direction_right
//   dest x < node x -> route_to_direction_left
//   dest y < node y -> route_to_direction_top
//   dest y > node y -> route_to_direction_bottom
//   dest  == node   -> route_to_direction_ip_core
// so a node at (2,2) asked for (3,3) asserts right and bottom. Which nibble
// is x and that y grows towards the bottom are this implementation's reading
// of that example.
//
// Purely combinational; the switching node registers its outputs.
module address_decode
  import ocn_pkg::*;
(
  input  logic [ADDR_W-1:0] node_addr,  // {x, y} of this switching node
  input  logic [ADDR_W-1:0] dest_addr,  // {x, y} from the routing packet
  output route_dir_t        dir         // possible routing directions
);

  logic [COORD_W-1:0] node_x, node_y, dest_x, dest_y;

  assign node_x = node_addr[ADDR_W-1 -: COORD_W];
  assign node_y = node_addr[COORD_W-1:0];
  assign dest_x = dest_addr[ADDR_W-1 -: COORD_W];
  assign dest_y = dest_addr[COORD_W-1:0];

  always_comb begin
    dir.right   = dest_x > node_x;
    dir.left    = dest_x < node_x;
    dir.top     = dest_y < node_y;
    dir.bottom  = dest_y > node_y;
    dir.ip_core = (dest_x == node_x) && (dest_y == node_y);
  end

endmodule
