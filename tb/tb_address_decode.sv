// tb_address_decode: exhaustive check of the address decoder. For several
// node addresses, including the (2,2) node of the design's example, all 256
// destination addresses are applied and the five direction outputs are
// compared with a reference computed from the two coordinates. The example
// (node (2,2), destination (3,3) -> right and bottom) is checked by name.
module tb_address_decode;
  import ocn_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic [7:0] node_addr, dest_addr;
  route_dir_t dir;

  address_decode dut (.node_addr(node_addr), .dest_addr(dest_addr), .dir(dir));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nodes[5] = '{8'h22, 8'h00, 8'hFF, 8'h31, 8'h7C};
    // the design's example
    node_addr = 8'h22; dest_addr = 8'h33; #1;
    checks++;
    if (!(dir.right && dir.bottom && !dir.left && !dir.top && !dir.ip_core)) begin
      failures++;
      $display("FAIL example (2,2)->(3,3): dir=%b", dir);
    end
    foreach (nodes[k]) begin
      for (int d = 0; d < 256; d++) begin
        int nx, ny, dx, dy;
        route_dir_t e;
        node_addr = 8'(nodes[k]);
        dest_addr = 8'(d);
        nx = nodes[k] / 16; ny = nodes[k] % 16;
        dx = d / 16;        dy = d % 16;
        e.right   = dx > nx;
        e.left    = dx < nx;
        e.top     = dy < ny;
        e.bottom  = dy > ny;
        e.ip_core = (dx == nx) && (dy == ny);
        #1;
        checks++;
        if (dir !== e) begin
          failures++;
          $display("FAIL node=%h dest=%h dir=%b expected=%b", node_addr, dest_addr, dir, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
