// tb_switching_node_ports: switching nodes with more than five ports, as in
// the port-count sweep of the original design (M = 5, 6, 7). Extra ports
// are local IP ports 5.. . For each size, a request from the left
// neighbour addressed to this node reaches every local port named by its
// index in 6 cycles, a request between two local ports of the same node
// works while the first circuit is held, and an index beyond the last local
// port is refused with NACK in 5 cycles.
module tb_switching_node_ports;
  import ocn_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one node per size; each is driven by its own test process
  for (genvar g = 0; g < 3; g++) begin : g_size
    localparam int unsigned N = 5 + g;

    fwd_link_t link_in  [N];
    rev_ctrl_t rev_out  [N];
    fwd_link_t link_out [N];
    rev_ctrl_t rev_in   [N];
    logic      done = 1'b0;

    switching_node #(.N(N), .NODE_ADDR(8'h23)) dut (
      .clk, .rst_n, .link_in, .rev_out, .link_out, .rev_in);

    // Send a request on input p in one cycle; report the cycle it was
    // sampled and the cycle at which output o / reverse wire p answered.
    task automatic request(int p, logic [DATA_W-1:0] w, int o, output int lat,
                           output rev_ctrl_t r);
      int t;
      @(negedge clk);
      link_in[p] = '{fwd_ctrl: 1'b1, data: w};
      t = cyc;
      @(negedge clk);
      link_in[p] = FWD_IDLE;
      lat = -1;
      r   = REV_NONE;
      for (int k = 0; k < 10 && lat < 0; k++) begin
        @(posedge clk);
        if (o >= 0 && link_out[o].fwd_ctrl && link_out[o].data == w) lat = cyc - t;
        if (rev_out[p] != REV_NONE) begin
          r   = rev_out[p];
          lat = cyc - t;
        end
      end
      @(negedge clk);
    endtask

    initial begin
      int lat;
      rev_ctrl_t r;
      for (int p = 0; p < N; p++) begin
        link_in[p] = FWD_IDLE;
        rev_in[p]  = REV_NONE;
      end
      @(posedge rst_n);
      repeat (2) @(negedge clk);
      for (int k = 0; k < int'(N) - 4; k++) begin
        // from the left neighbour to local port 4+k, then refused
        request(PORT_LEFT, make_request(4'd2, 4'd3, 8'(k)), PORT_LOCAL + k, lat, r);
        chk(lat == 6 && r == REV_NONE, $sformatf("N=%0d local %0d reached in 6 cycles", N, k));
        @(negedge clk) rev_in[PORT_LOCAL + k] = REV_NACK;
        @(negedge clk) rev_in[PORT_LOCAL + k] = REV_NONE;
        repeat (2) @(negedge clk);
      end
      // local port 4 holds a circuit to the last local port
      request(PORT_LOCAL, make_request(4'd2, 4'd3, 8'(N - 5)), N - 1, lat, r);
      chk(lat == 6, $sformatf("N=%0d local to local", N));
      // the left neighbour asks for the same port: refused, busy
      request(PORT_LEFT, make_request(4'd2, 4'd3, 8'(N - 5)), -1, lat, r);
      chk(lat == 5 && r == REV_NACK, $sformatf("N=%0d busy local port refused", N));
      // an index past the last local port: refused
      request(PORT_TOP, make_request(4'd2, 4'd3, 8'(N - 4)), -1, lat, r);
      chk(lat == 5 && r == REV_NACK, $sformatf("N=%0d missing local port refused", N));
      // the neighbours are still routed as before
      request(PORT_TOP, make_request(4'd0, 4'd3, 8'd0), PORT_LEFT, lat, r);
      chk(lat == 6, $sformatf("N=%0d top to left", N));
      done = 1'b1;
    end
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (g_size[0].done && g_size[1].done && g_size[2].done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
