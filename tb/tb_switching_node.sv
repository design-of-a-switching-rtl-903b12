// tb_switching_node: drives a 5-port switching node at mesh position (1,1)
// through the whole circuit life cycle and checks the cycle timing:
//   - a routing request leaves on the chosen output 6 cycles after it
//     arrived (request buffering and route selection);
//   - ACK and NACK cross the node in 1 cycle, payload words in 1 cycle;
//   - x direction first, y direction when x is locked, NACK (5 cycles after
//     the request) when all directions towards the destination are locked;
//   - two requests arriving together are served in input-priority order;
//   - a NACK from the destination, and the end of the payload frame (the
//     cancel), release the output for the next request.
// Cycle n is the n-th rising clock edge: a word driven "in cycle n" is
// sampled by the node at edge n, and an output seen "in cycle n" is what
// the next node would sample at edge n.
module tb_switching_node;
  import ocn_pkg::*;

  localparam int unsigned N = 5;

  int checks   = 0;
  int failures = 0;

  logic      clk = 1'b0;
  logic      rst_n;
  fwd_link_t link_in  [N];
  rev_ctrl_t rev_out  [N];
  fwd_link_t link_out [N];
  rev_ctrl_t rev_in   [N];

  switching_node #(.N(N), .NODE_ADDR(8'h11)) dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;  // number of the next rising edge

  // what left the node: the cycle of each framed word and reverse signal
  int        fwd_cyc  [N][$];
  fwd_link_t fwd_word [N][$];
  int        rev_cyc  [N][$];
  rev_ctrl_t rev_val  [N][$];
  fwd_link_t last_out [N];

  always @(posedge clk) begin
    for (int p = 0; p < N; p++) begin
      last_out[p] = link_out[p];
      if (rst_n && link_out[p].fwd_ctrl) begin
        fwd_cyc[p].push_back(cyc);
        fwd_word[p].push_back(link_out[p]);
      end
      if (rst_n && rev_out[p] != REV_NONE) begin
        rev_cyc[p].push_back(cyc);
        rev_val[p].push_back(rev_out[p]);
      end
    end
    cyc++;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // Drive one word on an input for one cycle; return its cycle number.
  task automatic put(int p, logic fc, logic [DATA_W-1:0] d, output int at);
    @(negedge clk);
    link_in[p] = '{fwd_ctrl: fc, data: d};
    at = cyc;
    @(negedge clk);
    link_in[p] = FWD_IDLE;
  endtask

  task automatic rev(int p, rev_ctrl_t r, output int at);
    @(negedge clk);
    rev_in[p] = r;
    at = cyc;
    @(negedge clk);
    rev_in[p] = REV_NONE;
  endtask

  task automatic settle(int n);
    repeat (n) @(negedge clk);
  endtask

  // The next framed word on output o must be `d` in cycle `at`.
  task automatic expect_fwd(int o, logic [DATA_W-1:0] d, int at, string what);
    chk(fwd_cyc[o].size() > 0, {what, ": nothing on output"});
    if (fwd_cyc[o].size() > 0) begin
      int c = fwd_cyc[o].pop_front();
      fwd_link_t w = fwd_word[o].pop_front();
      checks++;
      if (c != at || w.data != d) begin
        failures++;
        $display("FAIL %s: output %0d got %h in cycle %0d, expected %h in cycle %0d",
                 what, o, w.data, c, d, at);
      end
    end
  endtask

  task automatic expect_rev(int i, rev_ctrl_t r, int at, string what);
    chk(rev_cyc[i].size() > 0, {what, ": no reverse control"});
    if (rev_cyc[i].size() > 0) begin
      int c = rev_cyc[i].pop_front();
      rev_ctrl_t v = rev_val[i].pop_front();
      checks++;
      if (c != at || v != r) begin
        failures++;
        $display("FAIL %s: input %0d got %s in cycle %0d, expected %s in cycle %0d",
                 what, i, v.name(), c, r.name(), at);
      end
    end
  endtask

  task automatic expect_quiet(string what);
    for (int p = 0; p < N; p++) begin
      checks++;
      if (fwd_cyc[p].size() != 0 || rev_cyc[p].size() != 0) begin
        failures++;
        $display("FAIL %s: unexpected traffic at port %0d", what, p);
        fwd_cyc[p].delete(); fwd_word[p].delete();
        rev_cyc[p].delete(); rev_val[p].delete();
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, t2, u;
    logic [DATA_W-1:0] rq;
    rst_n = 1'b0;
    for (int p = 0; p < N; p++) begin
      link_in[p] = FWD_IDLE;
      rev_in[p]  = REV_NONE;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    settle(2);

    // A: local IP (port 4) requests (2,2): right and bottom lead there
    rq = make_request(4'd2, 4'd2, 8'd0);
    put(PORT_LOCAL, 1'b1, rq, t);
    settle(8);
    expect_fwd(PORT_RIGHT, rq, t + 6, "A request latency 6 on first choice");
    expect_quiet("A");

    // B: the destination acknowledges; the ACK crosses in one cycle
    rev(PORT_RIGHT, REV_ACK, u);
    settle(2);
    expect_rev(PORT_LOCAL, REV_ACK, u + 1, "B ACK latency 1");

    // D: a request from the left (travelling east) to (2,2): right is
    //    locked, bottom is the second choice
    put(PORT_LEFT, 1'b1, rq, t);
    settle(8);
    expect_fwd(PORT_BOTTOM, rq, t + 6, "D second choice, latency 6");
    expect_quiet("D");

    // E: a request from the top to (2,1): only right leads there, locked
    put(PORT_TOP, 1'b1, make_request(4'd2, 4'd1, 8'd0), t);
    settle(8);
    expect_rev(PORT_TOP, REV_NACK, t + 5, "E NACK from a blocked switch");
    expect_quiet("E");

    // C: payload frame of 8 words, one cycle through the node; the end of
    //    the frame is the cancel, forwarded one cycle later
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      link_in[PORT_LOCAL] = '{fwd_ctrl: 1'b1, data: 16'hD000 + 16'(k)};
      if (k == 0) t = cyc;
    end
    @(negedge clk); link_in[PORT_LOCAL] = FWD_IDLE;
    settle(3);
    for (int k = 0; k < 8; k++)
      expect_fwd(PORT_RIGHT, 16'hD000 + 16'(k), t + k + 1, "C payload delayed one cycle");
    chk(last_out[PORT_RIGHT] == FWD_IDLE, "C frame ended on the output");
    expect_quiet("C");

    // F: the cancel has freed the right port
    put(PORT_TOP, 1'b1, make_request(4'd2, 4'd1, 8'd0), t);
    settle(8);
    expect_fwd(PORT_RIGHT, make_request(4'd2, 4'd1, 8'd0), t + 6, "F right free again");
    // the bottom circuit of D: its destination refuses, NACK frees bottom
    rev(PORT_BOTTOM, REV_NACK, u);
    settle(2);
    expect_rev(PORT_LEFT, REV_NACK, u + 1, "F destination NACK passed back");
    rev(PORT_RIGHT, REV_NACK, u);
    settle(2);
    expect_rev(PORT_TOP, REV_NACK, u + 1, "F second NACK passed back");
    expect_quiet("F end");

    // G: two requests in the same cycle, from right (port 0) and bottom
    //    (port 3); port 0 has priority and port 3 waits for the pipeline
    @(negedge clk);
    link_in[PORT_RIGHT]  = '{fwd_ctrl: 1'b1, data: make_request(4'd0, 4'd1, 8'd0)};
    link_in[PORT_BOTTOM] = '{fwd_ctrl: 1'b1, data: make_request(4'd1, 4'd0, 8'd0)};
    t = cyc;
    @(negedge clk);
    link_in[PORT_RIGHT]  = FWD_IDLE;
    link_in[PORT_BOTTOM] = FWD_IDLE;
    settle(14);
    expect_fwd(PORT_LEFT, make_request(4'd0, 4'd1, 8'd0), t + 6, "G priority input first");
    expect_fwd(PORT_TOP,  make_request(4'd1, 4'd0, 8'd0), t + 10, "G lower priority after");
    expect_quiet("G");

    // H: a request for this node's own IP block goes to the local port;
    //    a request for a local port that does not exist is refused
    put(PORT_LEFT, 1'b1, make_request(4'd1, 4'd1, 8'd0), t);
    settle(8);
    expect_fwd(PORT_LOCAL, make_request(4'd1, 4'd1, 8'd0), t + 6, "H local delivery");
    put(PORT_TOP, 1'b1, make_request(4'd1, 4'd1, 8'd0), t2);
    settle(8);
    expect_rev(PORT_TOP, REV_NACK, t2 + 5, "H local port busy");
    put(PORT_LOCAL, 1'b1, make_request(4'd1, 4'd1, 8'd3), t2);
    settle(8);
    expect_rev(PORT_LOCAL, REV_NACK, t2 + 5, "H no such local port");
    expect_quiet("H");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
