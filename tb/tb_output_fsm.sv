// tb_output_fsm: checks one output FSM of a 5-port node. It must drive the
// routing packet framed by forward control one cycle after send, then copy
// the owning input (and only that input) to the output with one cycle of
// delay, flag the end of the owner's payload frame (the cancel) with
// cancel_seen in the cycle it arrives, forward it and fall idle, and also fall idle when the arbiter
// drops the lock.
module tb_output_fsm;
  import ocn_pkg::*;

  localparam int unsigned N = 5;

  int checks   = 0;
  int failures = 0;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              send;
  logic [DATA_W-1:0] send_pkt;
  logic              locked;
  logic [2:0]        owner;
  fwd_link_t         link_in [N];
  logic              cancel_seen;
  fwd_link_t         link_out;

  output_fsm #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_out(logic fc, logic [DATA_W-1:0] d, string what);
    checks++;
    if (link_out.fwd_ctrl !== fc || link_out.data !== d) begin
      failures++;
      $display("FAIL %s: out=%b/%h expected %b/%h", what, link_out.fwd_ctrl,
               link_out.data, fc, d);
    end
  endtask

  task automatic expect_cancel(logic c, string what);
    checks++;
    if (cancel_seen !== c) begin
      failures++;
      $display("FAIL %s: cancel_seen=%b expected %b", what, cancel_seen, c);
    end
  endtask

  // every input carries a recognisable word
  task automatic fill_inputs(int cyc);
    for (int i = 0; i < N; i++) link_in[i] = '{fwd_ctrl: 1'b0, data: 16'(i * 16'h1000 + cyc)};
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; send = 1'b0; send_pkt = '0; locked = 1'b0; owner = '0;
    fill_inputs(0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    @(negedge clk); fill_inputs(1);
    @(posedge clk); #1 expect_out(1'b0, 16'h0, "idle output while free");

    // arbiter grants this output to input 2 and sends the request
    @(negedge clk); send = 1'b1; send_pkt = 16'h0033; locked = 1'b1; owner = 3'd2;
    #1 expect_cancel(1'b0, "no cancel during send");
    @(posedge clk); #1 expect_out(1'b1, 16'h0033, "request forwarded one cycle after send");
    @(negedge clk); send = 1'b0;

    // idle words from input 2 before its payload are passed, no cancel
    @(negedge clk); fill_inputs(2);
    #1 expect_cancel(1'b0, "no cancel before the frame");
    @(posedge clk); #1 expect_out(1'b0, 16'h2002, "idle word from owner");

    // payload frame from input 2 passes with one cycle of delay
    for (int c = 3; c < 12; c++) begin
      @(negedge clk); fill_inputs(c); link_in[2].fwd_ctrl = 1'b1;
      #1 expect_cancel(1'b0, "no cancel inside the frame");
      @(posedge clk); #1 expect_out(1'b1, 16'(2 * 16'h1000 + c), "payload from owner");
    end

    // a framed word on another input does not reach this output
    @(negedge clk); fill_inputs(20); link_in[2].fwd_ctrl = 1'b1; link_in[1].fwd_ctrl = 1'b1;
    #1 expect_cancel(1'b0, "other input's framed word");
    @(posedge clk); #1 expect_out(1'b1, 16'h2014, "owner still forwarded");

    // end of the owner's frame: the cancel
    @(negedge clk); fill_inputs(21);
    #1 expect_cancel(1'b1, "cancel seen at the end of the frame");
    @(posedge clk); #1 expect_out(1'b0, 16'h2015, "cancel forwarded");
    @(negedge clk); fill_inputs(22); link_in[2].fwd_ctrl = 1'b1;  // lock cleared a cycle late
    #1 expect_cancel(1'b0, "cancel seen only once");
    @(posedge clk); #1 expect_out(1'b0, 16'h0, "idle after cancel");
    @(negedge clk); locked = 1'b0;
    @(posedge clk); #1 expect_out(1'b0, 16'h0, "stays idle");

    // a second circuit, owned by input 4, dropped by the arbiter (NACK)
    @(negedge clk); send = 1'b1; send_pkt = 16'h0112; locked = 1'b1; owner = 3'd4;
    @(posedge clk); #1 expect_out(1'b1, 16'h0112, "second request");
    @(negedge clk); send = 1'b0; fill_inputs(30);
    @(posedge clk); #1 expect_out(1'b0, 16'h401E, "owner 4 forwarded");
    @(negedge clk); locked = 1'b0; fill_inputs(31);
    @(posedge clk); #1 expect_out(1'b0, 16'h0, "idle after unlock");
    @(negedge clk); locked = 1'b1; fill_inputs(32);
    @(posedge clk); #1 expect_out(1'b0, 16'h0, "no forwarding without a new send");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
