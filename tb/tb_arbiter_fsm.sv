// tb_arbiter_fsm: checks the output-side arbiter of a 5-port node.
// Scenarios: first choice granted (x direction before y), second choice
// used when the first is locked, NACK when every direction towards the
// destination is locked, local-port routing by packet index, ACK and NACK
// passed back one cycle later, lock release on a returning NACK and on the
// owner's cancel, and the three-cycle request-to-send timing.
module tb_arbiter_fsm;
  import ocn_pkg::*;

  localparam int unsigned N = 5;

  int checks   = 0;
  int failures = 0;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              req_valid;
  logic [2:0]        req_port;
  route_dir_t        req_dir;
  logic [DATA_W-1:0] req_pkt;
  logic              req_ready, busy;
  logic [N-1:0]      cancel_seen;
  rev_ctrl_t         rev_in [N];
  logic [N-1:0]      locked;
  logic [2:0]        owner [N];
  logic [N-1:0]      send;
  logic [DATA_W-1:0] send_pkt;
  rev_ctrl_t         rev_out [N];
  logic [N-1:0]      in_circuit;

  arbiter_fsm #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (send=%b locked=%b in_circuit=%b)", what, send, locked, in_circuit);
    end
  endtask

  function automatic route_dir_t mk(logic r, logic l, logic t, logic b, logic ip);
    route_dir_t d;
    d.right = r; d.left = l; d.top = t; d.bottom = b; d.ip_core = ip;
    return d;
  endfunction

  // Offer one request; return with the result registered (three edges
  // later), checking that nothing is sent earlier.
  task automatic request(int port, route_dir_t d, logic [DATA_W-1:0] p);
    @(negedge clk);
    req_valid = 1'b1; req_port = 3'(port); req_dir = d; req_pkt = p;
    #1 chk(req_ready, "request accepted when idle");
    @(posedge clk);
    @(negedge clk);
    req_valid = 1'b0;
    chk(busy && send == '0, "busy while choosing, nothing sent yet");
    @(posedge clk);
    @(negedge clk);
    chk(busy && send == '0, "busy while selecting, nothing sent yet");
    @(posedge clk); #1;
  endtask

  task automatic idle_cycle();
    @(negedge clk);
    for (int o = 0; o < N; o++) rev_in[o] = REV_NONE;
    cancel_seen = '0;
    @(posedge clk); #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; req_valid = 1'b0; req_port = '0; req_dir = '0; req_pkt = '0;
    cancel_seen = '0;
    for (int o = 0; o < N; o++) rev_in[o] = REV_NONE;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk); #1 chk(locked == '0 && send == '0, "all free after reset");

    // 1: local input 4 -> right+bottom: right (x first) is granted
    request(4, mk(1, 0, 0, 1, 0), 16'h0033);
    chk(send == 5'b00001 && send_pkt == 16'h0033, "first choice right, send pulse");
    chk(locked[0] && owner[0] == 3'd4 && in_circuit[4], "right locked by input 4");
    idle_cycle();
    chk(send == '0, "send is one cycle");

    // 2: input 1 -> right+bottom: right is taken, bottom is used
    request(1, mk(1, 0, 0, 1, 0), 16'h0011);
    chk(send == 5'b01000 && owner[3] == 3'd1, "second choice bottom");
    idle_cycle();

    // 3: input 2 -> right only: no free direction, NACK back to input 2
    request(2, mk(1, 0, 0, 0, 0), 16'h0030);
    chk(send == '0 && rev_out[2] == REV_NACK && !in_circuit[2], "NACK when blocked");
    chk(rev_out[4] == REV_NONE && rev_out[1] == REV_NONE, "NACK only to requester");
    idle_cycle();
    chk(rev_out[2] == REV_NONE, "NACK lasts one cycle");

    // 4: ACK on output 0 goes back to input 4 one cycle later
    @(negedge clk); rev_in[0] = REV_ACK;
    @(posedge clk); #1 chk(rev_out[4] == REV_ACK, "ACK passed back in one cycle");
    idle_cycle();
    chk(locked[0], "lock held after ACK");

    // 5: NACK on output 3 goes back to input 1 and releases output 3
    @(negedge clk); rev_in[3] = REV_NACK;
    @(posedge clk); #1 chk(rev_out[1] == REV_NACK && !locked[3] && !in_circuit[1],
                           "NACK passed back and lock released");
    idle_cycle();

    // 6: cancel through output 0 releases it
    @(negedge clk); cancel_seen = 5'b00001;
    @(posedge clk); #1 chk(!locked[0] && !in_circuit[4], "cancel releases the lock");
    idle_cycle();

    // 7: local delivery: index 0 exists, index 1 does not (one local port)
    request(0, mk(0, 0, 0, 0, 1), 16'h0011);
    chk(send == 5'b10000 && owner[4] == 3'd0, "local port 4 granted");
    idle_cycle();
    request(1, mk(0, 0, 0, 0, 1), 16'h0111);
    chk(send == '0 && rev_out[1] == REV_NACK, "missing local port refused");
    idle_cycle();
    request(2, mk(0, 0, 0, 0, 1), 16'h0011);
    chk(send == '0 && rev_out[2] == REV_NACK, "busy local port refused");
    idle_cycle();

    // 8: left+top: left first, then top when left is taken
    request(3, mk(0, 1, 1, 0, 0), 16'h0000);
    chk(send == 5'b00010 && owner[1] == 3'd3, "left first");
    idle_cycle();
    request(2, mk(0, 1, 1, 0, 0), 16'h0000);
    chk(send == 5'b00100 && owner[2] == 3'd2, "top second");
    idle_cycle();
    // ACK on top reaches input 2, nothing reaches input 3
    @(negedge clk); rev_in[2] = REV_ACK;
    @(posedge clk); #1 chk(rev_out[2] == REV_ACK && rev_out[3] == REV_NONE, "ACK to owner only");
    idle_cycle();

    // 9: NACK on a free output is ignored
    @(negedge clk); rev_in[0] = REV_NACK;
    @(posedge clk); #1 chk(rev_out[0] == REV_NONE && rev_out[4] == REV_NONE, "stray NACK dropped");
    idle_cycle();
    chk(locked == 5'b10110, "remaining locks");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
