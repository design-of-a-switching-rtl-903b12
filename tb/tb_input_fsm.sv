// tb_input_fsm: checks the input FSM of one switching-node port.
// Directed part: a framed word raises the flag one cycle later and is held
// until taken; words with forward control = 0 and words arriving while the
// input owns a circuit do not raise it. Random part: 2000 cycles of random
// framing, circuit and take inputs compared cycle by cycle with a reference
// model kept in the testbench.
module tb_input_fsm;
  import ocn_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic              clk = 1'b0;
  logic              rst_n;
  fwd_link_t         link_in;
  logic              in_circuit, take;
  logic              flag;
  logic [DATA_W-1:0] pkt;

  input_fsm dut (.*);

  always #5 clk = ~clk;

  // reference model
  logic              m_flag;
  logic [DATA_W-1:0] m_pkt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_flag <= 1'b0;
      m_pkt  <= '0;
    end else if (!m_flag) begin
      if (link_in.fwd_ctrl && !in_circuit) begin
        m_flag <= 1'b1;
        m_pkt  <= link_in.data;
      end
    end else if (take) begin
      m_flag <= 1'b0;
    end
  end

  task automatic expect_flag(logic f, logic [DATA_W-1:0] p, string what);
    checks++;
    if (flag !== f || (f && pkt !== p)) begin
      failures++;
      $display("FAIL %s: flag=%b pkt=%h expected flag=%b pkt=%h", what, flag, pkt, f, p);
    end
  endtask

  task automatic drive(logic fc, logic [DATA_W-1:0] d, logic ic, logic tk);
    @(negedge clk);
    link_in    = '{fwd_ctrl: fc, data: d};
    in_circuit = ic;
    take       = tk;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    link_in = FWD_IDLE; in_circuit = 1'b0; take = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    drive(1'b0, 16'hABCD, 1'b0, 1'b0);   // data without framing
    @(posedge clk); #1 expect_flag(1'b0, '0, "unframed word");
    drive(1'b1, 16'h0123, 1'b0, 1'b0);   // routing packet
    @(posedge clk); #1 expect_flag(1'b1, 16'h0123, "flag one cycle after packet");
    drive(1'b1, 16'h4567, 1'b0, 1'b0);   // a second framed word is not taken
    @(posedge clk); #1 expect_flag(1'b1, 16'h0123, "packet held");
    drive(1'b0, 16'h0, 1'b0, 1'b1);      // node takes it
    @(posedge clk); #1 expect_flag(1'b0, '0, "flag cleared after take");
    drive(1'b1, 16'h89AB, 1'b1, 1'b0);   // cancel on a circuit
    @(posedge clk); #1 expect_flag(1'b0, '0, "cancel ignored");

    for (int c = 0; c < 2000; c++) begin
      drive($urandom_range(0, 3) == 0, 16'($urandom), $urandom_range(0, 3) == 0,
            $urandom_range(0, 2) == 0);
      @(posedge clk); #1;
      checks++;
      if (flag !== m_flag || (m_flag && pkt !== m_pkt)) begin
        failures++;
        $display("FAIL cycle %0d: flag=%b pkt=%h model flag=%b pkt=%h", c, flag, pkt, m_flag, m_pkt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
