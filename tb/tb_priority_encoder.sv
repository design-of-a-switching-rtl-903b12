// tb_priority_encoder: exhaustive check of the fixed-priority input-side
// arbiter. For every flag pattern of a 5-input and a 7-input instance the
// grant must be one-hot on the lowest-numbered set flag (input 0 has the
// highest priority), or all zeros when no flag is set. The six rows of the
// design's truth table are also checked literally on the 5-input instance.
module tb_priority_encoder;

  int checks   = 0;
  int failures = 0;

  logic [4:0] flag5, grant5;
  logic [6:0] flag7, grant7;

  priority_encoder #(.N(5)) dut5 (.flag(flag5), .grant(grant5));
  priority_encoder #(.N(7)) dut7 (.flag(flag7), .grant(grant7));

  // Reference: scan from input 0 upward; the first set flag wins.
  function automatic logic [6:0] ref_grant(logic [6:0] f, int n);
    for (int i = 0; i < n; i++) if (f[i]) return 7'(1) << i;
    return '0;
  endfunction

  task automatic check5(logic [4:0] f, logic [4:0] expect_g);
    flag5 = f;
    #1;
    checks++;
    if (grant5 !== expect_g) begin
      failures++;
      $display("FAIL N=5 flag=%b grant=%b expected=%b", f, grant5, expect_g);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // truth-table rows: flag[0] is bit 0
    check5(5'b00000, 5'b00000);
    check5(5'b11111, 5'b00001);
    check5(5'b11110, 5'b00010);
    check5(5'b11100, 5'b00100);
    check5(5'b11000, 5'b01000);
    check5(5'b10000, 5'b10000);
    for (int f = 0; f < 32; f++) check5(5'(f), 5'(ref_grant(7'(f), 5)));
    for (int f = 0; f < 128; f++) begin
      flag7 = 7'(f);
      #1;
      checks++;
      if (grant7 !== ref_grant(7'(f), 7)) begin
        failures++;
        $display("FAIL N=7 flag=%b grant=%b", flag7, grant7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
