// priority_encoder: fixed-priority, input-side arbitration of the switching
// node.
//
// When routing requests wait at several inputs at once, exactly one of them
// is chosen: the lowest-numbered flagged input wins, flag[0] having the
// highest priority (the truth table of the design). The output is one-hot;
// all zeros when no flag is set. The width is a parameter so that the node
// can be built with any number of ports.
//
// Purely combinational; the switching node registers its result.
module priority_encoder #(
  parameter int unsigned N = 5   // number of inputs (5-port node)
) (
  input  logic [N-1:0] flag,   // 1: a routing packet waits at this input
  output logic [N-1:0] grant   // one-hot: the input chosen for routing
);

  // A request is granted when it is set and no lower-numbered one is.
  always_comb begin
    logic seen;  // some lower-numbered flag is set
    seen = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      grant[i] = flag[i] && !seen;
      seen     = seen || flag[i];
    end
  end

endmodule
