// output_fsm: one per output port of the switching node. It forwards the
// routing packet to the next node, framed by the forward-control wire, and
// then carries the circuit that the packet set up.
//
// States (this implementation's own; the design gives only the function):
//   S_IDLE     the output is free; it drives fwd_ctrl = 0, data = 0.
//   S_CIRCUIT  the output belongs to input `owner`, which has not started
//              its payload yet. The owner's link is copied to the output.
//   S_FRAME    the owner's payload frame (fwd_ctrl = 1) is passing and is
//              copied to the output. The first word with fwd_ctrl = 0 ends
//              the frame: it is the cancel. It is forwarded, cancel_seen
//              tells the arbiter to unlock the port, and the FSM returns to
//              S_IDLE.
// If the arbiter unlocks the port for another reason (a negative
// acknowledgement came back), the FSM returns to S_IDLE as well.
// On `send` (one cycle, from the arbiter) the routing packet is driven with
// fwd_ctrl = 1 for one cycle and the FSM enters S_CIRCUIT.
//
// Timing: send in cycle t puts the packet on the link in cycle t+1; a word on
// the owning input in cycle t appears on the output in cycle t+1, the one
// cycle per switch that the design allows for retiming. The cancel thus
// reaches the next node one cycle after it passed this one.
module output_fsm
  import ocn_pkg::*;
#(
  parameter int unsigned N       = 5,               // ports of the node
  localparam int unsigned IDX_W  = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              send,          // forward the routing packet now
  input  logic [DATA_W-1:0] send_pkt,      // the routing packet
  input  logic              locked,        // arbiter: this output is locked
  input  logic [IDX_W-1:0]  owner,         // arbiter: input that locked it
  input  fwd_link_t         link_in [N],   // forward halves of all inputs
  output logic              cancel_seen,   // the owner's frame ends now
  output fwd_link_t         link_out       // forward half of outgoing link
);

  typedef enum logic [1:0] {
    S_IDLE,
    S_CIRCUIT,
    S_FRAME
  } state_t;

  state_t    state_q;
  fwd_link_t owner_word;

  assign owner_word  = link_in[owner];
  assign cancel_seen = (state_q == S_FRAME) && locked && !send &&
                       !owner_word.fwd_ctrl;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      link_out <= FWD_IDLE;
    end else if (send) begin
      state_q  <= S_CIRCUIT;
      link_out <= '{fwd_ctrl: 1'b1, data: send_pkt};
    end else begin
      unique case (state_q)
        S_IDLE: begin
          link_out <= FWD_IDLE;
        end
        S_CIRCUIT, S_FRAME: begin
          if (!locked) begin
            state_q  <= S_IDLE;
            link_out <= FWD_IDLE;
          end else begin
            link_out <= owner_word;
            if (owner_word.fwd_ctrl)      state_q <= S_FRAME;
            else if (state_q == S_FRAME)  state_q <= S_IDLE;
          end
        end
        default: begin
          state_q  <= S_IDLE;
          link_out <= FWD_IDLE;
        end
      endcase
    end
  end

endmodule
