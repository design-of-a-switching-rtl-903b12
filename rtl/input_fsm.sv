// input_fsm: one per input port of the switching node. It accepts the
// routing packet framed by the forward-control wire and raises a flag that
// tells the priority encoder a packet has arrived.
//
// Following the design's flow chart, the FSM waits for forward control = 1;
// when it sees it, it stores the 16-bit word and sets its flag. The flag and
// the stored packet are held until the node takes the packet (take = 1),
// then the FSM goes back to waiting. Holding the packet until it is taken is
// this implementation's choice: the request is only one word long and the
// source sends nothing more until it is answered.
//
// While the input owns a circuit through the node (in_circuit = 1), framed
// words are payload that travels along the circuit, so the FSM ignores them.
//
// Timing: a packet on the link in cycle t shows as flag = 1 from cycle t+1.
// Reset is active low and synchronous to clk.
module input_fsm
  import ocn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  fwd_link_t         link_in,     // forward half of the incoming link
  input  logic              in_circuit,  // this input owns a circuit
  input  logic              take,        // the node accepted the packet
  output logic              flag,        // a routing packet waits here
  output logic [DATA_W-1:0] pkt          // the waiting routing packet
);

  typedef enum logic {
    S_WAIT,     // "start": look for forward control = 1
    S_FLAGGED   // flag = 1 until the packet is taken
  } state_t;

  state_t state_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_WAIT;
      pkt     <= '0;
    end else begin
      unique case (state_q)
        S_WAIT: begin
          if (link_in.fwd_ctrl && !in_circuit) begin
            state_q <= S_FLAGGED;
            pkt     <= link_in.data;
          end
        end
        S_FLAGGED: begin
          if (take) state_q <= S_WAIT;
        end
        default: state_q <= S_WAIT;
      endcase
    end
  end

  assign flag = (state_q == S_FLAGGED);

endmodule
