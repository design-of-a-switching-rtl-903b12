// arbiter_fsm: output-side arbitration and circuit bookkeeping of the
// switching node.
//
// The arbiter takes one decoded routing request at a time. It tries the
// directions that lead to the destination in a fixed order (right, left,
// top, bottom, local IP), so the x direction is the first choice and the y
// direction the second. If the first choice is locked by another input the
// second is used; if no direction towards the destination is free, the
// arbiter answers the requesting input with a negative acknowledgement
// (NACK) and locks nothing. That choice order is this implementation's own;
// the design only requires a primary and a secondary choice.
//
// Each output has a lock: FREE, TEMP (request forwarded, waiting for the
// acknowledgement) or PERM (acknowledged, payload may flow). A lock becomes
// PERM when ACK comes back on that output's reverse control, and returns to
// FREE when NACK comes back (the destination, or a switch further on, could
// not take the request) or when the owner's cancel passes the output.
// Reverse control from a locked output is passed back to the owning input
// through one register: one cycle per switch for the acknowledgement.
//
// FSM: S_IDLE takes the request; S_CHOOSE works out the first and second
// choice; S_SELECT checks the locks and either locks an output and pulses
// send[o] or sends NACK. A request accepted in cycle t gives send (or NACK
// on rev_out) in cycle t+3. The split into three states is this
// implementation's way of spending the design's 6-cycle per-node budget.
module arbiter_fsm
  import ocn_pkg::*;
#(
  parameter int unsigned N      = 5,              // ports: 4 mesh + local
  localparam int unsigned IDX_W = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  // decoded routing request
  input  logic              req_valid,
  input  logic [IDX_W-1:0]  req_port,     // input the request came in on
  input  route_dir_t        req_dir,      // directions from address decode
  input  logic [DATA_W-1:0] req_pkt,      // the routing packet itself
  output logic              req_ready,    // request accepted this cycle
  output logic              busy,         // a request is being arbitrated
  // per output port
  input  logic [N-1:0]      cancel_seen,  // owner's cancel passes output o
  input  rev_ctrl_t         rev_in  [N],  // reverse control into output o
  output logic [N-1:0]      locked,       // output o is locked
  output logic [IDX_W-1:0]  owner   [N],  // input that owns output o
  output logic [N-1:0]      send,         // forward the packet on output o
  output logic [DATA_W-1:0] send_pkt,
  // per input port
  output rev_ctrl_t         rev_out [N],  // reverse control out of input i
  output logic [N-1:0]      in_circuit    // input i owns an output
);

  localparam int unsigned NUM_LOCAL = N - NUM_DIRS;

  typedef enum logic [1:0] {
    S_IDLE,
    S_CHOOSE,
    S_SELECT
  } state_t;

  typedef enum logic [1:0] {
    L_FREE,
    L_TEMP,
    L_PERM
  } lock_t;

  state_t            state_q;
  lock_t             lock_q  [N];
  logic [IDX_W-1:0]  owner_q [N];
  logic [IDX_W-1:0]  port_q;
  logic [DATA_W-1:0] pkt_q;
  route_dir_t        dir_q;
  logic              c1_ok_q, c2_ok_q;  // a first / second choice exists
  logic [IDX_W-1:0]  c1_q, c2_q;        // first / second choice outputs

  // ---- choices from the captured directions ------------------------------
  logic             c1_ok, c2_ok;
  logic [IDX_W-1:0] c1, c2;
  logic [7:0]       local_idx;

  always_comb begin
    local_idx = req_local_idx(pkt_q);
    c1_ok = 1'b0;
    c2_ok = 1'b0;
    c1    = '0;
    c2    = '0;
    if (dir_q.right || dir_q.left) begin
      c1_ok = 1'b1;
      c1    = dir_q.right ? IDX_W'(PORT_RIGHT) : IDX_W'(PORT_LEFT);
      if (dir_q.top || dir_q.bottom) begin
        c2_ok = 1'b1;
        c2    = dir_q.top ? IDX_W'(PORT_TOP) : IDX_W'(PORT_BOTTOM);
      end
    end else if (dir_q.top || dir_q.bottom) begin
      c1_ok = 1'b1;
      c1    = dir_q.top ? IDX_W'(PORT_TOP) : IDX_W'(PORT_BOTTOM);
    end else if (dir_q.ip_core && (32'(local_idx) < NUM_LOCAL)) begin
      c1_ok = 1'b1;
      c1    = IDX_W'(PORT_LOCAL + 32'(local_idx));
    end
  end

  // ---- selection ---------------------------------------------------------
  logic             grant_ok, nack_now;
  logic [IDX_W-1:0] grant_port;

  always_comb begin
    grant_ok   = 1'b0;
    grant_port = c1_q;
    if (state_q == S_SELECT) begin
      if (c1_ok_q && lock_q[c1_q] == L_FREE) begin
        grant_ok   = 1'b1;
        grant_port = c1_q;
      end else if (c2_ok_q && lock_q[c2_q] == L_FREE) begin
        grant_ok   = 1'b1;
        grant_port = c2_q;
      end
    end
    nack_now = (state_q == S_SELECT) && !grant_ok;
  end

  assign req_ready = (state_q == S_IDLE) && req_valid;
  assign busy      = (state_q != S_IDLE);

  // ---- FSM and request registers ----------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      port_q   <= '0;
      pkt_q    <= '0;
      dir_q    <= '0;
      c1_ok_q  <= 1'b0;
      c2_ok_q  <= 1'b0;
      c1_q     <= '0;
      c2_q     <= '0;
      send     <= '0;
      send_pkt <= '0;
    end else begin
      send <= '0;
      unique case (state_q)
        S_IDLE: begin
          if (req_valid) begin
            state_q <= S_CHOOSE;
            port_q  <= req_port;
            pkt_q   <= req_pkt;
            dir_q   <= req_dir;
          end
        end
        S_CHOOSE: begin
          state_q <= S_SELECT;
          c1_ok_q <= c1_ok;
          c2_ok_q <= c2_ok;
          c1_q    <= c1;
          c2_q    <= c2;
        end
        S_SELECT: begin
          state_q <= S_IDLE;
          if (grant_ok) begin
            send[grant_port] <= 1'b1;
            send_pkt         <= pkt_q;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ---- locks ---------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned o = 0; o < N; o++) begin
        lock_q[o]  <= L_FREE;
        owner_q[o] <= '0;
      end
    end else begin
      for (int unsigned o = 0; o < N; o++) begin
        unique case (lock_q[o])
          L_FREE: begin
            if (grant_ok && grant_port == IDX_W'(o)) begin
              lock_q[o]  <= L_TEMP;
              owner_q[o] <= port_q;
            end
          end
          L_TEMP: begin
            if (rev_in[o] == REV_NACK)                    lock_q[o] <= L_FREE;
            else if (rev_in[o] == REV_ACK)                lock_q[o] <= L_PERM;
            else if (cancel_seen[o])                      lock_q[o] <= L_FREE;
          end
          L_PERM: begin
            if (rev_in[o] == REV_NACK || cancel_seen[o]) lock_q[o] <= L_FREE;
          end
          default: lock_q[o] <= L_FREE;
        endcase
      end
    end
  end

  always_comb begin
    for (int unsigned o = 0; o < N; o++) begin
      locked[o] = (lock_q[o] != L_FREE);
      owner[o]  = owner_q[o];
    end
  end

  // ---- reverse control back to the inputs ---------------------------------
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      in_circuit[i] = 1'b0;
      for (int unsigned o = 0; o < N; o++) begin
        if (locked[o] && owner_q[o] == IDX_W'(i)) in_circuit[i] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) rev_out[i] <= REV_NONE;
    end else begin
      for (int unsigned i = 0; i < N; i++) begin
        rev_ctrl_t r;
        r = REV_NONE;
        for (int unsigned o = 0; o < N; o++) begin
          if (locked[o] && owner_q[o] == IDX_W'(i)) r = rev_in[o];
        end
        if (nack_now && port_q == IDX_W'(i)) r = REV_NACK;
        rev_out[i] <= r;
      end
    end
  end

  // ---- rules of the circuit bookkeeping ------------------------------------
  // An input owns at most one output at a time.
  for (genvar gi = 0; gi < N; gi++) begin : g_one_owner
    logic [N-1:0] owns;
    always_comb begin
      for (int unsigned o = 0; o < N; o++) begin
        owns[o] = locked[o] && owner_q[o] == IDX_W'(gi);
      end
    end
    a_one_circuit: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(owns))
      else $error("input %0d owns more than one output", gi);
  end

  // A request is only offered when the arbiter can take it.
  a_req_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> state_q == S_IDLE)
    else $error("routing request offered while the arbiter is busy");

endmodule
