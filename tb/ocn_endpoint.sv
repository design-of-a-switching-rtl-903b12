// ocn_endpoint: behavioural model of the IP side of one local port (the
// wrapper plus IP block), for simulation only.
//
// Source side: on cmd_valid it sets up a circuit to (cmd_x, cmd_y) with a
// one-word routing request, waits for the answer, and on NACK backs off for
// a pseudo-random 4..19 cycles and retries. On ACK it optionally waits
// cmd_hold cycles (keeping the circuit, to create contention), then sends
// cmd_len payload words as one framed burst and ends the frame, which is
// the cancel. Payload word k carries {ID[3:0], k[11:0]}.
//
// Sink side: a framed word on an idle port is a request. The model answers
// one cycle later with NACK while `refuse` is set, otherwise with ACK, and
// then collects the framed payload until the frame ends, checking that the
// words come from one source in order.
//
// Cycle numbers count rising edges after reset. setup_cycles is measured
// from the edge at which the node samples the request to the edge at which
// the answer is seen here; tx_first/rx_first are the edges at which the
// first payload word is sampled by the first node and by this sink.
module ocn_endpoint
  import ocn_pkg::*;
#(
  parameter int unsigned ID = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  // command
  input  logic       cmd_valid,
  input  logic [3:0] cmd_x,
  input  logic [3:0] cmd_y,
  input  int         cmd_len,
  input  int         cmd_hold,
  output logic       cmd_ready,
  output logic       cmd_done,      // one cycle: transfer finished
  input  logic       refuse,        // answer requests with NACK
  // network port
  output fwd_link_t  to_net,
  input  rev_ctrl_t  from_net_rev,
  input  fwd_link_t  from_net,
  output rev_ctrl_t  to_net_rev,
  // statistics
  output int         n_done,
  output int         n_nack,        // NACKs received as a source
  output int         n_refused,     // requests this sink refused
  output int         n_rx,          // complete transfers received
  output int         n_rx_err,      // payload words out of order
  output int         n_timeout,
  output int         setup_cycles,  // of the last successful setup
  output int         tries,         // requests of the last transfer
  output int         tx_first,
  output int         rx_first,
  output int         rx_src,        // ID of the last source received
  output int         rx_len         // length of the last transfer
);

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_WAIT, S_BACK, S_HOLD, S_DATA, S_END}
    src_state_t;
  typedef enum logic [1:0] {R_IDLE, R_PRE, R_RECV} rx_state_t;

  src_state_t s;
  rx_state_t  r;
  int         cyc, t0, cnt, k, len, hold;
  logic [3:0] dx, dy;
  int         rx_k;
  logic [3:0] rx_id;

  assign cmd_ready = (s == S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s <= S_IDLE; to_net <= FWD_IDLE; cmd_done <= 1'b0; cyc <= 0;
      n_done <= 0; n_nack <= 0; n_timeout <= 0; setup_cycles <= 0; tries <= 0;
      tx_first <= 0; t0 <= 0; cnt <= 0; k <= 0; len <= 0; hold <= 0;
      dx <= '0; dy <= '0;
    end else begin
      cyc      <= cyc + 1;
      cmd_done <= 1'b0;
      unique case (s)
        S_IDLE: begin
          to_net <= FWD_IDLE;
          if (cmd_valid) begin
            dx <= cmd_x; dy <= cmd_y; len <= cmd_len; hold <= cmd_hold;
            tries <= 0;
            s <= S_REQ;
          end
        end
        S_REQ: begin
          to_net <= '{fwd_ctrl: 1'b1, data: make_request(dx, dy, 8'd0)};
          t0     <= cyc + 1;
          tries  <= tries + 1;
          cnt    <= 0;
          s      <= S_WAIT;
        end
        S_WAIT: begin
          to_net <= FWD_IDLE;
          cnt    <= cnt + 1;
          if (from_net_rev == REV_ACK) begin
            setup_cycles <= cyc - t0;
            cnt <= 0; k <= 0;
            s   <= (hold > 0) ? S_HOLD : S_DATA;
          end else if (from_net_rev == REV_NACK) begin
            n_nack <= n_nack + 1;
            cnt    <= 4 + int'($urandom_range(0, 15));
            s      <= S_BACK;
          end else if (cnt > 500) begin
            n_timeout <= n_timeout + 1;
            s <= S_IDLE;
          end
        end
        S_BACK: begin
          if (cnt <= 1) s <= S_REQ;
          else cnt <= cnt - 1;
        end
        S_HOLD: begin
          cnt <= cnt + 1;
          if (cnt + 1 >= hold) s <= S_DATA;
        end
        S_DATA: begin
          to_net <= '{fwd_ctrl: 1'b1, data: {4'(ID), 12'(k)}};
          if (k == 0) tx_first <= cyc + 1;
          k <= k + 1;
          if (k + 1 >= len) s <= S_END;
        end
        S_END: begin
          to_net   <= FWD_IDLE;   // end of frame: the cancel
          n_done   <= n_done + 1;
          cmd_done <= 1'b1;
          s        <= S_IDLE;
        end
        default: s <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r <= R_IDLE; to_net_rev <= REV_NONE;
      n_refused <= 0; n_rx <= 0; n_rx_err <= 0; rx_first <= 0; rx_src <= 0; rx_len <= 0;
      rx_k <= 0; rx_id <= '0;
    end else begin
      to_net_rev <= REV_NONE;
      unique case (r)
        R_IDLE: begin
          if (from_net.fwd_ctrl) begin
            if (refuse) begin
              to_net_rev <= REV_NACK;
              n_refused  <= n_refused + 1;
            end else begin
              to_net_rev <= REV_ACK;
              rx_k <= 0;
              r    <= R_PRE;
            end
          end
        end
        R_PRE: begin
          if (from_net.fwd_ctrl) begin
            rx_first <= cyc;
            rx_id    <= from_net.data[15:12];
            if (from_net.data[11:0] != 12'd0) n_rx_err <= n_rx_err + 1;
            rx_k <= 1;
            r    <= R_RECV;
          end
        end
        R_RECV: begin
          if (from_net.fwd_ctrl) begin
            if (from_net.data != {rx_id, 12'(rx_k)}) n_rx_err <= n_rx_err + 1;
            rx_k <= rx_k + 1;
          end else begin
            n_rx   <= n_rx + 1;
            rx_src <= int'(rx_id);
            rx_len <= rx_k;
            r      <= R_IDLE;
          end
        end
        default: r <= R_IDLE;
      endcase
    end
  end

endmodule
