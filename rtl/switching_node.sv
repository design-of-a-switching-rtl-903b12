// switching_node: the 5-input, 5-output pipelined switch of a packet
// connected circuit (PCC) network.
//
// A source sets up a circuit by sending a one-word routing request. Each
// node the request passes through buffers it, picks an output towards the
// destination and temporarily locks that output. The destination answers
// with ACK, which travels back along the route and makes the locks
// permanent; then the payload flows through the locked outputs as one
// framed burst, one register per node, and the end of that frame (the
// cancel) releases every lock as it passes. A node that finds no free
// output towards the destination answers NACK instead; every lock between it and the source is released as the
// NACK travels back, and the source may retry later.
//
// Pipeline (one routing packet is serviced at a time). Registers sit where
// the design's block diagram draws its pipeline cuts: after the input FSMs,
// after the address decoder, and after the arbiter.
//   edge t     the node samples the request on link_in[i] (fwd_ctrl = 1);
//              input_fsm[i] raises its flag
//   edge t+1   priority_encoder picks the highest-priority flagged input and
//              address_decode finds its directions: request register s3
//   edge t+2   arbiter_fsm takes the request (S_IDLE)
//   edge t+3   arbiter_fsm forms its first and second choice (S_CHOOSE)
//   edge t+4   arbiter_fsm locks an output and pulses send, or answers
//              NACK on rev_out[i] (S_SELECT)
//   edge t+5   output_fsm registers the request on link_out[o]
//   edge t+6   the next node samples it
// so a request costs 6 cycles per node, as the design states. An ACK or
// NACK on rev_in[o] reaches rev_out[i] one cycle later, and a payload word
// on link_in[i] reaches link_out[o] one cycle later.
//
// Ports 0..3 are the mesh directions right, left, top, bottom; ports
// 4..N-1 are local IP ports. More local ports are added by raising N, which
// adds input and output FSMs while the address decoder stays the same.
// All flops use clk and the synchronous, active-low reset rst_n; clocking
// across mesochronous links is outside this module.
module switching_node
  import ocn_pkg::*;
#(
  parameter int unsigned       N         = 5,      // ports, >= 5
  parameter logic [ADDR_W-1:0] NODE_ADDR = 8'h00,  // {x, y} of this node
  localparam int unsigned      IDX_W     = $clog2(N)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  fwd_link_t link_in  [N],  // forward halves of the incoming links
  output rev_ctrl_t rev_out  [N],  // reverse control back to the senders
  output fwd_link_t link_out [N],  // forward halves of the outgoing links
  input  rev_ctrl_t rev_in   [N]   // reverse control from the receivers
);

  // ---- input FSMs -----------------------------------------------------------
  logic [N-1:0]      flag, take, in_circuit;
  logic [DATA_W-1:0] in_pkt [N];

  for (genvar i = 0; i < N; i++) begin : g_in
    input_fsm u_input_fsm (
      .clk        (clk),
      .rst_n      (rst_n),
      .link_in    (link_in[i]),
      .in_circuit (in_circuit[i]),
      .take       (take[i]),
      .flag       (flag[i]),
      .pkt        (in_pkt[i])
    );
  end

  // ---- input-side arbitration and address decode ----------------------------
  // The priority encoder and the address decoder form one combinational
  // stage between the input FSM flags and the request register s3.
  logic              front_busy;
  logic [N-1:0]      pe_grant;
  logic              s3_v;
  logic [IDX_W-1:0]  s3_port;
  logic [DATA_W-1:0] s3_pkt;
  route_dir_t        s3_dir;
  logic              arb_busy, arb_ready;

  assign front_busy = s3_v || arb_busy;

  priority_encoder #(.N(N)) u_priority_encoder (
    .flag  (flag & {N{!front_busy}}),
    .grant (pe_grant)
  );

  assign take = pe_grant;

  logic [IDX_W-1:0]  pe_port;
  logic [DATA_W-1:0] pe_pkt;

  always_comb begin
    pe_port = '0;
    pe_pkt  = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (pe_grant[i]) begin
        pe_port = IDX_W'(i);
        pe_pkt  = in_pkt[i];
      end
    end
  end

  route_dir_t dec_dir;

  address_decode u_address_decode (
    .node_addr (NODE_ADDR),
    .dest_addr (pe_pkt[ADDR_W-1:0]),
    .dir       (dec_dir)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s3_v    <= 1'b0;
      s3_port <= '0;
      s3_pkt  <= '0;
      s3_dir  <= '0;
    end else begin
      if (|pe_grant) begin
        s3_v    <= 1'b1;
        s3_port <= pe_port;
        s3_pkt  <= pe_pkt;
        s3_dir  <= dec_dir;
      end else if (arb_ready) begin
        s3_v <= 1'b0;
      end
    end
  end

  // ---- output-side arbitration ------------------------------------------------
  logic [N-1:0]      cancel_seen, locked, send;
  logic [IDX_W-1:0]  owner [N];
  logic [DATA_W-1:0] send_pkt;

  arbiter_fsm #(.N(N)) u_arbiter_fsm (
    .clk         (clk),
    .rst_n       (rst_n),
    .req_valid   (s3_v),
    .req_port    (s3_port),
    .req_dir     (s3_dir),
    .req_pkt     (s3_pkt),
    .req_ready   (arb_ready),
    .busy        (arb_busy),
    .cancel_seen (cancel_seen),
    .rev_in      (rev_in),
    .locked      (locked),
    .owner       (owner),
    .send        (send),
    .send_pkt    (send_pkt),
    .rev_out     (rev_out),
    .in_circuit  (in_circuit)
  );

  // ---- output FSMs ---------------------------------------------------------------
  for (genvar o = 0; o < N; o++) begin : g_out
    output_fsm #(.N(N)) u_output_fsm (
      .clk         (clk),
      .rst_n       (rst_n),
      .send        (send[o]),
      .send_pkt    (send_pkt),
      .locked      (locked[o]),
      .owner       (owner[o]),
      .link_in     (link_in),
      .cancel_seen (cancel_seen[o]),
      .link_out    (link_out[o])
    );
  end

endmodule
