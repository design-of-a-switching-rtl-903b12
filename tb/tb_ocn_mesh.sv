// tb_ocn_mesh: end-to-end test of a 3 x 3 mesh with a behavioural IP model
// on every local port. A 3 x 3 mesh is used because in a 2 x 2 mesh with x
// routing first the second-choice direction can never be needed.
//
// Phases:
//   1. one transfer corner to corner (5 switches): setup latency must be
//      7 cycles per switch + 1 (6 request + 1 acknowledge per switch, one
//      cycle for the destination to answer), payload latency 1 cycle per
//      switch, payload intact;
//   2. a transfer to the node's own IP block (1 switch, 8 cycles);
//   3. the destination refuses: the source gets NACK and retries until the
//      destination accepts;
//   4. a held circuit (0,0)->(2,0) blocks the first choice of (1,0)->(2,1)
//      (second choice taken) and the last hop of (0,1)->(2,0) (NACK from a
//      switch in mid-route, retried until the held circuit is cancelled);
//   5. two requests reach node (1,1) in the same cycle (input priority);
//   6. random traffic from all nine sources with retries.
// Every mechanism is counted; one that never happened is a failure.
module tb_ocn_mesh;
  import ocn_pkg::*;

  localparam int unsigned ROWS = 3;
  localparam int unsigned COLS = 3;
  localparam int unsigned NN   = ROWS * COLS;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  fwd_link_t loc_in [NN];
  rev_ctrl_t loc_rev_out [NN];
  fwd_link_t loc_out [NN];
  rev_ctrl_t loc_rev_in [NN];

  ocn_mesh #(.ROWS(ROWS), .COLS(COLS), .NUM_LOCAL(1)) dut (.*);

  logic       cmd_valid [NN];
  logic [3:0] cmd_x [NN], cmd_y [NN];
  int         cmd_len [NN], cmd_hold [NN];
  logic       cmd_ready [NN], cmd_done [NN], refuse [NN];
  int n_done [NN], n_nack [NN], n_refused [NN], n_rx [NN], n_rx_err [NN], n_timeout [NN];
  int setup_cycles [NN], tries [NN], tx_first [NN], rx_first [NN], rx_src [NN], rx_len [NN];

  for (genvar e = 0; e < NN; e++) begin : g_ep
    ocn_endpoint #(.ID(e)) u_ep (
      .clk, .rst_n,
      .cmd_valid (cmd_valid[e]), .cmd_x (cmd_x[e]), .cmd_y (cmd_y[e]),
      .cmd_len (cmd_len[e]), .cmd_hold (cmd_hold[e]), .cmd_ready (cmd_ready[e]),
      .cmd_done (cmd_done[e]), .refuse (refuse[e]),
      .to_net (loc_in[e]), .from_net_rev (loc_rev_out[e]),
      .from_net (loc_out[e]), .to_net_rev (loc_rev_in[e]),
      .n_done (n_done[e]), .n_nack (n_nack[e]), .n_refused (n_refused[e]),
      .n_rx (n_rx[e]), .n_rx_err (n_rx_err[e]), .n_timeout (n_timeout[e]),
      .setup_cycles (setup_cycles[e]), .tries (tries[e]),
      .tx_first (tx_first[e]), .rx_first (rx_first[e]),
      .rx_src (rx_src[e]), .rx_len (rx_len[e])
    );
  end

  // ---- mechanism counters, observed inside the nodes ----------------------
  int m_switch_nack = 0, m_second_choice = 0, m_simultaneous = 0;
  int m_cancel = 0, m_dest_nack = 0, m_ack = 0;

  for (genvar y = 0; y < ROWS; y++) begin : g_my
    for (genvar x = 0; x < COLS; x++) begin : g_mx
      always @(posedge clk) if (rst_n) begin
        if (dut.g_row[y].g_col[x].u_node.u_arbiter_fsm.nack_now) m_switch_nack++;
        if (dut.g_row[y].g_col[x].u_node.u_arbiter_fsm.grant_ok &&
            dut.g_row[y].g_col[x].u_node.u_arbiter_fsm.grant_port !=
            dut.g_row[y].g_col[x].u_node.u_arbiter_fsm.c1_q) m_second_choice++;
        if (|dut.g_row[y].g_col[x].u_node.pe_grant &&
            $countones(dut.g_row[y].g_col[x].u_node.flag) > 1) m_simultaneous++;
        m_cancel += $countones(dut.g_row[y].g_col[x].u_node.cancel_seen);
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < NN; e++) begin
      if (loc_rev_in[e] == REV_NACK) m_dest_nack++;
      if (loc_rev_in[e] == REV_ACK)  m_ack++;
    end
  end

  // ---- helpers --------------------------------------------------------------
  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic start(int s, int dx, int dy, int len, int hold);
    @(negedge clk);
    cmd_x[s] = 4'(dx); cmd_y[s] = 4'(dy); cmd_len[s] = len; cmd_hold[s] = hold;
    cmd_valid[s] = 1'b1;
    @(negedge clk);
    cmd_valid[s] = 1'b0;
  endtask

  task automatic wait_done(int s);
    while (!cmd_ready[s]) @(posedge clk);
    @(negedge clk);
  endtask

  task automatic wait_rx(int d, int n);
    while (n_rx[d] < n) @(posedge clk);
    @(negedge clk);
  endtask

  function automatic int hops(int s, int d);
    int sx = s % COLS, sy = s / COLS, ddx = d % COLS, ddy = d / COLS;
    return (sx > ddx ? sx - ddx : ddx - sx) + (sy > ddy ? sy - ddy : ddy - sy);
  endfunction

  // one uncontended transfer, with latency and integrity checks
  task automatic transfer(int s, int d, int len);
    int sw, rx0;
    sw  = hops(s, d) + 1;
    rx0 = n_rx[d];
    start(s, d % COLS, d / COLS, len, 0);
    wait_done(s);
    wait_rx(d, rx0 + 1);
    chk(tries[s] == 1, $sformatf("%0d->%0d first try", s, d));
    chk(setup_cycles[s] == 7 * sw + 1,
        $sformatf("%0d->%0d setup %0d cycles, expected %0d", s, d, setup_cycles[s], 7 * sw + 1));
    chk(rx_first[d] - tx_first[s] == sw,
        $sformatf("%0d->%0d payload latency %0d, expected %0d", s, d,
                  rx_first[d] - tx_first[s], sw));
    chk(rx_src[d] == s && rx_len[d] == len,
        $sformatf("%0d->%0d received src %0d len %0d", s, d, rx_src[d], rx_len[d]));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent, got, t;
    rst_n = 1'b0;
    for (int e = 0; e < NN; e++) begin
      cmd_valid[e] = 1'b0; cmd_x[e] = '0; cmd_y[e] = '0;
      cmd_len[e] = 1; cmd_hold[e] = 0; refuse[e] = 1'b0;
    end
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 1. corner to corner
    transfer(0, 8, 12);
    // 2. own IP block
    transfer(4, 4, 3);
    // a long transfer across the middle row
    transfer(5, 3, 40);

    // 3. destination refuses, then accepts
    refuse[5] = 1'b1;
    start(3, 2, 1, 5, 0);
    while (n_nack[3] < 2) @(posedge clk);
    @(negedge clk) refuse[5] = 1'b0;
    wait_done(3);
    chk(tries[3] >= 3 && n_refused[5] >= 2, "refused twice, then accepted");
    wait_rx(5, 1);
    chk(rx_src[5] == 3 && rx_len[5] == 5, "transfer after refusals intact");

    // 4. held circuit (0,0)->(2,0) through (1,0).right
    start(0, 2, 0, 4, 300);
    while (loc_rev_out[0] != REV_ACK) @(posedge clk);  // circuit is set up
    repeat (20) @(negedge clk);
    t = m_second_choice;
    transfer(1, 5, 6);           // (1,0)->(2,1): right locked, bottom taken
    chk(m_second_choice > t, "second choice used at (1,0)");
    start(3, 2, 0, 7, 0);        // (0,1)->(2,0): refused at (2,1), retried
    wait_done(3);
    chk(tries[3] > 1, "blocked route retried");
    wait_done(0);
    wait_rx(2, 2);
    chk(rx_src[2] == 3 && rx_len[2] == 7, "retried transfer delivered after the hold");

    // 5. requests from (0,1) and (1,0) meet at (1,1) in the same cycle
    t = m_simultaneous;
    fork
      start(3, 2, 1, 4, 0);
      start(1, 1, 2, 4, 0);
    join
    wait_done(3);
    wait_done(1);
    chk(m_simultaneous > t, "simultaneous requests arbitrated at (1,1)");

    // 6. random traffic
    sent = 0;
    for (int round = 0; round < 6; round++) begin
      for (int s = 0; s < NN; s++) begin
        int d;
        d = $urandom_range(0, NN - 1);
        cmd_x[s] = 4'(d % COLS); cmd_y[s] = 4'(d / COLS);
        cmd_len[s] = $urandom_range(1, 20); cmd_hold[s] = 0;
      end
      @(negedge clk);
      for (int s = 0; s < NN; s++) cmd_valid[s] = 1'b1;
      @(negedge clk);
      for (int s = 0; s < NN; s++) cmd_valid[s] = 1'b0;
      for (int s = 0; s < NN; s++) wait_done(s);
      sent += NN;
    end
    repeat (20) @(negedge clk);

    got = 0;
    for (int e = 0; e < NN; e++) begin
      got += n_rx[e];
      chk(n_rx_err[e] == 0, $sformatf("payload order at %0d", e));
      chk(n_timeout[e] == 0, $sformatf("no timeout at %0d", e));
    end
    chk(got == sent + 9, $sformatf("received %0d transfers, expected %0d", got, sent + 9));

    // mechanisms
    chk(m_ack > 0,           "ACK path used");
    chk(m_switch_nack > 0,   "NACK from a blocked switch");
    chk(m_dest_nack > 0,     "NACK from a destination");
    chk(m_second_choice > 0, "second-choice routing");
    chk(m_simultaneous > 0,  "input priority arbitration");
    chk(m_cancel > 0,        "cancel releasing locks");
    $display("mechanisms: ack=%0d switch_nack=%0d dest_nack=%0d second_choice=%0d simultaneous=%0d cancel=%0d",
             m_ack, m_switch_nack, m_dest_nack, m_second_choice, m_simultaneous, m_cancel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
