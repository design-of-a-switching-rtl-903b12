// tb_ocn_mesh_full: the mesh at its default size (2 x 2 nodes, one IP port
// each) carrying a complete all-to-all exchange. First one uncontended
// transfer across the diagonal (3 switches) is checked for its setup
// latency (7 cycles per switch + 1) and payload latency (1 cycle per
// switch). Then every node sends one framed transfer to every node,
// itself included, all sources running at once and retrying after NACK;
// every transfer must arrive whole and in order.
module tb_ocn_mesh_full;
  import ocn_pkg::*;

  localparam int unsigned NN = 4;   // default 2 x 2 mesh

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  fwd_link_t loc_in [NN];
  rev_ctrl_t loc_rev_out [NN];
  fwd_link_t loc_out [NN];
  rev_ctrl_t loc_rev_in [NN];

  ocn_mesh dut (.*);

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

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wait_idle(int s);
    while (!cmd_ready[s]) @(posedge clk);
    @(negedge clk);
  endtask

  // source s sends to every node in turn, starting with node s+1
  task automatic all_to(int s);
    for (int j = 1; j <= NN; j++) begin
      int d;
      d = (s + j) % NN;
      @(negedge clk);
      cmd_x[s] = 4'(d % 2); cmd_y[s] = 4'(d / 2);
      cmd_len[s] = 8 + s + j; cmd_hold[s] = 0;
      cmd_valid[s] = 1'b1;
      @(negedge clk);
      cmd_valid[s] = 1'b0;
      wait_idle(s);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got, nacks;
    rst_n = 1'b0;
    for (int e = 0; e < NN; e++) begin
      cmd_valid[e] = 1'b0; cmd_x[e] = '0; cmd_y[e] = '0;
      cmd_len[e] = 1; cmd_hold[e] = 0; refuse[e] = 1'b0;
    end
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // uncontended (0,0) -> (1,1): 3 switches
    @(negedge clk);
    cmd_x[0] = 4'd1; cmd_y[0] = 4'd1; cmd_len[0] = 16; cmd_valid[0] = 1'b1;
    @(negedge clk);
    cmd_valid[0] = 1'b0;
    wait_idle(0);
    while (n_rx[3] < 1) @(posedge clk);
    @(negedge clk);
    chk(setup_cycles[0] == 22, $sformatf("setup %0d cycles, expected 22", setup_cycles[0]));
    chk(rx_first[3] - tx_first[0] == 3,
        $sformatf("payload latency %0d, expected 3", rx_first[3] - tx_first[0]));
    chk(rx_src[3] == 0 && rx_len[3] == 16, "diagonal transfer intact");

    // all to all
    fork
      all_to(0);
      all_to(1);
      all_to(2);
      all_to(3);
    join
    repeat (10) @(negedge clk);

    got = 0; nacks = 0;
    for (int e = 0; e < NN; e++) begin
      got   += n_rx[e];
      nacks += n_nack[e];
      chk(n_rx[e] == (e == 3 ? 5 : 4), $sformatf("node %0d received %0d transfers", e, n_rx[e]));
      chk(n_rx_err[e] == 0, $sformatf("payload order at node %0d", e));
      chk(n_timeout[e] == 0, $sformatf("no timeout at node %0d", e));
    end
    chk(got == 17, $sformatf("received %0d transfers, expected 17", got));
    $display("all-to-all done: %0d transfers, %0d NACKs answered by retries", got, nacks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
