// tb_clos_network: random full permutations through the 16x16 Clos network.
//
// Sixteen path setups are launched one after another, 28 cycles apart, so a
// full permutation takes 16 x 28 = 448 cycles. A reference model keeps the
// occupancy of every first-to-second and second-to-third stage link and
// predicts, for each setup, which second-stage switch the probe must end
// up in (the lowest-numbered one with both links free) or that no path is
// free (Ans=Back at the source). The test checks the answer, the link the
// path took, that every setup completes within 28 cycles, and, once all
// paths are up, that all sixteen carry their own random word at the same
// time. Directed cases then cover arbitration between two simultaneous
// probes, a destination answering nAck and two sources aiming at the same
// destination.
`timescale 1ns/1ps
module tb_clos_network #(
  parameter int NPERM = 300
);
  import perm_pkg::*;

  localparam int STEP      = 28;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NODES-1:0] src_req;
  ans_t             src_ans  [NODES];
  link_data_t       src_data [NODES];
  logic [NODES-1:0] dst_req;
  ans_t             dst_ans  [NODES];
  link_data_t       dst_data [NODES];
  logic [NODES-1:0] dst_ready;

  clos_network dut (.*);

  // destination model: registered answer
  always_ff @(posedge clk) begin
    for (int d = 0; d < NODES; d++)
      dst_ans[d] <= !dst_req[d] ? ANS_IDLE : dst_ready[d] ? ANS_ACK : ANS_NACK;
  end

  int checks = 0, failures = 0;
  int n_backtrack = 0, n_blocked = 0, n_ok = 0, n_nack = 0, n_contention = 0;
  int max_setup = 0;
  int n_perm_clean = 0;   // permutations arranged with no setup blocked
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", msg, cycle);
    end
  endtask

  initial begin
    repeat ((NPERM + 20) * 600) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit l12 [4][4];   // [first-stage switch][middle]
  bit l23 [4][4];   // [middle][third-stage switch]
  int path_mid [NODES];

  // launch one setup and follow it for STEP cycles
  task automatic setup_one(input int a, input int d, output ans_t res);
    int s, j, exp_m, t;
    s = a / 4; j = d / 4;
    exp_m = -1;
    for (int m = 3; m >= 0; m--) if (!l12[s][m] && !l23[m][j]) exp_m = m;
    for (int m = 0; m < 4 && m != exp_m; m++)
      if (!l12[s][m] && l23[m][j] && (exp_m < 0 || m < exp_m)) n_backtrack++;
    src_data[a] = make_probe(4'(d));
    src_req[a]  = 1'b1;
    res = ANS_IDLE;
    t   = 0;
    while (t < STEP) begin
      @(posedge clk); #1; t++;
      if (src_ans[a] == ANS_ACK || src_ans[a] == ANS_BACK) begin
        res = src_ans[a];
        break;
      end
    end
    if (t > max_setup) max_setup = t;
    check(res != ANS_IDLE, $sformatf("setup %0d->%0d answered within %0d cycles", a, d, STEP));
    if (exp_m >= 0) begin
      check(res == ANS_ACK, $sformatf("setup %0d->%0d expected Ack via middle %0d", a, d, exp_m));
      check(dut.req12[s*4+exp_m] && dut.req23[exp_m*4+j] && dst_req[d],
            $sformatf("setup %0d->%0d holds links via middle %0d", a, d, exp_m));
      l12[s][exp_m] = 1; l23[exp_m][j] = 1;
      path_mid[a] = exp_m;
      n_ok++;
    end else begin
      check(res == ANS_BACK, $sformatf("setup %0d->%0d expected Back (no free path)", a, d));
      n_blocked++;
      path_mid[a] = -1;
      src_req[a] = 1'b0;
      src_data[a] = '0;
    end
    while (t < STEP) begin @(posedge clk); #1; t++; end
  endtask

  task automatic release_all();
    src_req = '0;
    for (int i = 0; i < NODES; i++) src_data[i] = '0;
    repeat (12) @(posedge clk);
    #1;
    check(dst_req == '0 && dut.req12 == '0 && dut.req23 == '0, "all links released");
    for (int x = 0; x < 4; x++) for (int y = 0; y < 4; y++) begin l12[x][y] = 0; l23[x][y] = 0; end
  endtask

  int perm [NODES];
  int words [NODES];
  ans_t r;
  longint t0;

  initial begin
    src_req = '0;
    dst_ready = '1;
    for (int i = 0; i < NODES; i++) src_data[i] = '0;
    for (int x = 0; x < 4; x++) for (int y = 0; y < 4; y++) begin l12[x][y] = 0; l23[x][y] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1;

    // ---- random full permutations, setups 28 cycles apart ----
    for (int p = 0; p < NPERM; p++) begin
      int order [NODES];
      for (int i = 0; i < NODES; i++) begin perm[i] = i; order[i] = i; end
      if (p > 0) begin
        for (int i = NODES - 1; i > 0; i--) begin
          int k, tmp;
          k = $urandom_range(i, 0);
          tmp = perm[i]; perm[i] = perm[k]; perm[k] = tmp;
          k = $urandom_range(i, 0);
          tmp = order[i]; order[i] = order[k]; order[k] = tmp;
        end
      end
      t0 = cycle;
      begin
        int b0; b0 = n_blocked;
        for (int i = 0; i < NODES; i++) setup_one(order[i], perm[order[i]], r);
        if (n_blocked == b0) n_perm_clean++;
      end
      check(cycle - t0 <= 16 * STEP + 1, "full permutation arranged within 448 cycles");
      // every held path carries its own word at the same time
      for (int i = 0; i < NODES; i++) begin
        words[i] = $urandom;
        if (path_mid[i] >= 0) src_data[i] = link_data_t'(words[i]);
      end
      #1;
      for (int i = 0; i < NODES; i++)
        if (path_mid[i] >= 0)
          check(dst_data[perm[i]] == link_data_t'(words[i]),
                $sformatf("data %0d->%0d delivered", i, perm[i]));
      release_all();
    end

    // ---- two probes from the same first-stage switch in the same cycle ----
    src_data[0] = make_probe(4'd5);  src_data[1] = make_probe(4'd9);
    src_req[0]  = 1'b1;              src_req[1]  = 1'b1;
    repeat (STEP) @(posedge clk);
    #1;
    check(src_ans[0] == ANS_ACK && src_ans[1] == ANS_ACK, "both contending probes set up");
    // IC 0 wins middle 0, IC 1 is pushed to middle 1
    check(dut.req12[0] && dut.req12[1], "contending probes took middles 0 and 1");
    if (dut.req12[0] && dut.req12[1]) n_contention++;
    release_all();

    // ---- destination not ready: nAck to the source, path held ----
    dst_ready[7] = 1'b0;
    src_data[3] = make_probe(4'd7); src_req[3] = 1'b1;
    repeat (STEP) @(posedge clk);
    #1;
    check(src_ans[3] == ANS_NACK, "busy destination answers nAck");
    if (src_ans[3] == ANS_NACK) n_nack++;
    dst_ready[7] = 1'b1;
    repeat (4) @(posedge clk);
    #1;
    check(src_ans[3] == ANS_ACK, "destination becoming ready turns nAck into Ack");
    // ---- second source to the same destination: third stage answers nAck ----
    src_data[12] = make_probe(4'd7); src_req[12] = 1'b1;
    repeat (STEP) @(posedge clk);
    #1;
    check(src_ans[12] == ANS_NACK, "occupied destination output answers nAck");
    if (src_ans[12] == ANS_NACK) n_nack++;
    release_all();

    $display("permutations=%0d arranged_without_blocking=%0d", NPERM, n_perm_clean);
    $display("paths=%0d backtracks=%0d blocked=%0d nack=%0d contention=%0d max_setup_cycles=%0d",
             n_ok, n_backtrack, n_blocked, n_nack, n_contention, max_setup);
    check(n_backtrack > 0, "backtracking happened");
    check(n_contention > 0, "arbitration contention happened");
    check(n_nack > 0, "nAck happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
