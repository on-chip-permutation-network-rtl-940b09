// tb_perm_noc_top: end-to-end test of the 16-node fabric at its default
// sizes, driven only through the processors' bus ports.
//
// Phase 1, repeated for NPERM random permutations: every node fills its Tx
// FIFO with 16 words tagged with its own number, enables its receiver, and
// the path setups are launched one node after another, 28 cycles apart.
// Nodes whose setup is answered Back (no free path) retry once the other
// paths are released. Each node must end up with exactly the 16 words of
// the node that targeted it, in order. Setup time (Req to Ack at the
// network input) must stay within 28 cycles.
// Phase 2: two transfers into the same node without reading in between
// fill its Rx FIFO; the receiver must pause the second sender with nAck and
// the transfer must resume after software empties the FIFO.
// Phase 3: all sixteen setups launched in the same cycle, so probes contend
// for switch outputs; every setup that succeeds must deliver its data.
// Each mechanism (backtracking, Back to the source, arbitration contention,
// nAck pause, data delivery) is counted and must occur at least once.
`timescale 1ns/1ps
module tb_perm_noc_top;
  import perm_pkg::*;
  localparam int NPERM = 100;
  localparam int K     = 16;   // words per transfer (default Tx FIFO depth)
  localparam int STEP  = 28;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0]        bus_addr  [NODES];
  logic [NODES-1:0]  bus_wr, bus_rd;
  logic [DATA_W-1:0] bus_wdata [NODES];
  logic [DATA_W-1:0] bus_rdata [NODES];

  perm_noc_top dut (.*);

  int checks = 0, failures = 0;
  int n_backtrack = 0, n_blocked = 0, n_pause = 0, n_deny = 0, n_words = 0, max_setup = 0;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- monitors ----
  int t_req [NODES];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NODES; i++) begin
      if (!dut.src_req[i]) t_req[i] = 0;
      else if (t_req[i] >= 0) begin
        t_req[i]++;
        if (dut.src_ans[i] == ANS_ACK || dut.src_ans[i] == ANS_BACK) begin
          if (t_req[i] > max_setup) max_setup = t_req[i];
          checks++;
          if (t_req[i] > STEP) begin
            failures++; $display("FAIL: setup of node %0d took %0d cycles", i, t_req[i]);
          end
          t_req[i] = -1;
        end
      end
      if (dut.u_net.ans12_r[i] == ANS_BACK) n_backtrack++;
      if (dut.src_ans[i] == ANS_NACK && dut.g_node[0].u_ni.tstate == 3 && i == 0) n_pause++;
    end
  end
  for (genvar s = 0; s < 4; s++) begin : g_mon
    always @(negedge clk) if (rst_n)
      n_deny += $countones(dut.u_net.g_sw[s].u_s1.u_arb.deny_q);
  end

  // ---- bus helpers ----
  task automatic wr(input int n, input logic [1:0] a, input logic [15:0] d);
    @(negedge clk); bus_addr[n] = a; bus_wdata[n] = d; bus_wr[n] = 1;
    @(negedge clk); bus_wr[n] = 0;
  endtask
  task automatic rd(input int n, input logic [1:0] a, output logic [15:0] d);
    @(negedge clk); bus_addr[n] = a; bus_rd[n] = (a == 2'd3); #1 d = bus_rdata[n];
    @(negedge clk); bus_rd[n] = 0;
  endtask

  localparam logic [15:0] RXEN = 16'h0080, TXNET = 16'h0020, SETUP = 16'h0010, RXBUS = 16'h0040;

  // fill node n's Tx FIFO with K tagged words
  task automatic fill(input int n, input int tag);
    wr(n, 2'd0, RXEN);
    for (int k = 0; k < K; k++) wr(n, 2'd2, 16'((tag << 8) | (n << 4) | (k & 15)));
  endtask

  // wait until node n's transfer is over (Tx empty) or blocked
  task automatic wait_done(input int n, output bit blocked);
    logic [15:0] st;
    blocked = 0;
    for (int t = 0; t < 400; t++) begin
      rd(n, 2'd1, st);
      if (st[2]) begin blocked = 1; return; end
      if (st[0] && st[3]) return;
    end
    chk(0, $sformatf("node %0d transfer did not finish", n));
  endtask

  // read everything in node n's Rx FIFO and compare with the expected words
  task automatic drain(input int n, input int src, input int tag, input int count, input int first,
                       input bit want_empty = 1);
    logic [15:0] st, w;
    wr(n, 2'd0, RXEN | RXBUS);
    for (int k = 0; k < count; k++) begin
      rd(n, 2'd3, w);
      chk(w == 16'((tag << 8) | (src << 4) | ((first + k) & 15)),
          $sformatf("node %0d word %0d from node %0d: got %h", n, first + k, src, w));
      n_words++;
    end
    rd(n, 2'd1, st);
    if (want_empty) chk(st[5], $sformatf("node %0d Rx empty after %0d words", n, count));
    wr(n, 2'd0, RXEN);
  endtask

  int perm [NODES], order [NODES];
  bit blk [NODES];
  logic [15:0] st;

  initial begin
    bus_wr = '0; bus_rd = '0;
    for (int i = 0; i < NODES; i++) begin bus_addr[i] = 0; bus_wdata[i] = 0; t_req[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ---------- phase 1 ----------
    for (int p = 0; p < NPERM; p++) begin
      for (int i = 0; i < NODES; i++) begin perm[i] = i; order[i] = i; end
      for (int i = NODES - 1; i > 0; i--) begin
        int k, tmp;
        k = $urandom_range(i, 0); tmp = perm[i]; perm[i] = perm[k]; perm[k] = tmp;
        k = $urandom_range(i, 0); tmp = order[i]; order[i] = order[k]; order[k] = tmp;
      end
      for (int i = 0; i < NODES; i++) fill(i, p & 15);
      for (int i = 0; i < NODES; i++) begin
        int n; n = order[i];
        wr(n, 2'd0, RXEN | TXNET | SETUP | 16'(perm[n]));
        repeat (STEP - 2) @(posedge clk);
      end
      for (int i = 0; i < NODES; i++) begin
        wait_done(i, blk[i]);
        if (blk[i]) n_blocked++;
      end
      for (int i = 0; i < NODES; i++) wr(i, 2'd0, RXEN);
      // blocked nodes retry on the now empty network, one at a time
      for (int i = 0; i < NODES; i++) if (blk[i]) begin
        bit b;
        repeat (10) @(posedge clk);
        wr(i, 2'd0, RXEN | TXNET | SETUP | 16'(perm[i]));
        wait_done(i, b);
        chk(!b, $sformatf("retry of node %0d on an empty network", i));
        wr(i, 2'd0, RXEN);
      end
      repeat (10) @(posedge clk);
      for (int i = 0; i < NODES; i++) drain(perm[i], i, p & 15, K, 0);
    end

    // ---------- phase 2: flow control ----------
    fill(0, 8'h21); fill(1, 8'h21);
    wr(0, 2'd0, RXEN | TXNET | SETUP | 16'd5);
    wait_done(0, blk[0]);
    wr(0, 2'd0, RXEN);
    repeat (10) @(posedge clk);
    fill(0, 8'h22);
    wr(0, 2'd0, RXEN | TXNET | SETUP | 16'd5);
    repeat (100) @(posedge clk);
    rd(0, 2'd1, st);
    chk(st[0] && !st[3], "second transfer paused with words left");
    chk(n_pause > 0, "receiver answered nAck during the transfer");
    drain(5, 0, 8'h21, K, 0, 0);     // first transfer; the second's head stays
    repeat (100) @(posedge clk);
    rd(0, 2'd1, st);
    chk(st[3], "second transfer completed after the receiver was read");
    wr(0, 2'd0, RXEN);
    repeat (10) @(posedge clk);
    drain(5, 0, 8'h22, K, 0);
    rd(5, 2'd1, st);
    chk(!st[8], "no overflow at the paused receiver");
    wr(1, 2'd0, 16'h0000);
    // node 1's Tx FIFO still holds its words; send them to node 2
    wr(1, 2'd0, RXEN | TXNET | SETUP | 16'd2);
    wait_done(1, blk[1]);
    wr(1, 2'd0, RXEN);
    repeat (10) @(posedge clk);
    drain(2, 1, 8'h21, K, 0);

    // ---------- phase 3: simultaneous setups ----------
    for (int i = 0; i < NODES; i++) begin perm[i] = (i * 5 + 3) & 15; fill(i, 8'h33); end
    @(negedge clk);
    for (int i = 0; i < NODES; i++) begin
      bus_addr[i] = 2'd0; bus_wdata[i] = RXEN | TXNET | SETUP | 16'(perm[i]); bus_wr[i] = 1;
    end
    @(negedge clk); bus_wr = '0;
    for (int i = 0; i < NODES; i++) begin wait_done(i, blk[i]); if (blk[i]) n_blocked++; end
    for (int i = 0; i < NODES; i++) wr(i, 2'd0, RXEN);
    for (int i = 0; i < NODES; i++) if (blk[i]) begin
      bit b;
      repeat (10) @(posedge clk);
      wr(i, 2'd0, RXEN | TXNET | SETUP | 16'(perm[i]));
      wait_done(i, b);
      chk(!b, "retry after simultaneous setups");
      wr(i, 2'd0, RXEN);
    end
    repeat (10) @(posedge clk);
    for (int i = 0; i < NODES; i++) drain(perm[i], i, 8'h33, K, 0);

    $display("words=%0d backtrack_cycles=%0d blocked=%0d nack_pause_cycles=%0d arb_denials=%0d max_setup=%0d",
             n_words, n_backtrack, n_blocked, n_pause, n_deny, max_setup);
    chk(n_words > 0, "data delivered");
    chk(n_backtrack > 0, "backtracking happened");
    chk(n_blocked > 0, "Back to the source happened");
    chk(n_pause > 0, "nAck flow control happened");
    chk(n_deny > 0, "arbitration contention happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
