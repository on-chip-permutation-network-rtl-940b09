// tb_rx_circuit: words arrive with strobe transitions (with idle gaps) while
// a path is held, one even after the bus has started reading; they must
// be read back from the bus in order. Also checks
// that words are ignored without a path, that ready falls once SKID or fewer
// slots are free, and that a word arriving when full sets the overflow flag.
`timescale 1ns/1ps
module tb_rx_circuit;
  import perm_pkg::*;
  localparam int DEPTH = 32, SKID = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_wr_sel, conn, strobe_in, ready, pop, ovf_clr, empty, full, overflow;
  logic [DATA_W-1:0] dat_in, rd_data;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0;

  rx_circuit #(.DEPTH(DEPTH), .SKID(SKID)) dut (.*);

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic send(input logic [DATA_W-1:0] w);
    @(negedge clk);
    dat_in = w; strobe_in = ~strobe_in;
    @(posedge clk); #1;
  endtask

  logic [DATA_W-1:0] q [$];

  initial begin
    rd_wr_sel = 0; conn = 0; strobe_in = 0; pop = 0; ovf_clr = 0; dat_in = 0;
    #12 rst_n = 1;
    // no path held: ignored
    send(16'h1111); send(16'h2222);
    chk(empty, "words without a path are ignored");
    conn = 1;
    for (int round = 0; round < 10; round++) begin
      int n;
      n = $urandom_range(DEPTH - SKID, 1);
      rd_wr_sel = 0;
      for (int i = 0; i < n; i++) begin
        logic [DATA_W-1:0] w;
        w = DATA_W'($urandom);
        q.push_back(w);
        send(w);
        if ($urandom_range(2, 0) == 0) begin @(posedge clk); #1; end
        chk(ready == (DEPTH - q.size() > SKID), "ready reflects free slots");
      end
      chk(level == ($clog2(DEPTH)+1)'(q.size()), "level");
      rd_wr_sel = 1;
      q.push_back(16'hbeef);
      send(16'hbeef);   // a word still in flight when reading starts is kept
      chk(!ready, "not ready in bus-read mode");
      while (q.size() > 0) begin
        @(negedge clk);
        chk(rd_data == q[0], "word read back in order");
        pop = 1; void'(q.pop_front());
        @(posedge clk); #1 pop = 0;
      end
      chk(empty, "empty after reading");
    end
    // fill to full, then one more word overflows
    rd_wr_sel = 0;
    for (int i = 0; i < DEPTH; i++) send(DATA_W'(i));
    chk(full && !overflow && !ready, "full, not ready");
    send(16'hffff);
    chk(overflow, "overflow flagged");
    @(negedge clk); ovf_clr = 1; @(posedge clk); #1 ovf_clr = 0;
    chk(!overflow, "overflow cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
