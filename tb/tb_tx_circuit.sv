// tb_tx_circuit: the bus fills the Tx FIFO (past full), then the FIFO is
// drained with send_en toggled at random. Every word must appear on dat_out
// in order, exactly once, marked by one strobe transition; no transition
// may occur while sending is paused or the FIFO is empty; strobe_clr must
// return the strobe to 0.
`timescale 1ns/1ps
module tb_tx_circuit;
  import perm_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_wr_sel, push, send_en, strobe_clr, strobe, sent, empty, full;
  logic [DATA_W-1:0] wr_data, dat_out;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0;

  tx_circuit #(.DEPTH(DEPTH)) dut (.*);

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

  logic [DATA_W-1:0] q [$];
  logic prev_strobe;
  int got;

  initial begin
    rd_wr_sel = 0; push = 0; send_en = 0; strobe_clr = 0; wr_data = 0;
    #12 rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      int n;
      n = $urandom_range(DEPTH + 3, 1);
      rd_wr_sel = 0;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        push = 1; wr_data = DATA_W'($urandom);
        if (q.size() < DEPTH) q.push_back(wr_data);
        @(posedge clk); #1 push = 0;
      end
      chk(level == ($clog2(DEPTH)+1)'(q.size()), "level after fill");
      chk(full == (q.size() == DEPTH), "full flag");
      // a push in read mode must be ignored
      rd_wr_sel = 1;
      @(negedge clk); push = 1; wr_data = 16'hdead;
      @(posedge clk); #1 push = 0;
      prev_strobe = strobe;
      got = 0;
      for (int c = 0; c < 200 && q.size() > 0; c++) begin
        @(negedge clk);
        send_en = 1'($urandom);
        @(posedge clk); #1;
        if (strobe != prev_strobe) begin
          chk(send_en, "strobe moves only while sending");
          chk(dat_out == q[0], "word order");
          void'(q.pop_front());
          got++;
        end
        prev_strobe = strobe;
      end
      chk(q.size() == 0 && empty, "all words sent");
      repeat (3) @(posedge clk); #1;
      chk(strobe == prev_strobe, "no strobe while empty");
      send_en = 0;
      strobe_clr = 1; @(posedge clk); #1 strobe_clr = 0;
      chk(strobe == 0, "strobe cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
