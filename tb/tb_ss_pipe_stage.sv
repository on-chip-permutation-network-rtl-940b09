// tb_ss_pipe_stage: every line, strobe included, must come out of the stage
// exactly one cycle after it went in.
`timescale 1ns/1ps
module tb_ss_pipe_stage;
  import perm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  link_data_t d_in, d_out, prev;
  int checks = 0, failures = 0;

  ss_pipe_stage dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d_in = '1;
    #12;
    checks++; if (d_out !== '0) begin failures++; $display("FAIL: reset"); end
    rst_n = 1;
    prev = '0;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      d_in = link_data_t'($urandom);
      checks++;
      if (it > 0 && d_out !== prev) begin failures++; $display("FAIL: stage output"); end
      @(posedge clk); #1;
      checks++;
      if (d_out !== d_in) begin failures++; $display("FAIL: latency not one cycle"); end
      prev = d_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
