// tb_ps_output_ctrl: the output control must present the control-bus command
// one rising edge later on Req_out, the crossbar select and busy.
`timescale 1ns/1ps
module tb_ps_output_ctrl;
  import perm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ctrl_valid;
  logic [SEL_W-1:0] ctrl_sel;
  logic req_out, busy;
  logic [SEL_W-1:0] xbar_sel;
  int checks = 0, failures = 0;

  ps_output_ctrl dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic pv; logic [SEL_W-1:0] ps;
  initial begin
    ctrl_valid = 0; ctrl_sel = 0;
    #12;
    checks++; if (req_out || busy) begin failures++; $display("FAIL: reset state"); end
    rst_n = 1;
    pv = 0; ps = 0;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      ctrl_valid = 1'($urandom); ctrl_sel = SEL_W'($urandom);
      // before the edge: previous command
      checks++;
      if (req_out !== pv || busy !== pv || (pv && xbar_sel !== ps)) begin
        failures++; $display("FAIL: early change");
      end
      @(posedge clk); #1;
      checks++;
      if (req_out !== ctrl_valid || busy !== ctrl_valid || xbar_sel !== ctrl_sel) begin
        failures++; $display("FAIL: command not retimed");
      end
      pv = ctrl_valid; ps = ctrl_sel;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
