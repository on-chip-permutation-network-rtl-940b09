// tb_ps_crossbar: random selects, enables and data on the 4x4 crossbar;
// every output is compared with a model of the output multiplexers.
`timescale 1ns/1ps
module tb_ps_crossbar;
  import perm_pkg::*;
  link_data_t din  [PORTS];
  logic [SEL_W-1:0] sel [PORTS];
  logic [PORTS-1:0] en;
  link_data_t dout [PORTS];
  int checks = 0, failures = 0;

  ps_crossbar dut (.din, .sel, .en, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      for (int i = 0; i < PORTS; i++) begin
        din[i] = link_data_t'($urandom);
        sel[i] = SEL_W'($urandom);
      end
      en = PORTS'($urandom);
      #1;
      for (int o = 0; o < PORTS; o++) begin
        checks++;
        if (dout[o] !== (en[o] ? din[sel[o]] : '0)) begin
          failures++;
          $display("FAIL: out %0d sel %0d en %0b got %h", o, sel[o], en[o], dout[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
