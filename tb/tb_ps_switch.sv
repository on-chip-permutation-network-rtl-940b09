// tb_ps_switch: a first-stage and a second-stage switch, each with a model
// of the downstream switches that answers Ack, or Back on outputs marked
// blocked. Checks the first-stage search order past blocked outputs, the
// second-stage routing on D3D2, arbitration between two probes arriving in
// the same cycle (the lower input wins, the other is answered Back), data
// crossing along every held path, and release.
`timescale 1ns/1ps
module tb_ps_switch;
  import perm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [PORTS-1:0] req_in [2];
  ans_t             ans_in [2][PORTS];
  link_data_t       din    [2][PORTS];
  logic [PORTS-1:0] req_out[2];
  ans_t             ans_out[2][PORTS];
  link_data_t       dout   [2][PORTS];
  logic [PORTS-1:0] blocked;
  int checks = 0, failures = 0;

  ps_switch #(.STAGE(1)) u_s1 (.clk, .rst_n, .req_in(req_in[0]), .ans_in(ans_in[0]), .data_in(din[0]),
    .req_out(req_out[0]), .ans_out(ans_out[0]), .data_out(dout[0]));
  ps_switch #(.STAGE(2)) u_s2 (.clk, .rst_n, .req_in(req_in[1]), .ans_in(ans_in[1]), .data_in(din[1]),
    .req_out(req_out[1]), .ans_out(ans_out[1]), .data_out(dout[1]));

  always_ff @(posedge clk) begin
    for (int k = 0; k < 2; k++)
      for (int o = 0; o < PORTS; o++)
        ans_out[k][o] <= !req_out[k][o] ? ANS_IDLE : (k == 0 && blocked[o]) ? ANS_BACK : ANS_ACK;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int k = 0; k < 2; k++) begin
      req_in[k] = '0;
      for (int i = 0; i < PORTS; i++) din[k][i] = '0;
    end
    blocked = 4'b0011;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // first stage: outputs 0 and 1 answer Back, the probe must end on 2
    din[0][2] = make_probe(4'hA); req_in[0][2] = 1;
    repeat (15) @(posedge clk); #1;
    chk(ans_in[0][2] == ANS_ACK, "stage 1 probe acknowledged");
    chk(req_out[0] == 4'b0100, "stage 1 probe passed blocked outputs 0,1 and holds 2");
    din[0][2] = 17'h1abcd;
    #1 chk(dout[0][2] == 17'h1abcd, "data crosses stage 1 switch");
    // a second probe: 0,1 blocked, 2 busy -> 3
    din[0][3] = make_probe(4'h3); req_in[0][3] = 1;
    repeat (15) @(posedge clk); #1;
    chk(ans_in[0][3] == ANS_ACK && req_out[0] == 4'b1100, "second probe holds output 3");
    // a third probe finds nothing left: Back
    din[0][0] = make_probe(4'h5); req_in[0][0] = 1;
    repeat (15) @(posedge clk); #1;
    chk(ans_in[0][0] == ANS_BACK && req_out[0] == 4'b1100, "third probe answered Back");
    req_in[0] = '0;
    repeat (4) @(posedge clk); #1;
    chk(req_out[0] == 4'b0000 && ans_in[0][2] == ANS_IDLE, "stage 1 released");

    // second stage: inputs 0 and 1 both want D3D2 = 01 in the same cycle
    din[1][0] = make_probe(4'b0110); din[1][1] = make_probe(4'b0101);
    din[1][2] = make_probe(4'b1100);
    req_in[1] = 4'b0111;
    repeat (10) @(posedge clk); #1;
    chk(ans_in[1][0] == ANS_ACK, "input 0 wins output 1");
    chk(ans_in[1][1] == ANS_BACK, "input 1 loses and is answered Back");
    chk(ans_in[1][2] == ANS_ACK, "input 2 routed to output 3");
    chk(req_out[1] == 4'b1010, "outputs 1 and 3 held");
    din[1][0] = 17'h0f00f; din[1][2] = 17'h12345;
    #1;
    chk(dout[1][1] == 17'h0f00f && dout[1][3] == 17'h12345, "data on both paths");
    chk(dout[1][0] == '0 && dout[1][2] == '0, "idle outputs carry nothing");
    req_in[1] = 4'b0110;   // input 0 releases, input 1 still asserts Req in Back
    repeat (4) @(posedge clk); #1;
    chk(req_out[1] == 4'b1000, "output 1 released");
    req_in[1] = 4'b0100;
    repeat (2) @(posedge clk); #1;
    req_in[1] = 4'b0110;   // input 1 tries again and now gets output 1
    repeat (10) @(posedge clk); #1;
    chk(ans_in[1][1] == ANS_ACK && req_out[1] == 4'b1010, "retry after release succeeds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
