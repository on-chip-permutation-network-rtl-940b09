// tb_ps_input_ctrl: directed probe sequences for the input control of each
// stage (three instances, STAGE = 1, 2, 3, fed with the same inputs; each
// sequence checks the instance it is written for). Covered: first-stage
// non-repetitive search over idle outputs with Back from the arbiter and
// from downstream, exhaustion answered with Back, relaying Ack and nAck,
// release; second stage routing on D3D2 and answering Back; third stage
// routing on D1D0 and answering nAck.
`timescale 1ns/1ps
module tb_ps_input_ctrl;
  import perm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_in, granted;
  link_data_t data_in;
  logic [PORTS-1:0] oc_busy;
  ans_t gnt_ans;
  ans_t ans_in [3];
  logic req_valid [3];
  logic [SEL_W-1:0] req_out_idx [3];
  int checks = 0, failures = 0;

  ps_input_ctrl #(.STAGE(1)) u1 (.clk, .rst_n, .req_in, .data_in, .ans_in(ans_in[0]), .oc_busy,
    .req_valid(req_valid[0]), .req_out_idx(req_out_idx[0]), .granted, .gnt_ans);
  ps_input_ctrl #(.STAGE(2)) u2 (.clk, .rst_n, .req_in, .data_in, .ans_in(ans_in[1]), .oc_busy,
    .req_valid(req_valid[1]), .req_out_idx(req_out_idx[1]), .granted, .gnt_ans);
  ps_input_ctrl #(.STAGE(3)) u3 (.clk, .rst_n, .req_in, .data_in, .ans_in(ans_in[2]), .oc_busy,
    .req_valid(req_valid[2]), .req_out_idx(req_out_idx[2]), .granted, .gnt_ans);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply inputs, then look at the outputs after the next rising edge
  task automatic step(input logic r, input logic [3:0] busy, input logic g, input ans_t a);
    req_in = r; oc_busy = busy; granted = g; gnt_ans = a;
    @(posedge clk); #1;
  endtask

  task automatic expect_ic(input int k, input logic v, input int idx, input ans_t a, input string s);
    checks++;
    if (req_valid[k] !== v || (v && req_out_idx[k] != SEL_W'(idx)) || ans_in[k] != a) begin
      failures++;
      $display("FAIL stage %0d: %s (valid=%0b idx=%0d ans=%0d)", k + 1, s, req_valid[k],
               req_out_idx[k], ans_in[k]);
    end
  endtask

  initial begin
    req_in = 0; granted = 0; gnt_ans = ANS_IDLE; oc_busy = '0; data_in = make_probe(4'b1011);
    @(posedge clk); #1 rst_n = 1;
    step(0, 4'b0000, 0, ANS_IDLE);
    // ---- stage 1 ----
    step(1, 4'b0001, 0, ANS_IDLE);  expect_ic(0, 1, 1, ANS_IDLE, "first idle output is 1");
    step(1, 4'b0001, 0, ANS_BACK);  expect_ic(0, 1, 2, ANS_IDLE, "lost arbitration, tries 2");
    step(1, 4'b0001, 1, ANS_IDLE);  expect_ic(0, 1, 2, ANS_IDLE, "granted 2");
    step(1, 4'b0101, 0, ANS_BACK);  expect_ic(0, 1, 3, ANS_IDLE, "Back from stage 2, tries 3");
    step(1, 4'b0011, 1, ANS_IDLE);  expect_ic(0, 1, 3, ANS_IDLE, "granted 3");
    step(1, 4'b1001, 0, ANS_BACK);  expect_ic(0, 0, 0, ANS_BACK, "all tried: Back to source");
    step(1, 4'b0000, 0, ANS_IDLE);  expect_ic(0, 0, 0, ANS_BACK, "holds Back until release");
    step(0, 4'b0000, 0, ANS_IDLE);  expect_ic(0, 0, 0, ANS_IDLE, "released");
    step(1, 4'b1111, 0, ANS_IDLE);  expect_ic(0, 0, 0, ANS_BACK, "no idle output: Back");
    step(0, 4'b0000, 0, ANS_IDLE);
    step(1, 4'b0000, 0, ANS_IDLE);  expect_ic(0, 1, 0, ANS_IDLE, "tries output 0 first");
    step(1, 4'b0000, 1, ANS_IDLE);  expect_ic(0, 1, 0, ANS_IDLE, "granted 0");
    step(1, 4'b0001, 0, ANS_NACK);  expect_ic(0, 1, 0, ANS_NACK, "relays nAck");
    step(1, 4'b0001, 0, ANS_ACK);   expect_ic(0, 1, 0, ANS_ACK, "relays Ack");
    step(0, 4'b0001, 0, ANS_ACK);   expect_ic(0, 0, 0, ANS_IDLE, "release drops request");
    // ---- stage 2: destination 1011 -> output D3D2 = 2 ----
    step(0, 4'b0000, 0, ANS_IDLE);
    step(1, 4'b0000, 0, ANS_IDLE);  expect_ic(1, 1, 2, ANS_IDLE, "routes on D3D2");
    step(1, 4'b0000, 1, ANS_IDLE);  expect_ic(1, 1, 2, ANS_IDLE, "granted");
    step(1, 4'b0100, 0, ANS_NACK);  expect_ic(1, 1, 2, ANS_NACK, "relays nAck");
    step(1, 4'b0100, 0, ANS_ACK);   expect_ic(1, 1, 2, ANS_ACK, "relays Ack");
    step(0, 4'b0000, 0, ANS_IDLE);  expect_ic(1, 0, 0, ANS_IDLE, "released");
    step(1, 4'b0100, 0, ANS_IDLE);  expect_ic(1, 0, 0, ANS_BACK, "busy output: Back");
    step(0, 4'b0000, 0, ANS_IDLE);  expect_ic(1, 0, 0, ANS_IDLE, "released after Back");
    step(1, 4'b0000, 0, ANS_IDLE);  expect_ic(1, 1, 2, ANS_IDLE, "asks again");
    step(1, 4'b0000, 0, ANS_BACK);  expect_ic(1, 0, 0, ANS_BACK, "lost arbitration: Back");
    // ---- stage 3: destination 1011 -> output D1D0 = 3 ----
    step(0, 4'b0000, 0, ANS_IDLE);
    step(1, 4'b0000, 0, ANS_IDLE);  expect_ic(2, 1, 3, ANS_IDLE, "routes on D1D0");
    step(1, 4'b0000, 1, ANS_IDLE);  expect_ic(2, 1, 3, ANS_IDLE, "granted");
    step(1, 4'b1000, 0, ANS_ACK);   expect_ic(2, 1, 3, ANS_ACK, "relays Ack");
    step(0, 4'b1000, 0, ANS_IDLE);  expect_ic(2, 0, 0, ANS_IDLE, "released");
    step(1, 4'b1000, 0, ANS_IDLE);  expect_ic(2, 0, 0, ANS_NACK, "busy destination: nAck");
    step(0, 4'b0000, 0, ANS_IDLE);
    step(1, 4'b0000, 0, ANS_IDLE);  expect_ic(2, 1, 3, ANS_IDLE, "asks again");
    step(1, 4'b0000, 0, ANS_BACK);  expect_ic(2, 0, 0, ANS_NACK, "lost arbitration: nAck");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
