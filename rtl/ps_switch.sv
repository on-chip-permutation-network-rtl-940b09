// ps_switch: one 4x4 circuit-switched switching node.
//
// All three kinds of switch share this architecture and differ only in the
// probe routing algorithm of their input controls (STAGE = 1, 2 or 3).
// The control part (four input controls, the arbiter and four output
// controls) sets paths up and tears them down using the Req/Ans handshake;
// the data part (the crossbar) only carries the data lines along the paths
// that are set up. Probes travel on the data lines as well, so the switch
// needs no separate probe wires.
//
// Links: per input Req_in (in), Ans_in (out), Data_in (in); per output
// Req_out (out), Ans_out (in), Data_out (out). Data is combinational through
// the crossbar. The input controls and output controls work on the rising
// clock edge and the arbiter on the falling edge, so one probe step takes
// one cycle inside the switch plus one cycle on the link register of the
// downstream input control.
module ps_switch
  import perm_pkg::*;
#(
  parameter int unsigned STAGE = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PORTS-1:0] req_in,
  output ans_t             ans_in   [PORTS],
  input  link_data_t       data_in  [PORTS],
  output logic [PORTS-1:0] req_out,
  input  ans_t             ans_out  [PORTS],
  output link_data_t       data_out [PORTS]
);

  logic [PORTS-1:0] ic_req;
  logic [SEL_W-1:0] ic_req_out [PORTS];
  logic [PORTS-1:0] ic_granted;
  ans_t             ic_ans     [PORTS];
  logic [PORTS-1:0] oc_busy;
  logic [PORTS-1:0] ctrl_valid;
  logic [SEL_W-1:0] ctrl_sel   [PORTS];
  logic [SEL_W-1:0] xbar_sel   [PORTS];

  for (genvar i = 0; i < PORTS; i++) begin : g_ic
    ps_input_ctrl #(.STAGE(STAGE)) u_ic (
      .clk, .rst_n,
      .req_in      (req_in[i]),
      .data_in     (data_in[i]),
      .ans_in      (ans_in[i]),
      .oc_busy     (oc_busy),
      .req_valid   (ic_req[i]),
      .req_out_idx (ic_req_out[i]),
      .granted     (ic_granted[i]),
      .gnt_ans     (ic_ans[i])
    );
  end

  ps_arbiter u_arb (
    .clk, .rst_n,
    .ic_req, .ic_req_out,
    .oc_busy,
    .ans_out,
    .ic_granted, .ic_ans,
    .ctrl_valid, .ctrl_sel
  );

  for (genvar o = 0; o < PORTS; o++) begin : g_oc
    ps_output_ctrl u_oc (
      .clk, .rst_n,
      .ctrl_valid (ctrl_valid[o]),
      .ctrl_sel   (ctrl_sel[o]),
      .req_out    (req_out[o]),
      .xbar_sel   (xbar_sel[o]),
      .busy       (oc_busy[o])
    );
  end

  // handshake rules on every output link: a new Req only meets an idle
  // answer (the previous owner's answer has been withdrawn), and Ack or nAck
  // only come back while Req is held
  for (genvar o = 0; o < PORTS; o++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     $rose(req_out[o]) |-> ans_out[o] == ANS_IDLE)
      else $error("output %0d: Req raised while the link still answers", o);
    assert property (@(posedge clk) disable iff (!rst_n)
                     (ans_out[o] == ANS_ACK) |-> $past(req_out[o]))
      else $error("output %0d: Ack without Req", o);
  end

  ps_crossbar #(.N(PORTS), .W(LINK_W)) u_xbar (
    .din  (data_in),
    .sel  (xbar_sel),
    .en   (oc_busy),
    .dout (data_out)
  );

endmodule
