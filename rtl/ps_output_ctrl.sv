// ps_output_ctrl: output control (OC) of one switch output.
//
// The OC is the re-timing stage between the arbiter and the link. The arbiter
// (falling-edge logic) puts a command on the control bus: whether the output
// is owned and by which input. The OC registers that command on the rising
// edge and from then on drives Req_out, the crossbar select for its output
// and the busy flag it reports on the status bus. Req_out is simply the
// registered ownership: it rises one rising edge after the grant and falls
// one rising edge after the owner lets go, so every release leaves the link
// with Req low for at least one full cycle. Reset clears the output to idle
// (this design's choice; the reset state is not specified).
module ps_output_ctrl
  import perm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // control bus from the arbiter
  input  logic             ctrl_valid,
  input  logic [SEL_W-1:0] ctrl_sel,
  // to the link and the crossbar
  output logic             req_out,
  output logic [SEL_W-1:0] xbar_sel,
  // status bus
  output logic             busy
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      xbar_sel <= '0;
    end else begin
      busy     <= ctrl_valid;
      xbar_sel <= ctrl_sel;
    end
  end

  assign req_out = busy;

endmodule
