// rx_circuit: receive side of the node wrapper, built around the Rx FIFO.
//
// While a path into this node is held (conn), every transition of the
// incoming strobe line writes the word on dat_in into the FIFO. The system
// bus reads it (pop, rd_data) when rd_wr_sel = 1; rd_wr_sel = 0 is the
// receiving mode in which the node accepts new paths and data. Words that
// are still in flight when software switches to reading are kept, since
// the FIFO here runs on one clock and can be written and read in the same
// cycle (the original design switches the FIFO's clock between the two sides).
// ready tells the network interface whether the receiver
// can take a path or more data: it is set while more than SKID words are
// free, leaving room for the words already in flight when the interface
// answers nAck to pause the sender. A word that arrives while the FIFO is
// full is dropped and sets the sticky overflow flag (cleared by ovf_clr).
// Depth, skid and the strobe-transition write are this design's choices.
module rx_circuit
  import perm_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned SKID  = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   rd_wr_sel,
  // network side
  input  logic                   conn,
  input  logic [DATA_W-1:0]      dat_in,
  input  logic                   strobe_in,
  output logic                   ready,
  // system bus side
  input  logic                   pop,
  output logic [DATA_W-1:0]      rd_data,
  input  logic                   ovf_clr,
  // status
  output logic                   empty,
  output logic                   full,
  output logic                   overflow,
  output logic [$clog2(DEPTH):0] level
);

  logic strobe_q;
  logic word_in;

  assign word_in = conn && (strobe_in != strobe_q);

  sync_fifo #(.W(DATA_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push    (word_in),
    .wr_data (dat_in),
    .pop     (pop && rd_wr_sel),
    .rd_data (rd_data),
    .empty, .full, .level
  );

  assign ready = !rd_wr_sel && (int'(DEPTH) - int'(level) > int'(SKID));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      strobe_q <= 1'b0;
      overflow <= 1'b0;
    end else begin
      strobe_q <= strobe_in;
      if (ovf_clr)              overflow <= 1'b0;
      else if (word_in && full) overflow <= 1'b1;
    end
  end

endmodule
