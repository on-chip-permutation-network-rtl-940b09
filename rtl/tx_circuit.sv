// tx_circuit: transmit side of the node wrapper, built around the Tx FIFO.
//
// The FIFO is used in one of two modes chosen by rd_wr_sel, mirroring the
// wrapper's read/write select: with rd_wr_sel = 0 the system bus fills it
// (push/wr_data); with rd_wr_sel = 1 it is drained onto the network, one
// 16-bit word per clock while send_en is set and the FIFO is not empty.
// Each word sent appears on dat_out together with a transition of the strobe
// line; while the FIFO is empty or sending is paused the strobe does not
// move, so the receiver can tell every new word by a strobe transition.
// strobe_clr returns the strobe to 0 before a new path is set up.
// The FIFO depth and the one-transition-per-word strobe are this design's
// choices; the original design gives a 16-bit FIFO and a strobe gated by the
// FIFO-empty flag. Timing: dat_out and strobe are registered.
module tx_circuit
  import perm_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   rd_wr_sel,
  // system bus side
  input  logic                   push,
  input  logic [DATA_W-1:0]      wr_data,
  // network side
  input  logic                   send_en,
  input  logic                   strobe_clr,
  output logic [DATA_W-1:0]      dat_out,
  output logic                   strobe,
  output logic                   sent,
  // status
  output logic                   empty,
  output logic                   full,
  output logic [$clog2(DEPTH):0] level
);

  logic [DATA_W-1:0] head;
  logic              pop;

  assign pop = rd_wr_sel && send_en && !empty;

  sync_fifo #(.W(DATA_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push    (push && !rd_wr_sel),
    .wr_data (wr_data),
    .pop     (pop),
    .rd_data (head),
    .empty, .full, .level
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dat_out <= '0;
      strobe  <= 1'b0;
      sent    <= 1'b0;
    end else begin
      sent <= pop;
      if (strobe_clr) begin
        strobe <= 1'b0;
      end else if (pop) begin
        dat_out <= head;
        strobe  <= ~strobe;
      end
    end
  end

endmodule
