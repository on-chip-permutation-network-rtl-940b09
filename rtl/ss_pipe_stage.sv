// ss_pipe_stage: one pipeline stage of the source-synchronous data link.
//
// The link carries Data<16:0>, where Data<0> is the strobe and Data<16:1>
// the word. The stage registers all seventeen lines on the same edge, so the
// strobe leaves the stage aligned with the word it marks and the receiver
// never has to recover a clock from the data. In the original design each stage's
// data flip-flops are clocked by the strobe itself, which travels through a
// buffer chain to the next stage; here the lines are registered on the
// system clock and the strobe is carried as one more registered line, which
// keeps the design in one clock domain (this design's choice). Latency: one
// cycle.
module ss_pipe_stage
  import perm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  link_data_t d_in,
  output link_data_t d_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_out <= '0;
    else        d_out <= d_in;
  end

endmodule
