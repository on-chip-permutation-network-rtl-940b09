// ps_crossbar: the data part of a switch, a 4x4 full-connecting matrix made
// of one multiplexer per output.
//
// Output o carries input sel[o] while en[o] is set and all zeros otherwise,
// so an unconnected output never shows a stale word or a strobe edge. The
// matrix is purely combinational: once a path is set up, data crosses the
// switch in the same cycle, which is what gives the circuit-switched data a
// fixed latency. The all-zeros idle value is this design's choice.
module ps_crossbar
  import perm_pkg::*;
#(
  parameter int unsigned N = PORTS,
  parameter int unsigned W = LINK_W
) (
  input  logic [W-1:0]         din  [N],
  input  logic [$clog2(N)-1:0] sel  [N],
  input  logic [N-1:0]         en,
  output logic [W-1:0]         dout [N]
);

  always_comb begin
    for (int o = 0; o < N; o++) begin
      dout[o] = en[o] ? din[sel[o]] : '0;
    end
  end

endmodule
