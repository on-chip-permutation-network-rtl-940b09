// tb_clos_workload: the network's validation workload at scale: one set of
// 10,000 random full permutations, each arranged with sixteen path setups
// launched 28 cycles apart (448 cycles per permutation), checked path by
// path against the link-use reference model of tb_clos_network. It also
// reports how many permutations were arranged without any setup blocked.
`timescale 1ns/1ps
module tb_clos_workload;
  tb_clos_network #(.NPERM(10000)) u_run ();
  // the inner testbench ends the run and has its own watchdog; this is a
  // last-resort stop well after it
  initial #100ms $finish;
endmodule
