// perm_noc_top: a 16-node multiprocessor interconnect built on the Clos
// C(4,4,4) permutation network.
//
// Each node has a FIFO-based wrapper on its processor's system bus; the
// processors themselves are outside this module, and their buses are the
// top-level ports (one array element per node). Node i is network input i
// and network output i. Between each wrapper and the network the data lines
// pass one source-synchronous pipeline stage in each direction; Req and Ans
// are wired directly. Paths are set up, used and released independently by
// every node, so any permutation of the sixteen nodes can be held at once,
// with a fixed latency for the data of every path.
module perm_noc_top
  import perm_pkg::*;
#(
  parameter int unsigned TX_DEPTH = 16,
  parameter int unsigned RX_DEPTH = 32,
  parameter int unsigned RX_SKID  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        bus_addr  [NODES],
  input  logic [NODES-1:0]  bus_wr,
  input  logic [DATA_W-1:0] bus_wdata [NODES],
  input  logic [NODES-1:0]  bus_rd,
  output logic [DATA_W-1:0] bus_rdata [NODES]
);

  logic [NODES-1:0] src_req, dst_req;
  ans_t             src_ans  [NODES];
  ans_t             dst_ans  [NODES];
  link_data_t       ni_tx    [NODES];
  link_data_t       src_data [NODES];
  link_data_t       dst_data [NODES];
  link_data_t       ni_rx    [NODES];

  for (genvar i = 0; i < NODES; i++) begin : g_node
    ni_wrapper #(
      .TX_DEPTH (TX_DEPTH),
      .RX_DEPTH (RX_DEPTH),
      .RX_SKID  (RX_SKID)
    ) u_ni (
      .clk, .rst_n,
      .bus_addr     (bus_addr[i]),
      .bus_wr       (bus_wr[i]),
      .bus_wdata    (bus_wdata[i]),
      .bus_rd       (bus_rd[i]),
      .bus_rdata    (bus_rdata[i]),
      .net_req_out  (src_req[i]),
      .net_ans_in   (src_ans[i]),
      .net_data_out (ni_tx[i]),
      .net_req_in   (dst_req[i]),
      .net_ans_out  (dst_ans[i]),
      .net_data_in  (ni_rx[i])
    );

    ss_pipe_stage u_ss_in  (.clk, .rst_n, .d_in(ni_tx[i]),    .d_out(src_data[i]));
    ss_pipe_stage u_ss_out (.clk, .rst_n, .d_in(dst_data[i]), .d_out(ni_rx[i]));
  end

  clos_network u_net (
    .clk, .rst_n,
    .src_req, .src_ans, .src_data,
    .dst_req, .dst_ans, .dst_data
  );

endmodule
