// clos_network: the 16x16 permutation network, a three-stage Clos network
// C(4,4,4) of twelve 4x4 switches.
//
// Network input a enters first-stage switch a[3:2] on port a[1:0]; network
// output d leaves third-stage switch d[3:2] on port d[1:0]. Output k of
// first-stage switch s feeds input s of second-stage switch k, and output j
// of second-stage switch k feeds input k of third-stage switch j, so every
// input reaches every output over four alternative paths, one through each
// second-stage switch. A source sets a path up by raising Req with the
// destination address on the data lines and waiting for Ans=Ack (path set),
// Ans=nAck (destination refused) or Ans=Back (no free path found); it
// releases the path by dropping Req. While the path is held, the data lines
// are connected straight through the three crossbars.
module clos_network
  import perm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // network inputs (sources)
  input  logic [NODES-1:0]  src_req,
  output ans_t              src_ans  [NODES],
  input  link_data_t        src_data [NODES],
  // network outputs (destinations)
  output logic [NODES-1:0]  dst_req,
  input  ans_t              dst_ans  [NODES],
  output link_data_t        dst_data [NODES]
);

  // inter-stage links, indexed [switch*4 + port] on the sending side
  logic [NODES-1:0] req12, req23;
  ans_t             ans12  [NODES];
  ans_t             ans23  [NODES];
  link_data_t       data12 [NODES];
  link_data_t       data23 [NODES];

  // the same links seen from the receiving switch
  logic [NODES-1:0] req12_r, req23_r;
  ans_t             ans12_r  [NODES];
  ans_t             ans23_r  [NODES];
  link_data_t       data12_r [NODES];
  link_data_t       data23_r [NODES];

  // perfect shuffle between stages: sender (s, k) <-> receiver (k, s)
  always_comb begin
    for (int s = 0; s < PORTS; s++) begin
      for (int k = 0; k < PORTS; k++) begin
        req12_r[k*PORTS+s]  = req12[s*PORTS+k];
        data12_r[k*PORTS+s] = data12[s*PORTS+k];
        ans12[s*PORTS+k]    = ans12_r[k*PORTS+s];
        req23_r[k*PORTS+s]  = req23[s*PORTS+k];
        data23_r[k*PORTS+s] = data23[s*PORTS+k];
        ans23[s*PORTS+k]    = ans23_r[k*PORTS+s];
      end
    end
  end

  for (genvar s = 0; s < PORTS; s++) begin : g_sw
    ps_switch #(.STAGE(1)) u_s1 (
      .clk, .rst_n,
      .req_in   (src_req[s*PORTS +: PORTS]),
      .ans_in   (src_ans[s*PORTS +: PORTS]),
      .data_in  (src_data[s*PORTS +: PORTS]),
      .req_out  (req12[s*PORTS +: PORTS]),
      .ans_out  (ans12[s*PORTS +: PORTS]),
      .data_out (data12[s*PORTS +: PORTS])
    );
    ps_switch #(.STAGE(2)) u_s2 (
      .clk, .rst_n,
      .req_in   (req12_r[s*PORTS +: PORTS]),
      .ans_in   (ans12_r[s*PORTS +: PORTS]),
      .data_in  (data12_r[s*PORTS +: PORTS]),
      .req_out  (req23[s*PORTS +: PORTS]),
      .ans_out  (ans23[s*PORTS +: PORTS]),
      .data_out (data23[s*PORTS +: PORTS])
    );
    ps_switch #(.STAGE(3)) u_s3 (
      .clk, .rst_n,
      .req_in   (req23_r[s*PORTS +: PORTS]),
      .ans_in   (ans23_r[s*PORTS +: PORTS]),
      .data_in  (data23_r[s*PORTS +: PORTS]),
      .req_out  (dst_req[s*PORTS +: PORTS]),
      .ans_out  (dst_ans[s*PORTS +: PORTS]),
      .data_out (dst_data[s*PORTS +: PORTS])
    );
  end

endmodule
