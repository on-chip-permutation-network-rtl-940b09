// tb_ni_wrapper: one wrapper whose network input port is looped back to its
// own output port through a model of a held path (Req and Ans delayed three
// cycles each way, data two cycles). Software actions go through the bus
// registers. Checked: the probe carries the destination, Ack sets "path
// set", all words written to the Tx FIFO arrive in order in the Rx FIFO,
// the receiver pauses the sender with nAck when its FIFO fills and the
// transfer resumes when software reads, a disabled receiver answers nAck,
// an Ans=Back from the network drops Req and reports "blocked".
`timescale 1ns/1ps
module tb_ni_wrapper;
  import perm_pkg::*;
  localparam int TXD = 16, RXD = 16, SKID = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] bus_addr;
  logic bus_wr, bus_rd;
  logic [DATA_W-1:0] bus_wdata, bus_rdata;
  logic net_req_out, net_req_in;
  ans_t net_ans_in, net_ans_out;
  link_data_t net_data_out, net_data_in;
  logic force_back;
  int checks = 0, failures = 0, pauses = 0;

  ni_wrapper #(.TX_DEPTH(TXD), .RX_DEPTH(RXD), .RX_SKID(SKID)) dut (.*);

  // loopback path model
  logic [2:0] req_d;
  ans_t       ans_d [3];
  link_data_t dat_d [2];
  always_ff @(posedge clk) begin
    req_d    <= {req_d[1:0], net_req_out};
    ans_d[0] <= net_ans_out; ans_d[1] <= ans_d[0]; ans_d[2] <= ans_d[1];
    dat_d[0] <= net_data_out; dat_d[1] <= dat_d[0];
  end
  assign net_req_in  = req_d[2] && net_req_out;
  assign net_data_in = dat_d[1];
  assign net_ans_in  = force_back ? ANS_BACK : net_req_out ? ans_d[2] : ANS_IDLE;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic wr(input logic [1:0] a, input logic [15:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk); bus_wr = 0;
  endtask

  task automatic rd(input logic [1:0] a, output logic [15:0] d);
    @(negedge clk); bus_addr = a; bus_rd = (a == 2'd3); #1 d = bus_rdata;
    @(negedge clk); bus_rd = 0;
  endtask

  logic [15:0] st, w;
  logic [15:0] q [$];
  int t;

  initial begin
    bus_addr = 0; bus_wr = 0; bus_rd = 0; bus_wdata = 0; force_back = 0;
    req_d = 0; for (int i = 0; i < 3; i++) ans_d[i] = ANS_IDLE; dat_d[0] = '0; dat_d[1] = '0;
    #12 rst_n = 1;
    // fill the Tx FIFO from the bus
    for (int i = 0; i < TXD; i++) begin
      w = 16'($urandom); q.push_back(w); wr(2'd2, w);
    end
    rd(2'd1, st);
    chk(st[4] && !st[3], "Tx FIFO full");
    // receiver disabled: setup gets nAck
    wr(2'd0, 16'h0020 | 16'h0010 | 16'd9);            // setup, Tx drains, dest 9
    repeat (12) @(posedge clk);
    chk(net_data_out[4:1] == 4'd9 || dut.tstate != 2, "probe carries destination");
    rd(2'd1, st);
    chk(st[1] && !st[0], "disabled receiver answers nAck");
    // enable the receiver: nAck becomes Ack, transfer starts, pauses at SKID
    wr(2'd0, 16'h0080 | 16'h0020 | 16'h0010 | 16'd9);
    t = 0;
    while (t < 200) begin
      @(posedge clk); t++;
      if (net_ans_in == ANS_NACK && dut.tstate == 3) begin pauses++; break; end
    end
    chk(pauses > 0, "receiver paused the sender with nAck");
    rd(2'd1, st);
    chk(st[0] && st[7], "path set and incoming path held");
    // switch the Rx FIFO to bus reads whenever it has words, back to network otherwise
    t = 0;
    while (q.size() > 0 && t < 400) begin
      rd(2'd1, st);
      if (!st[5]) begin
        wr(2'd0, 16'h00C0 | 16'h0020 | 16'h0010 | 16'd9);   // Rx to bus
        rd(2'd3, w);
        chk(w == q[0], $sformatf("word %0d arrived in order", TXD - q.size()));
        void'(q.pop_front());
        wr(2'd0, 16'h0080 | 16'h0020 | 16'h0010 | 16'd9);   // Rx to network
      end
      t++;
    end
    chk(q.size() == 0, "all words received");
    rd(2'd1, st);
    chk(st[3] && !st[8], "Tx empty, no overflow");
    // release
    wr(2'd0, 16'h0080);
    repeat (8) @(posedge clk);
    chk(!net_req_out && net_ans_out == ANS_IDLE, "path released");
    // network answers Back: blocked
    force_back = 1;
    wr(2'd0, 16'h0010 | 16'd3);
    repeat (6) @(posedge clk);
    rd(2'd1, st);
    chk(st[2] && !net_req_out, "Back reported as blocked, Req dropped");
    force_back = 0;
    wr(2'd0, 16'h0000);
    repeat (3) @(posedge clk);
    rd(2'd1, st);
    chk(!st[2], "blocked cleared by release");
    $display("pauses=%0d", pauses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
