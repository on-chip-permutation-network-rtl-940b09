// tb_ps_arbiter: random requests, status and answers into the arbiter.
// A reference model of ownership (keep while the owner asks, grant a free,
// idle output to the lowest-numbered requester, deny the others) is updated
// on every falling edge and compared with the grant bus and control bus.
`timescale 1ns/1ps
module tb_ps_arbiter;
  import perm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [PORTS-1:0] ic_req, oc_busy, ic_granted, ctrl_valid;
  logic [SEL_W-1:0] ic_req_out [PORTS];
  logic [SEL_W-1:0] ctrl_sel   [PORTS];
  ans_t ans_out [PORTS];
  ans_t ic_ans  [PORTS];
  int checks = 0, failures = 0, contention = 0;

  ps_arbiter dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  m_owner [PORTS];   // -1 when free
  bit  m_deny  [PORTS];

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    ic_req = '0; oc_busy = '0;
    for (int i = 0; i < PORTS; i++) begin ic_req_out[i] = '0; ans_out[i] = ANS_IDLE; m_owner[i] = -1; m_deny[i] = 0; end
    #12 rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      @(posedge clk); #1;
      // owners mostly keep asking; others ask at random
      for (int i = 0; i < PORTS; i++) begin
        bit owns; owns = 0;
        for (int o = 0; o < PORTS; o++) if (m_owner[o] == i) owns = 1;
        if (!(owns && $urandom_range(3, 0) != 0)) begin
          ic_req[i]     = 1'($urandom);
          ic_req_out[i] = SEL_W'($urandom);
        end
      end
      for (int o = 0; o < PORTS; o++) begin
        oc_busy[o] = (m_owner[o] >= 0) ? 1'b1 : ($urandom_range(3, 0) == 0);
        ans_out[o] = ans_t'($urandom);
      end
      // reference decision for the coming falling edge
      for (int o = 0; o < PORTS; o++) begin
        int n; n = 0;
        if (m_owner[o] >= 0 && !(ic_req[m_owner[o]] && ic_req_out[m_owner[o]] == o))
          m_owner[o] = -1;
        else if (m_owner[o] < 0 && !oc_busy[o]) begin
          for (int i = 0; i < PORTS; i++)
            if (ic_req[i] && ic_req_out[i] == o) begin
              n++;
              if (m_owner[o] < 0) m_owner[o] = i;
            end
          if (n > 1) contention++;
        end
      end
      for (int i = 0; i < PORTS; i++) m_deny[i] = ic_req[i] && m_owner[ic_req_out[i]] != i;
      @(negedge clk); #1;
      for (int i = 0; i < PORTS; i++) begin
        bit g; ans_t a;
        g = ic_req[i] && m_owner[ic_req_out[i]] == i;
        a = g ? ans_out[ic_req_out[i]] : m_deny[i] ? ANS_BACK : ANS_IDLE;
        chk(ic_granted[i] == g, $sformatf("grant of IC %0d", i));
        chk(ic_ans[i] == a, $sformatf("answer to IC %0d", i));
      end
      for (int o = 0; o < PORTS; o++) begin
        chk(ctrl_valid[o] == (m_owner[o] >= 0), $sformatf("control valid %0d", o));
        if (m_owner[o] >= 0) chk(ctrl_sel[o] == SEL_W'(m_owner[o]), $sformatf("control select %0d", o));
      end
    end
    chk(contention > 0, "contention exercised");
    $display("contention=%0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
