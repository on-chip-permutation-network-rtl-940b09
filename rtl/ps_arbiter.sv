// ps_arbiter: the arbiter of one switch.
//
// It has the two jobs the switch architecture gives it. As a referee it
// decides, once per clock on the falling edge, which input control (IC) owns
// each output: an output that is free (not owned and reported idle by its
// output control on the status bus) goes to the lowest-numbered IC asking for
// it; every other IC asking for that output is denied, which it treats
// exactly like an Ans=Back from downstream. Ownership lasts as long as the
// owning IC keeps requesting the same output. As a connector it cross-connects
// the Ans_out of each owned output to its IC through the grant bus.
//
// Timing: ICs change their request on the rising edge, the arbiter decides
// on the following falling edge, and the ICs and output controls pick the
// decision up on the next rising edge, so one probe step through the switch
// takes one clock cycle. An output freed on a falling edge is not handed out
// again until its output control has shown it idle, which keeps Req low on
// the link for at least one cycle between two owners.
//
// Fixed priority (IC 0 highest) is this design's choice of the "pre-defined
// priority".
module ps_arbiter
  import perm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // request bus from the ICs
  input  logic [PORTS-1:0] ic_req,
  input  logic [SEL_W-1:0] ic_req_out [PORTS],
  // status bus from the OCs
  input  logic [PORTS-1:0] oc_busy,
  // answers arriving on the switch outputs
  input  ans_t             ans_out    [PORTS],
  // grant bus to the ICs
  output logic [PORTS-1:0] ic_granted,
  output ans_t             ic_ans     [PORTS],
  // control bus to the OCs
  output logic [PORTS-1:0] ctrl_valid,
  output logic [SEL_W-1:0] ctrl_sel   [PORTS]
);

  logic [PORTS-1:0] own_q,   own_d;
  logic [SEL_W-1:0] owner_q  [PORTS];
  logic [SEL_W-1:0] owner_d  [PORTS];
  logic [PORTS-1:0] grant_q, grant_d;
  logic [PORTS-1:0] deny_q,  deny_d;

  always_comb begin
    own_d   = own_q;
    owner_d = owner_q;
    for (int o = 0; o < PORTS; o++) begin
      if (own_q[o]) begin
        if (!(ic_req[owner_q[o]] && ic_req_out[owner_q[o]] == SEL_W'(o)))
          own_d[o] = 1'b0;
      end else if (!oc_busy[o]) begin
        for (int i = PORTS - 1; i >= 0; i--) begin
          if (ic_req[i] && ic_req_out[i] == SEL_W'(o)) begin
            own_d[o]   = 1'b1;
            owner_d[o] = SEL_W'(i);
          end
        end
      end
    end
    for (int i = 0; i < PORTS; i++) begin
      grant_d[i] = ic_req[i] && own_d[ic_req_out[i]] &&
                   owner_d[ic_req_out[i]] == SEL_W'(i);
      deny_d[i]  = ic_req[i] && !grant_d[i];
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_q   <= '0;
      grant_q <= '0;
      deny_q  <= '0;
      for (int o = 0; o < PORTS; o++) owner_q[o] <= '0;
    end else begin
      own_q   <= own_d;
      owner_q <= owner_d;
      grant_q <= grant_d;
      deny_q  <= deny_d;
    end
  end

  // grant bus: each IC sees the answer of the output it owns, or Back when it
  // lost the last decision
  always_comb begin
    for (int i = 0; i < PORTS; i++) begin
      ic_granted[i] = grant_q[i];
      ic_ans[i]     = deny_q[i] ? ANS_BACK : ANS_IDLE;
      for (int o = 0; o < PORTS; o++) begin
        if (own_q[o] && owner_q[o] == SEL_W'(i)) ic_ans[i] = ans_out[o];
      end
    end
  end

  // control bus
  always_comb begin
    for (int o = 0; o < PORTS; o++) begin
      ctrl_valid[o] = own_q[o];
      ctrl_sel[o]   = owner_q[o];
    end
  end

  // an IC never owns two outputs at once
  always_comb begin
    for (int i = 0; i < PORTS; i++) begin
      assert (!rst_n || $countones(own_q & {PORTS{1'b1}} &
              {owner_q[3] == SEL_W'(i), owner_q[2] == SEL_W'(i),
               owner_q[1] == SEL_W'(i), owner_q[0] == SEL_W'(i)}) <= 1)
        else $error("IC %0d owns more than one output", i);
    end
  end

endmodule
