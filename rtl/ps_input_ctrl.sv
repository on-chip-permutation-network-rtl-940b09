// ps_input_ctrl: input control (IC) of one switch input, the finite-state
// machine that runs the probe routing algorithm of its switch's stage.
//
// A path setup starts when Req_in rises; the probe's destination address
// D3D2D1D0 is then on the data lines and is latched. What the IC asks the
// arbiter for depends on STAGE:
//   1: any idle output, tried without repetition in the order 0-1-2-3.
//      An Ans=Back from the second stage, or losing the arbitration, makes
//      it let go of that output and try the next idle one not yet tried
//      (exhaustive profitable backtracking). When none is left it answers
//      Back to the source.
//   2: output D3D2, the third-stage switch of the destination. If that
//      output is busy or lost in arbitration it answers Back.
//   3: output D1D0, the destination itself. If busy or lost it answers nAck.
// Once its output is granted the IC relays the downstream answer (Ack or
// nAck) upstream, one register per switch, and holds the path for the data
// transfer. Req_in falling releases whatever the IC holds and returns it to
// idle. After answering Back or nAck the IC waits for Req_in to fall.
//
// Interface: Req_in/Ans_in/data towards the upstream link; a request
// (valid, output index) to the arbiter; the grant flag and the relayed
// answer from the grant bus; the busy flags of the status bus.
// Timing: registered on the rising edge. The answer that reaches the source
// after exhausting the first stage (Back) and the behaviour of stage 2 when
// it receives nAck (relayed) are this design's choices.
module ps_input_ctrl
  import perm_pkg::*;
#(
  parameter int unsigned STAGE = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // upstream link
  input  logic             req_in,
  input  link_data_t       data_in,
  output ans_t             ans_in,
  // status bus
  input  logic [PORTS-1:0] oc_busy,
  // request bus
  output logic             req_valid,
  output logic [SEL_W-1:0] req_out_idx,
  // grant bus
  input  logic             granted,
  input  ans_t             gnt_ans
);

  typedef enum logic [1:0] {
    S_IDLE,   // no path
    S_REQ,    // asking the arbiter for an output
    S_FWD,    // output owned, relaying answers, path held
    S_HOLD    // answered Back/nAck, waiting for release
  } ic_state_t;

  ic_state_t        state;
  logic [SEL_W-1:0] target;
  logic [PORTS-1:0] tried;

  // first-stage choice: lowest idle output not yet tried
  function automatic logic pick_free(input logic [PORTS-1:0] busy,
                                     input logic [PORTS-1:0] excl,
                                     output logic [SEL_W-1:0] idx);
    pick_free = 1'b0;
    idx       = '0;
    for (int k = PORTS - 1; k >= 0; k--) begin
      if (!busy[k] && !excl[k]) begin
        pick_free = 1'b1;
        idx       = SEL_W'(k);
      end
    end
  endfunction

  logic             have_next;
  logic [SEL_W-1:0] next_idx;
  logic [PORTS-1:0] tried_now;

  always_comb begin
    tried_now = tried | (PORTS'(1) << target);
    have_next = pick_free(oc_busy, tried_now, next_idx);
  end

  logic             have_first;
  logic [SEL_W-1:0] first_idx;
  logic [ADDR_W-1:0] addr_in;

  always_comb begin
    addr_in    = probe_addr(data_in);
    have_first = pick_free(oc_busy, '0, first_idx);
  end

  // answer for a failed attempt at this stage
  localparam ans_t FAIL_ANS = (STAGE == 3) ? ANS_NACK : ANS_BACK;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      target <= '0;
      tried  <= '0;
      ans_in <= ANS_IDLE;
    end else begin
      case (state)
        S_IDLE: begin
          ans_in <= ANS_IDLE;
          tried  <= '0;
          if (req_in) begin
            if (STAGE == 1) begin
              if (have_first) begin
                target <= first_idx;
                state  <= S_REQ;
              end else begin
                ans_in <= ANS_BACK;
                state  <= S_HOLD;
              end
            end else begin
              target <= (STAGE == 2) ? addr_in[3:2] : addr_in[1:0];
              if (oc_busy[(STAGE == 2) ? addr_in[3:2] : addr_in[1:0]]) begin
                ans_in <= FAIL_ANS;
                state  <= S_HOLD;
              end else begin
                state  <= S_REQ;
              end
            end
          end
        end

        S_REQ, S_FWD: begin
          if (!req_in) begin
            ans_in <= ANS_IDLE;
            state  <= S_IDLE;
          end else if (state == S_REQ && granted) begin
            state <= S_FWD;
          end else if (gnt_ans == ANS_BACK) begin
            // denied by the arbiter, or blocked further on
            if (STAGE == 1 && have_next) begin
              tried  <= tried_now;
              target <= next_idx;
              ans_in <= ANS_IDLE;
              state  <= S_REQ;
            end else begin
              ans_in <= FAIL_ANS;
              state  <= S_HOLD;
            end
          end else if (state == S_FWD) begin
            ans_in <= gnt_ans;
          end
        end

        default: begin  // S_HOLD
          if (!req_in) begin
            ans_in <= ANS_IDLE;
            state  <= S_IDLE;
          end
        end
      endcase
    end
  end

  assign req_valid   = (state == S_REQ) || (state == S_FWD);
  assign req_out_idx = target;

endmodule
