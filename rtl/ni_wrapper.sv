// ni_wrapper: FIFO-based wrapper that connects one processor's system bus to
// one input and one output of the permutation network.
//
// It holds a control register, a status register, a Tx circuit, an Rx
// circuit and the network interface. Software writes the words to send into
// the Tx FIFO, writes the destination and the setup bit into the control
// register, and watches the status register: the interface puts the probe
// (destination address) on the data lines, raises Req, and on Ans=Ack
// starts draining the Tx FIFO with the strobe. Ans=nAck pauses it, Ans=Back
// means no free path was found (Req is dropped and "blocked" is reported).
// Clearing the setup bit releases the path. On the receive side the
// interface answers an incoming Req with Ack when the Rx circuit is enabled
// and has room, and nAck otherwise; during a transfer the same answer is
// the end-to-end flow control.
//
// Register map (16-bit bus, word addresses), all this design's choice:
//   0 CTRL   R/W [3:0] destination, [4] setup, [5] Tx FIFO select
//                (0 bus writes, 1 network reads), [6] Rx FIFO select
//                (0 network writes, 1 bus reads), [7] Rx enable,
//                [8] write 1 to clear the Rx overflow flag
//   1 STATUS R   [0] path set, [1] nAck seen, [2] blocked, [3] Tx empty,
//                [4] Tx full, [5] Rx empty, [6] Rx full, [7] incoming path
//                held, [8] Rx overflow
//   2 TXDATA W   push one word into the Tx FIFO
//   3 RXDATA R   head of the Rx FIFO; the read pops it
// bus_rdata is combinational for the address presented with bus_rd.
module ni_wrapper
  import perm_pkg::*;
#(
  parameter int unsigned TX_DEPTH = 16,
  parameter int unsigned RX_DEPTH = 32,
  parameter int unsigned RX_SKID  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // system bus
  input  logic [1:0]        bus_addr,
  input  logic              bus_wr,
  input  logic [DATA_W-1:0] bus_wdata,
  input  logic              bus_rd,
  output logic [DATA_W-1:0] bus_rdata,
  // network input port (this node as source)
  output logic              net_req_out,
  input  ans_t              net_ans_in,
  output link_data_t        net_data_out,
  // network output port (this node as destination)
  input  logic              net_req_in,
  output ans_t              net_ans_out,
  input  link_data_t        net_data_in
);

  typedef enum logic [2:0] {
    T_IDLE, T_ADDR, T_SETUP, T_CONN, T_BLOCKED
  } tx_state_t;

  localparam logic [1:0] A_CTRL = 2'd0, A_STATUS = 2'd1, A_TXDATA = 2'd2,
                         A_RXDATA = 2'd3;

  // control register
  logic [ADDR_W-1:0] dest;
  logic              setup, tx_sel, rx_sel, rx_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dest   <= '0;
      setup  <= 1'b0;
      tx_sel <= 1'b0;
      rx_sel <= 1'b0;
      rx_en  <= 1'b0;
    end else if (bus_wr && bus_addr == A_CTRL) begin
      dest   <= bus_wdata[3:0];
      setup  <= bus_wdata[4];
      tx_sel <= bus_wdata[5];
      rx_sel <= bus_wdata[6];
      rx_en  <= bus_wdata[7];
    end
  end

  // transmit side: network interface FSM
  tx_state_t         tstate;
  logic              tx_empty, tx_full, tx_strobe;
  logic [DATA_W-1:0] tx_dat;
  logic              unused_sent;
  logic [$clog2(TX_DEPTH):0] tx_level;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate <= T_IDLE;
    end else begin
      case (tstate)
        T_IDLE:    if (setup) tstate <= T_ADDR;
        T_ADDR:    tstate <= setup ? T_SETUP : T_IDLE;
        T_SETUP:   if (!setup)                   tstate <= T_IDLE;
                   else if (net_ans_in == ANS_ACK)  tstate <= T_CONN;
                   else if (net_ans_in == ANS_BACK) tstate <= T_BLOCKED;
        T_CONN:    if (!setup) tstate <= T_IDLE;
        default:   if (!setup) tstate <= T_IDLE;   // T_BLOCKED
      endcase
    end
  end

  tx_circuit #(.DEPTH(TX_DEPTH)) u_tx (
    .clk, .rst_n,
    .rd_wr_sel  (tx_sel),
    .push       (bus_wr && bus_addr == A_TXDATA),
    .wr_data    (bus_wdata),
    .send_en    (tstate == T_CONN && net_ans_in == ANS_ACK),
    .strobe_clr (tstate == T_IDLE),
    .dat_out    (tx_dat),
    .strobe     (tx_strobe),
    .sent       (unused_sent),
    .empty      (tx_empty),
    .full       (tx_full),
    .level      (tx_level)
  );

  assign net_req_out = (tstate == T_SETUP) || (tstate == T_CONN);

  always_comb begin
    case (tstate)
      T_ADDR, T_SETUP: net_data_out = make_probe(dest);
      T_CONN:          net_data_out = {tx_dat, tx_strobe};
      default:         net_data_out = '0;
    endcase
  end

  // receive side
  logic              rx_ready, rx_empty, rx_full, rx_ovf;
  logic [DATA_W-1:0] rx_head;
  logic [$clog2(RX_DEPTH):0] rx_level;

  rx_circuit #(.DEPTH(RX_DEPTH), .SKID(RX_SKID)) u_rx (
    .clk, .rst_n,
    .rd_wr_sel (rx_sel),
    .conn      (net_req_in),
    .dat_in    (net_data_in[LINK_W-1:1]),
    .strobe_in (net_data_in[0]),
    .ready     (rx_ready),
    .pop       (bus_rd && bus_addr == A_RXDATA),
    .rd_data   (rx_head),
    .ovf_clr   (bus_wr && bus_addr == A_CTRL && bus_wdata[8]),
    .empty     (rx_empty),
    .full      (rx_full),
    .overflow  (rx_ovf),
    .level     (rx_level)
  );

  // answer to an incoming path: Ack while enabled with room, else nAck
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          net_ans_out <= ANS_IDLE;
    else if (!net_req_in) net_ans_out <= ANS_IDLE;
    else                 net_ans_out <= (rx_en && rx_ready) ? ANS_ACK : ANS_NACK;
  end

  // status register and read mux
  logic [DATA_W-1:0] status;
  assign status = {7'd0, rx_ovf, net_req_in,
                   rx_full, rx_empty, tx_full, tx_empty,
                   tstate == T_BLOCKED, net_ans_in == ANS_NACK,
                   tstate == T_CONN};

  always_comb begin
    case (bus_addr)
      A_CTRL:   bus_rdata = {8'd0, rx_en, rx_sel, tx_sel, setup, dest};
      A_STATUS: bus_rdata = status;
      A_RXDATA: bus_rdata = rx_head;
      default:  bus_rdata = '0;
    endcase
  end

endmodule
