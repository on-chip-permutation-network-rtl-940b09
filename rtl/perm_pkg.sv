// perm_pkg: shared types and constants of the Clos permutation network.
//
// A link between two switches carries a 1-bit Req forward, a 2-bit Ans
// backward and a data bundle forward. The Ans encoding (00 idle, 01 Ack,
// 10 Back, 11 nAck) and the Req meaning (1 setup/hold, 0 idle/release) are
// the network's own. The data bundle is Data<16:0>: Data<0> is the strobe
// and Data<16:1> the 16-bit payload word. During path setup the probe's
// 4-bit destination address D3D2D1D0 travels on the payload lines; placing
// it on Data<4:1> is this design's choice.
package perm_pkg;

  localparam int unsigned PORTS    = 4;   // ports per switch (Clos n = m = p = 4)
  localparam int unsigned SEL_W    = 2;   // port index width
  localparam int unsigned ADDR_W   = 4;   // network address D3..D0
  localparam int unsigned NODES    = 16;  // network inputs/outputs
  localparam int unsigned DATA_W   = 16;  // payload word width
  localparam int unsigned LINK_W   = DATA_W + 1;  // Data<16:0> including strobe

  typedef enum logic [1:0] {
    ANS_IDLE = 2'b00,
    ANS_ACK  = 2'b01,
    ANS_BACK = 2'b10,
    ANS_NACK = 2'b11
  } ans_t;

  typedef logic [LINK_W-1:0] link_data_t;

  // Probe address carried on the data lines during setup.
  function automatic logic [ADDR_W-1:0] probe_addr(input link_data_t d);
    return d[ADDR_W:1];
  endfunction

  function automatic link_data_t make_probe(input logic [ADDR_W-1:0] a);
    link_data_t d;
    d = '0;
    d[ADDR_W:1] = a;
    return d;
  endfunction

endpackage
