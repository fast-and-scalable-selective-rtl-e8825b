// tb_fasr_transport_full: end-to-end testbench of the transport layer at the design's
// default sizes (5120 QPs, 20 SR state units, 70 bitmap blocks of 10 bits, window 500,
// timeout 20000 cycles); both transports are instantiated with no parameter overrides.
//
// 40 QPs spread over the whole QP range carry traffic, enough to exhaust the 20-unit
// Level-1 pool. The checks and the traffic model are in e2e_body.svh; the traffic sizes
// and loss rates here are this testbench's own choice.
module tb_fasr_transport_full;
  import fasr_pkg::*;
  // must match the defaults of fasr_transport
  localparam int NUM_QP = 5120, N_UNITS = 20, N_BLK = 70, BLK_BITS = 10;
  localparam int N_ACTIVE = 40, WQES_PER_QP = 8, MAX_WQE_PKTS = 120;
  localparam int LINK_DELAY = 100;
  localparam int P_LOSS_PER100K = 1000, P_BURST_PER100K = 60, BURST_LEN = 10;
  localparam int P_RETX_PERMIL = 150, P_REPLY_PERMIL = 20;
  localparam int WATCHDOG = 5000000;

  `include "e2e_body.svh"

  fasr_transport u_a (`A_PORTS);
  fasr_transport u_b (`B_PORTS);
endmodule
