// tb_fasr_transport: end-to-end testbench of the transport layer at reduced sizes.
//
// Two transports, A (sender) and B (receiver), are joined by a lossy behavioural link. The
// sizes are scaled down (16 QPs, 4 SR state units, 12 bitmap blocks, window 64, short
// timeout) so that pool exhaustion, lost-cnt overflow and every timeout case happen within
// a few thousand packets. The checks and the traffic model are in e2e_body.svh; the sizes
// and loss rates here are this testbench's own choice.
module tb_fasr_transport;
  import fasr_pkg::*;
  localparam int NUM_QP = 16, N_UNITS = 4, N_BLK = 12, BLK_BITS = 10, WINDOW = 64;
  localparam int RTO_CYCLES = 1500, Q_DEPTH = 16;
  localparam int N_ACTIVE = 12, WQES_PER_QP = 24, MAX_WQE_PKTS = 40;
  localparam int LINK_DELAY = 40;
  localparam int P_LOSS_PER100K = 1500, P_BURST_PER100K = 100, BURST_LEN = 10;
  localparam int P_RETX_PERMIL = 120, P_REPLY_PERMIL = 20;
  localparam int WATCHDOG = 2000000;

  `include "e2e_body.svh"

  fasr_transport #(.NUM_QP(NUM_QP), .N_UNITS(N_UNITS), .N_BLK(N_BLK), .BLK_BITS(BLK_BITS),
                   .WINDOW(WINDOW), .RTO_CYCLES(RTO_CYCLES), .Q_DEPTH(Q_DEPTH)) u_a (`A_PORTS);
  fasr_transport #(.NUM_QP(NUM_QP), .N_UNITS(N_UNITS), .N_BLK(N_BLK), .BLK_BITS(BLK_BITS),
                   .WINDOW(WINDOW), .RTO_CYCLES(RTO_CYCLES), .Q_DEPTH(Q_DEPTH)) u_b (`B_PORTS);
endmodule
