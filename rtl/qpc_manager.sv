// qpc_manager: front end of the transport pipeline.
//
// Checks each incoming item for legality and maps it to its QPC address before routing it to
// the queue of the module that handles it:
//  * packets from the network (InputQ): the opcode must be one of the transport's opcodes
//    and the QPN must name an existing QP (qpn < NUM_QP); the QPC address is the QPN itself
//    (the QPN space equals the QPC table, so the hash is the identity). Legal packets go to
//    SackQ for the SR module, illegal ones are dropped and counted.
//  * new work requests from the scheduler: same QPN check, then to NewWQEQ for CC,
//    bypassing SR.
// Both outputs are registered (valid the cycle after an item is taken) and each moves
// independently; when both inputs wait they are taken in the same cycle. The document gives
// the legality check, the hashing and the routing by operation type; the checks chosen and
// the identity hash are this design's. READ requests (RDreqQ) are not modelled.
module qpc_manager
  import fasr_pkg::*;
#(
  parameter int NUM_QP = 5120,
  localparam int QW    = (NUM_QP > 1) ? $clog2(NUM_QP) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pkt_valid,
  output logic          pkt_ready,
  input  pkt_t          pkt,
  input  logic          wqe_valid,
  output logic          wqe_ready,
  input  wqe_t          wqe,
  // SackQ
  output logic          sq_valid,
  input  logic          sq_ready,
  output logic [QW-1:0] sq_qp,
  output pkt_t          sq_pkt,
  // NewWQEQ
  output logic          nw_valid,
  input  logic          nw_ready,
  output logic [QW-1:0] nw_qp,
  output logic [15:0]   nw_npkts,
  output logic [15:0]   drops
);
  logic pkt_legal, wqe_legal;
  assign pkt_legal = (pkt.qpn < QPN_W'(NUM_QP)) &&
                     (pkt.opcode inside {OP_DATA, OP_ACK, OP_SACK, OP_SACK_OVF, OP_FNACK});
  assign wqe_legal = (wqe.qpn < QPN_W'(NUM_QP)) && (wqe.npkts != '0);

  assign pkt_ready = !sq_valid || sq_ready;
  assign wqe_ready = !nw_valid || nw_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sq_valid <= 1'b0;
      sq_qp    <= '0;
      sq_pkt   <= '0;
      nw_valid <= 1'b0;
      nw_qp    <= '0;
      nw_npkts <= '0;
      drops    <= '0;
    end else begin
      if (sq_valid && sq_ready) sq_valid <= 1'b0;
      if (nw_valid && nw_ready) nw_valid <= 1'b0;
      if (pkt_valid && pkt_ready) begin
        if (pkt_legal) begin
          sq_valid <= 1'b1;
          sq_qp    <= QW'(pkt.qpn);
          sq_pkt   <= pkt;
        end
      end
      if (wqe_valid && wqe_ready) begin
        if (wqe_legal) begin
          nw_valid <= 1'b1;
          nw_qp    <= QW'(wqe.qpn);
          nw_npkts <= wqe.npkts;
        end
      end
      drops <= drops + 16'(pkt_valid && pkt_ready && !pkt_legal)
                     + 16'(wqe_valid && wqe_ready && !wqe_legal);
    end
  end
endmodule
