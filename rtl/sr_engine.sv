// sr_engine: the SR module of the transport layer.
//
// Takes the packets that the QPC manager put in SackQ and, by opcode, hands data packets to
// the receiver logic (sr_rx) and ACK/SACK/FNACK packets to the sender logic (sr_tx); timeout
// events from the RTO scanner also go to sr_tx. It owns the two-level shared SR pool used by
// the receiver: the Level-1 SR state pool (sr_state_pool) and the bitmap control with the
// Level-2 bitmap pool (bitmap_ctrl). The receiver and the sender work in parallel, so a
// slow-path bitmap access on the receive side does not hold back SACK processing unless the
// head of SackQ is a data packet waiting for sr_rx.
// Outputs: replies (ACK/SACK/FNACK) for ACKQ, retransmission requests for RetxQ, UNACK
// writes for the update queue, accepted data packets for DMA placement, event pulses and
// the occupancy of both pools. The document shows the SR module with its two pools and its
// queues; the split into receiver and sender halves is this design's.
//
// Output bits that are constant by construction: QPN bits above the QP index width, the
// retransmit flag of replies and the fixed fields of the QPC write.
module sr_engine
  import fasr_pkg::*;
#(
  parameter int NUM_QP   = 5120,
  parameter int N_UNITS  = 20,
  parameter int N_BLK    = 70,
  parameter int BLK_BITS = 10,
  localparam int QW      = (NUM_QP > 1) ? $clog2(NUM_QP) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TS_W-1:0]   now,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [QW-1:0]     in_qp,
  input  pkt_t              in_pkt,
  input  logic              rto_valid,
  output logic              rto_ready,
  input  logic [QW-1:0]     rto_qp,
  output logic              ack_valid,
  input  logic              ack_ready,
  output pkt_t              ack_pkt,
  output logic              retx_valid,
  input  logic              retx_ready,
  output retx_req_t         retx,
  output logic              upd_valid,
  input  logic              upd_ready,
  output qpc_upd_t          upd,
  output logic              dlv_valid,
  input  logic              dlv_ready,
  output logic [QW-1:0]     dlv_qp,
  output psn_t              dlv_psn,
  output rx_ev_t            rx_ev,
  output tx_ev_t            tx_ev,
  output logic [$clog2(N_UNITS+1)-1:0] units_used,
  output logic [$clog2(N_BLK+1)-1:0]   blocks_used
);
  logic is_data, rx_in_ready, tx_in_ready;
  assign is_data  = (in_pkt.opcode == OP_DATA);
  assign in_ready = is_data ? rx_in_ready : tx_in_ready;

  // Level-1 pool wiring
  logic              sp_alloc_valid, sp_alloc_ok, sp_free_valid, sp_wr_en;
  sr_state_t         sp_alloc_data, sp_rd_data, sp_wr_data;
  logic [BPTR_W-1:0] sp_alloc_idx, sp_free_idx, sp_rd_idx, sp_wr_idx;
  // bitmap wiring
  logic              bm_req_valid, bm_req_ready, bm_rsp_valid, bm_rsp_ok;
  logic [1:0]        bm_req_cmd;
  logic [BPTR_W-1:0] bm_req_head, bm_req_tail, bm_req_nblk;
  logic [BPTR_W-1:0] bm_rsp_head, bm_rsp_tail, bm_rsp_nblk;
  psn_t              bm_req_base, bm_rsp_base, bm_rsp_psn;
  logic [15:0]       bm_req_lo, bm_req_hi;

  sr_rx #(.NUM_QP(NUM_QP), .N_BLK(N_BLK), .BLK_BITS(BLK_BITS)) u_rx (
    .clk, .rst_n,
    .in_valid(in_valid && is_data), .in_ready(rx_in_ready), .in_qp, .in_psn(in_pkt.psn),
    .out_valid(ack_valid), .out_ready(ack_ready), .out_pkt(ack_pkt),
    .dlv_valid, .dlv_ready, .dlv_qp, .dlv_psn,
    .sp_alloc_valid, .sp_alloc_data, .sp_alloc_ok, .sp_alloc_idx,
    .sp_free_valid, .sp_free_idx, .sp_rd_idx, .sp_rd_data,
    .sp_wr_en, .sp_wr_idx, .sp_wr_data,
    .bm_req_valid, .bm_req_ready, .bm_req_cmd, .bm_req_head, .bm_req_tail, .bm_req_nblk,
    .bm_req_base, .bm_req_lo, .bm_req_hi,
    .bm_rsp_valid, .bm_rsp_ok, .bm_rsp_head, .bm_rsp_tail, .bm_rsp_nblk, .bm_rsp_base,
    .bm_rsp_psn,
    .ev(rx_ev)
  );

  sr_state_pool #(.N_UNITS(N_UNITS)) u_state_pool (
    .clk, .rst_n,
    .alloc_valid(sp_alloc_valid), .alloc_data(sp_alloc_data), .alloc_ok(sp_alloc_ok),
    .alloc_idx(sp_alloc_idx), .free_valid(sp_free_valid), .free_idx(sp_free_idx),
    .rd_idx(sp_rd_idx), .rd_data(sp_rd_data),
    .wr_en(sp_wr_en), .wr_idx(sp_wr_idx), .wr_data(sp_wr_data),
    .n_used(units_used)
  );

  bitmap_ctrl #(.N_BLK(N_BLK), .BLK_BITS(BLK_BITS)) u_bitmap (
    .clk, .rst_n,
    .req_valid(bm_req_valid), .req_ready(bm_req_ready), .req_cmd(bm_req_cmd),
    .req_head(bm_req_head), .req_tail(bm_req_tail), .req_nblk(bm_req_nblk),
    .req_base(bm_req_base), .req_lo(bm_req_lo), .req_hi(bm_req_hi),
    .rsp_valid(bm_rsp_valid), .rsp_ok(bm_rsp_ok), .rsp_head(bm_rsp_head),
    .rsp_tail(bm_rsp_tail), .rsp_nblk(bm_rsp_nblk), .rsp_base(bm_rsp_base),
    .rsp_psn(bm_rsp_psn), .blocks_used
  );

  logic [QW-1:0] upd_qp;
  psn_t          upd_unack;
  sr_tx #(.NUM_QP(NUM_QP)) u_tx (
    .clk, .rst_n,
    .in_valid(in_valid && !is_data), .in_ready(tx_in_ready), .in_qp, .in_pkt,
    .rto_valid, .rto_ready, .rto_qp,
    .retx_valid, .retx_ready, .retx,
    .upd_valid, .upd_ready, .upd_qp, .upd_unack,
    .ev(tx_ev)
  );

  // An UNACK advance also restarts the retransmission timer. The stamp is the time the
  // request reaches this point, at most a few cycles after the ACK arrived.
  always_comb begin
    upd            = '0;
    upd.qp         = QPN_W'(upd_qp);
    upd.mask.unack = 1'b1;
    upd.mask.ts    = 1'b1;
    upd.val.unack  = upd_unack;
    upd.val.ts     = now;
  end
endmodule
