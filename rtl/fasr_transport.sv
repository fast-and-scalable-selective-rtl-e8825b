// fasr_transport: transport layer of an RDMA NIC with FaSR selective retransmission.
//
// Wires the transport modules into the pipeline of separate FIFO queues between modules:
//
//   rx (MAC) -> InputQ -> qpc_manager -> SackQ -> sr_engine -> ACKQ ----------> send_queue -> tx
//   wqe (scheduler) ----> qpc_manager -> NewWQEQ -> cc -> DMAQ -> dma_req   (port 0, replies)
//                                    sr_engine -> RetxQ -> cc
//   dma_rsp (DMA returns the packet with payload) -> send_queue (port 1, data)
//   sr_engine -> dlv (accepted data, placed in the host reorder buffer by DMA)
//   rto -> RTOQ -> sr_engine;  cc, sr_engine, rto -> update_queue -> qpc_ram -> cc, rto
//
// Received data packets cost the SR module two cycles on the fast path; ACKs and SACKs are
// handled by the sender half in parallel. The DMA engine, the WQE scheduler, the MAC and the
// host are outside: their connections are brought out as valid/ready ports. A free-running
// cycle counter supplies the time stamps of the retransmission timer. All packets are header
// descriptors (fasr_pkg::pkt_t); payload moves only on the DMA path. The module set and the
// queues follow the document's transport layer; the TxQ and RDreqQ queues (READ support) are
// not modelled, and queue depths are this design's choice. Queue occupancy counts and the
// grant/source outputs of the arbiters are left open on purpose (lint reports them as
// empty pin connections).
module fasr_transport
  import fasr_pkg::*;
#(
  parameter int NUM_QP     = 5120,   // concurrent QPs evaluated
  parameter int N_UNITS    = 20,     // Level-1 SR state units
  parameter int N_BLK      = 70,     // Level-2 bitmap blocks
  parameter int BLK_BITS   = 10,     // bits per bitmap block
  parameter int WINDOW     = 500,    // packets in flight per QP (BDP)
  parameter int RTO_CYCLES = 20000,  // retransmission timeout in clock cycles
  parameter int Q_DEPTH    = 16,     // depth of the inter-module queues
  localparam int QW        = (NUM_QP > 1) ? $clog2(NUM_QP) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // packets from the MAC
  input  logic          rx_valid,
  output logic          rx_ready,
  input  pkt_t          rx_pkt,
  // work requests from the scheduler
  input  logic          wqe_valid,
  output logic          wqe_ready,
  input  wqe_t          wqe,
  // packets to the MAC
  output logic          tx_valid,
  input  logic          tx_ready,
  output pkt_t          tx_pkt,
  // data packets to be read from host memory by DMA
  output logic          dma_req_valid,
  input  logic          dma_req_ready,
  output pkt_t          dma_req,
  // data packets returned by DMA, ready to send
  input  logic          dma_rsp_valid,
  output logic          dma_rsp_ready,
  input  pkt_t          dma_rsp,
  // received data packets accepted for placement into the host buffer
  output logic          dlv_valid,
  input  logic          dlv_ready,
  output logic [QW-1:0] dlv_qp,
  output psn_t          dlv_psn,
  // statistics
  output rx_ev_t        rx_ev,
  output tx_ev_t        tx_ev,
  output logic          win_stall,
  output logic [15:0]   illegal_drops,
  output logic [$clog2(N_UNITS+1)-1:0] units_used,
  output logic [$clog2(N_BLK+1)-1:0]   blocks_used
);
  logic [TS_W-1:0] now;
  always_ff @(posedge clk) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  // ------------------------------------------------------------------ InputQ
  logic iq_valid, iq_ready;
  pkt_t iq_pkt;
  sync_fifo #(.T(pkt_t), .DEPTH(Q_DEPTH)) u_inputq (
    .clk, .rst_n, .in_valid(rx_valid), .in_ready(rx_ready), .in_data(rx_pkt),
    .out_valid(iq_valid), .out_ready(iq_ready), .out_data(iq_pkt), .count()
  );

  // ------------------------------------------------------------------ QPC manager
  typedef struct packed {
    logic [QW-1:0] qp;
    pkt_t          pkt;
  } sq_item_t;
  typedef struct packed {
    logic [QW-1:0] qp;
    logic [15:0]   npkts;
  } nw_item_t;

  logic          qm_sq_valid, qm_sq_ready, qm_nw_valid, qm_nw_ready;
  logic [QW-1:0] qm_sq_qp, qm_nw_qp;
  pkt_t          qm_sq_pkt;
  logic [15:0]   qm_nw_npkts;
  qpc_manager #(.NUM_QP(NUM_QP)) u_qpc_manager (
    .clk, .rst_n,
    .pkt_valid(iq_valid), .pkt_ready(iq_ready), .pkt(iq_pkt),
    .wqe_valid, .wqe_ready, .wqe,
    .sq_valid(qm_sq_valid), .sq_ready(qm_sq_ready), .sq_qp(qm_sq_qp), .sq_pkt(qm_sq_pkt),
    .nw_valid(qm_nw_valid), .nw_ready(qm_nw_ready), .nw_qp(qm_nw_qp),
    .nw_npkts(qm_nw_npkts), .drops(illegal_drops)
  );

  // SackQ
  logic     sq_valid, sq_ready;
  sq_item_t sq_item;
  sync_fifo #(.T(sq_item_t), .DEPTH(Q_DEPTH)) u_sackq (
    .clk, .rst_n, .in_valid(qm_sq_valid), .in_ready(qm_sq_ready),
    .in_data('{qp: qm_sq_qp, pkt: qm_sq_pkt}),
    .out_valid(sq_valid), .out_ready(sq_ready), .out_data(sq_item), .count()
  );

  // NewWQEQ
  logic     nw_valid, nw_ready;
  nw_item_t nw_item;
  sync_fifo #(.T(nw_item_t), .DEPTH(Q_DEPTH)) u_newwqeq (
    .clk, .rst_n, .in_valid(qm_nw_valid), .in_ready(qm_nw_ready),
    .in_data('{qp: qm_nw_qp, npkts: qm_nw_npkts}),
    .out_valid(nw_valid), .out_ready(nw_ready), .out_data(nw_item), .count()
  );

  // ------------------------------------------------------------------ SR module
  logic          rto_valid, rto_ready, rq_valid, rq_ready;
  logic [QW-1:0] rto_qp, rq_qp;
  logic          sr_ack_valid, sr_ack_ready, sr_retx_valid, sr_retx_ready;
  pkt_t          sr_ack;
  retx_req_t     sr_retx;
  logic          sr_upd_valid, sr_upd_ready;
  qpc_upd_t      sr_upd;

  sr_engine #(.NUM_QP(NUM_QP), .N_UNITS(N_UNITS), .N_BLK(N_BLK), .BLK_BITS(BLK_BITS)) u_sr (
    .clk, .rst_n, .now,
    .in_valid(sq_valid), .in_ready(sq_ready), .in_qp(sq_item.qp), .in_pkt(sq_item.pkt),
    .rto_valid(rq_valid), .rto_ready(rq_ready), .rto_qp(rq_qp),
    .ack_valid(sr_ack_valid), .ack_ready(sr_ack_ready), .ack_pkt(sr_ack),
    .retx_valid(sr_retx_valid), .retx_ready(sr_retx_ready), .retx(sr_retx),
    .upd_valid(sr_upd_valid), .upd_ready(sr_upd_ready), .upd(sr_upd),
    .dlv_valid, .dlv_ready, .dlv_qp, .dlv_psn,
    .rx_ev, .tx_ev, .units_used, .blocks_used
  );

  // ACKQ
  logic ackq_valid, ackq_ready;
  pkt_t ackq_pkt;
  sync_fifo #(.T(pkt_t), .DEPTH(Q_DEPTH)) u_ackq (
    .clk, .rst_n, .in_valid(sr_ack_valid), .in_ready(sr_ack_ready), .in_data(sr_ack),
    .out_valid(ackq_valid), .out_ready(ackq_ready), .out_data(ackq_pkt), .count()
  );

  // RetxQ
  logic      rtq_valid, rtq_ready;
  retx_req_t rtq;
  sync_fifo #(.T(retx_req_t), .DEPTH(Q_DEPTH)) u_retxq (
    .clk, .rst_n, .in_valid(sr_retx_valid), .in_ready(sr_retx_ready), .in_data(sr_retx),
    .out_valid(rtq_valid), .out_ready(rtq_ready), .out_data(rtq), .count()
  );

  // ------------------------------------------------------------------ shared QPC
  logic [QW-1:0] cc_qpc_qp, rto_rd_qp;
  qpc_t          cc_qpc, rto_rd;
  logic          qpc_wr_en;
  qpc_upd_t      qpc_wr;
  qpc_ram #(.NUM_QP(NUM_QP)) u_qpc_ram (
    .clk, .rst_n, .wr_en(qpc_wr_en), .wr(qpc_wr),
    .ra_qp(cc_qpc_qp), .ra_data(cc_qpc), .rb_qp(rto_rd_qp), .rb_data(rto_rd)
  );

  logic     cc_upd_valid, cc_upd_ready, rto_upd_valid, rto_upd_ready;
  qpc_upd_t cc_upd, rto_upd;
  logic [2:0] uq_valid, uq_ready;
  qpc_upd_t   uq_req [3];
  assign uq_valid     = {rto_upd_valid, sr_upd_valid, cc_upd_valid};
  assign uq_req[0]    = cc_upd;
  assign uq_req[1]    = sr_upd;
  assign uq_req[2]    = rto_upd;
  assign cc_upd_ready  = uq_ready[0];
  assign sr_upd_ready  = uq_ready[1];
  assign rto_upd_ready = uq_ready[2];
  update_queue #(.N_SRC(3), .SRC_DEPTH(4)) u_update_queue (
    .clk, .rst_n, .in_valid(uq_valid), .in_ready(uq_ready), .in_req(uq_req),
    .wr_en(qpc_wr_en), .wr(qpc_wr), .granted()
  );

  // ------------------------------------------------------------------ RTO
  rto #(.NUM_QP(NUM_QP), .RTO_CYCLES(RTO_CYCLES)) u_rto (
    .clk, .rst_n, .now, .rd_qp(rto_rd_qp), .rd_data(rto_rd),
    .ev_valid(rto_valid), .ev_ready(rto_ready), .ev_qp(rto_qp),
    .upd_valid(rto_upd_valid), .upd_ready(rto_upd_ready), .upd(rto_upd)
  );

  sync_fifo #(.T(logic [QW-1:0]), .DEPTH(Q_DEPTH)) u_rtoq (
    .clk, .rst_n, .in_valid(rto_valid), .in_ready(rto_ready), .in_data(rto_qp),
    .out_valid(rq_valid), .out_ready(rq_ready), .out_data(rq_qp), .count()
  );

  // ------------------------------------------------------------------ CC
  logic cc_tx_valid, cc_tx_ready;
  pkt_t cc_tx;
  cc #(.NUM_QP(NUM_QP), .WINDOW(WINDOW)) u_cc (
    .clk, .rst_n, .now,
    .wqe_valid(nw_valid), .wqe_ready(nw_ready), .wqe_qp(nw_item.qp),
    .wqe_npkts(nw_item.npkts),
    .retx_valid(rtq_valid), .retx_ready(rtq_ready), .retx(rtq),
    .qpc_qp(cc_qpc_qp), .qpc(cc_qpc),
    .tx_valid(cc_tx_valid), .tx_ready(cc_tx_ready), .tx_pkt(cc_tx),
    .upd_valid(cc_upd_valid), .upd_ready(cc_upd_ready), .upd(cc_upd),
    .win_stall
  );

  // DMAQ
  sync_fifo #(.T(pkt_t), .DEPTH(Q_DEPTH)) u_dmaq (
    .clk, .rst_n, .in_valid(cc_tx_valid), .in_ready(cc_tx_ready), .in_data(cc_tx),
    .out_valid(dma_req_valid), .out_ready(dma_req_ready), .out_data(dma_req), .count()
  );

  // ------------------------------------------------------------------ send queue
  logic [1:0] sq_in_valid, sq_in_ready;
  pkt_t       sq_in [2];
  assign sq_in_valid   = {dma_rsp_valid, ackq_valid};
  assign sq_in[0]      = ackq_pkt;
  assign sq_in[1]      = dma_rsp;
  assign ackq_ready    = sq_in_ready[0];
  assign dma_rsp_ready = sq_in_ready[1];
  send_queue #(.N_IN(2), .DEPTH(Q_DEPTH)) u_send_queue (
    .clk, .rst_n, .in_valid(sq_in_valid), .in_ready(sq_in_ready), .in_pkt(sq_in),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_pkt(tx_pkt), .out_src()
  );
endmodule
