// cc: congestion-control / transmit scheduling stage.
//
// Decides which data packet is sent next. New work arrives from NewWQEQ as (QP, number of
// packets) and extends the QP's send end; QPs with data to send sit in a round-robin ring
// and each visit sends one packet, PSN = SND-NXT, if the window allows it
// (SND-NXT - UNACK < WINDOW, UNACK read from the shared QPC RAM). Retransmission requests
// from RetxQ (SR) take priority: a range request sends PSNs psn .. psn+count-1 back to back,
// one per cycle; a go-back request rewinds SND-NXT to psn and puts the QP back in the ring.
// Every new packet and every rewind writes SND-NXT to the QPC RAM through the update queue;
// if no data was outstanding the same write restarts the timer.
//
// Timing: at most one packet per cycle on tx_*; ring service and WQE intake alternate when
// both wait. The document runs DCQCN here and switched it off for its measurements; this
// design keeps only a fixed window (DCQCN is not modelled). The ring, the window and the
// priorities are this design's choices. Only the UNACK field of the shared QPC read port is
// used here (SND-NXT is kept locally, the time stamp belongs to the timer); the lint
// warning about the unused qpc bits is expected.
module cc
  import fasr_pkg::*;
#(
  parameter int NUM_QP = 5120,
  parameter int WINDOW = 500,   // packets in flight per QP (one BDP)
  localparam int QW    = (NUM_QP > 1) ? $clog2(NUM_QP) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TS_W-1:0] now,
  // NewWQEQ
  input  logic            wqe_valid,
  output logic            wqe_ready,
  input  logic [QW-1:0]   wqe_qp,
  input  logic [15:0]     wqe_npkts,
  // RetxQ
  input  logic            retx_valid,
  output logic            retx_ready,
  input  retx_req_t       retx,
  // shared QPC read
  output logic [QW-1:0]   qpc_qp,
  input  qpc_t            qpc,
  // data packet descriptors towards DMAQ
  output logic            tx_valid,
  input  logic            tx_ready,
  output pkt_t            tx_pkt,
  // QPC write towards the update queue
  output logic            upd_valid,
  input  logic            upd_ready,
  output qpc_upd_t        upd,
  output logic            win_stall   // a QP was visited but its window was full
);
  psn_t              snd_nxt [NUM_QP];
  psn_t              snd_end [NUM_QP];
  logic [NUM_QP-1:0] active;
  // 0: the field of this QP was never written and reads as 0 (saves clearing the arrays)
  logic [NUM_QP-1:0] n_live, e_live;
  psn_t              nxt_q, end_q, end_w;

  // round-robin ring of QPs with data to send
  logic          ring_in_valid, ring_in_ready, ring_out_valid, ring_out_ready;
  logic [QW-1:0] ring_in, ring_out;
  sync_fifo #(.T(logic [QW-1:0]), .DEPTH(NUM_QP)) u_ring (
    .clk, .rst_n,
    .in_valid(ring_in_valid), .in_ready(ring_in_ready), .in_data(ring_in),
    .out_valid(ring_out_valid), .out_ready(ring_out_ready), .out_data(ring_out),
    .count()
  );
  // a QP is in the ring at most once, so the ring (NUM_QP deep) never overflows
  a_ring_room: assert property (@(posedge clk) disable iff (!rst_n) ring_in_valid |-> ring_in_ready);

  assign nxt_q = n_live[ring_out] ? snd_nxt[ring_out] : '0;
  assign end_q = e_live[ring_out] ? snd_end[ring_out] : '0;
  assign end_w = e_live[wqe_qp]   ? snd_end[wqe_qp]   : '0;

  // retransmission job
  logic          rj_busy;
  logic [QW-1:0] rj_qp;
  psn_t          rj_psn, rj_left;

  logic outs_free;
  assign outs_free = (!tx_valid || tx_ready) && (!upd_valid || upd_ready);

  logic turn;   // 0: ring service first, 1: WQE intake first
  logic do_rj, do_rload, do_ring, do_wqe;
  logic [QW-1:0] rq;
  assign rq = QW'(retx.qpn);

  always_comb begin
    do_rj    = outs_free && rj_busy;
    do_rload = outs_free && !rj_busy && retx_valid;
    do_ring  = 1'b0;
    do_wqe   = 1'b0;
    if (outs_free && !rj_busy && !retx_valid) begin
      if (ring_out_valid && (!wqe_valid || !turn)) do_ring = 1'b1;
      else if (wqe_valid)                          do_wqe  = 1'b1;
    end
  end

  assign retx_ready = do_rload;
  assign wqe_ready  = do_wqe;
  assign qpc_qp     = ring_out;

  psn_t sq;
  logic has_data, win_ok, sendable;
  assign sq       = nxt_q;
  assign has_data = psn_diff(end_q, sq) > 0;
  assign win_ok   = psn_diff(sq, qpc.unack) < signed'(PSN_W'(WINDOW));
  assign sendable = has_data && win_ok;

  assign ring_out_ready = do_ring;
  always_comb begin
    ring_in_valid = 1'b0;
    ring_in       = '0;
    if (do_ring && (has_data && !(sendable && psn_diff(end_q, sq) == 1))) begin
      ring_in_valid = 1'b1;                  // still has data after this visit
      ring_in       = ring_out;
    end else if (do_wqe && !active[wqe_qp]) begin
      ring_in_valid = 1'b1;
      ring_in       = wqe_qp;
    end else if (do_rload && retx.gbn && !active[rq]) begin
      ring_in_valid = 1'b1;
      ring_in       = rq;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active    <= '0;
      rj_busy   <= 1'b0;
      rj_qp     <= '0;
      rj_psn    <= '0;
      rj_left   <= '0;
      tx_valid  <= 1'b0;
      tx_pkt    <= '0;
      upd_valid <= 1'b0;
      upd       <= '0;
      turn      <= 1'b0;
      win_stall <= 1'b0;
      n_live    <= '0;
      e_live    <= '0;
    end else begin
      if (tx_valid && tx_ready)   tx_valid  <= 1'b0;
      if (upd_valid && upd_ready) upd_valid <= 1'b0;
      win_stall <= 1'b0;
      if (ring_out_valid && wqe_valid && (do_ring || do_wqe)) turn <= !turn;

      if (do_rj) begin
        tx_valid        <= 1'b1;
        tx_pkt          <= '0;
        tx_pkt.opcode   <= OP_DATA;
        tx_pkt.qpn      <= QPN_W'(rj_qp);
        tx_pkt.psn      <= rj_psn;
        tx_pkt.retx     <= 1'b1;
        rj_psn          <= rj_psn + 1'b1;
        rj_left         <= rj_left - 1'b1;
        if (rj_left == 24'd1) rj_busy <= 1'b0;
      end

      if (do_rload) begin
        if (retx.gbn) begin
          // go back N: resend everything from psn
          snd_nxt[rq]  <= retx.psn;
          n_live[rq]   <= 1'b1;
          active[rq]   <= 1'b1;
          upd_valid    <= 1'b1;
          upd          <= '0;
          upd.qp       <= retx.qpn;
          upd.mask     <= '{unack: 1'b0, snd_nxt: 1'b1, ts: 1'b1};
          upd.val.snd_nxt <= retx.psn;
          upd.val.ts   <= now;
        end else if (retx.count != '0) begin
          rj_busy <= 1'b1;
          rj_qp   <= rq;
          rj_psn  <= retx.psn;
          rj_left <= retx.count;
        end
      end

      if (do_ring) begin
        if (!has_data) begin
          active[ring_out] <= 1'b0;
        end else if (!win_ok) begin
          win_stall <= 1'b1;
        end else begin
          tx_valid        <= 1'b1;
          tx_pkt          <= '0;
          tx_pkt.opcode   <= OP_DATA;
          tx_pkt.qpn      <= QPN_W'(ring_out);
          tx_pkt.psn      <= sq;
          snd_nxt[ring_out] <= sq + 1'b1;
          n_live[ring_out]  <= 1'b1;
          upd_valid       <= 1'b1;
          upd             <= '0;
          upd.qp          <= QPN_W'(ring_out);
          upd.mask.snd_nxt <= 1'b1;
          upd.mask.ts     <= (qpc.unack == sq);   // timer was idle: start it
          upd.val.snd_nxt <= sq + 1'b1;
          upd.val.ts      <= now;
          if (psn_diff(end_q, sq) == 1) active[ring_out] <= 1'b0;
        end
      end

      if (do_wqe) begin
        snd_end[wqe_qp] <= end_w + PSN_W'(wqe_npkts);
        e_live[wqe_qp]  <= 1'b1;
        active[wqe_qp]  <= 1'b1;
      end
    end
  end
endmodule
