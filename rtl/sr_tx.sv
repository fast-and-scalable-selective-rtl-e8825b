// sr_tx: sender side of the FaSR selective-retransmission logic (Sec. III-B.2, III-D).
//
// The sender keeps no bitmap and does not count losses itself: it follows the lost-cnt
// that the receiver returns in every SACK. Per QP it holds UNACK, sack-high, the last
// lost-cnt received, a loss-recovery flag, the "receiver lost-cnt overflowed" flag and an
// FNACK-armed flag, in its own QPC group.
//  * ACK: UNACK moves forward (sent to the QPC RAM through the update queue, which also
//    restarts the retransmission timer); a new ACK re-arms the FNACK response; an ACK past
//    sack-high ends loss recovery.
//  * first SACK: enter loss recovery and retransmit UNACK .. SACK-1 at once, whatever the
//    lost-cnt.
//  * later SACKs: a gap between sack-high and the SACK is retransmitted only if the lost-cnt
//    grew (data lost) or the receiver reports overflow; otherwise the gap means SACKs were
//    lost and nothing is resent.
//  * timeout (from the RTO scanner, or an FNACK taken as an early timeout, at most once per
//    new ACK): lost-cnt > 1 resends UNACK .. sack-high-1, lost-cnt 1 resends UNACK only,
//    lost-cnt 0 goes back N from UNACK.
// Retransmissions leave as retx_req_t requests (start PSN, count, go-back flag) for CC.
//
// Timing: one event per cycle, accepted only when both output registers can take a word;
// outputs are registered (valid one cycle after the event). SACK packets take priority over
// RTO events when both wait. The document's sender consults a bitmap for the zeros between
// UNACK and sack-high on a slow-path timeout; this design keeps no sender bitmap and
// resends that whole range instead. The QP index arrives on in_qp, so the packet's own qpn
// and retx fields are not read (expected unused-bits lint warning).
//
// The SACK, timeout and FNACK rules follow the document; the per-QP flags, the request
// format and the priorities are this design's choice.
module sr_tx
  import fasr_pkg::*;
#(
  parameter int NUM_QP = 5120,
  localparam int QW    = (NUM_QP > 1) ? $clog2(NUM_QP) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // ACK / SACK / FNACK packets from SackQ (qpn field already mapped to a QPC index)
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [QW-1:0]     in_qp,
  input  pkt_t              in_pkt,
  // timeout events from the RTO module
  input  logic              rto_valid,
  output logic              rto_ready,
  input  logic [QW-1:0]     rto_qp,
  // retransmission requests towards RetxQ
  output logic              retx_valid,
  input  logic              retx_ready,
  output retx_req_t         retx,
  // UNACK updates towards the update queue
  output logic              upd_valid,
  input  logic              upd_ready,
  output logic [QW-1:0]     upd_qp,
  output psn_t              upd_unack,
  output tx_ev_t            ev
);

  psn_t                 unack     [NUM_QP];
  psn_t                 sack_high [NUM_QP];
  logic [LOSTCNT_W-1:0] prev_lost [NUM_QP];
  logic [NUM_QP-1:0]    rec, ovf_seen, fnack_armed;
  // 0: the field of this QP was never written and reads as 0 (saves clearing the arrays)
  logic [NUM_QP-1:0]    u_live, sh_live, pl_live;

  logic outs_free;
  assign outs_free = (!retx_valid || retx_ready) && (!upd_valid || upd_ready);
  assign in_ready  = outs_free;
  assign rto_ready = outs_free && !in_valid;

  logic          do_pkt, do_rto;
  logic [QW-1:0] q;
  assign do_pkt = in_valid && in_ready;
  assign do_rto = rto_valid && rto_ready;
  assign q      = do_pkt ? in_qp : rto_qp;

  psn_t                 u, sh, a_new;
  logic                 adv, is_sack, is_fnack, is_ovf, timeout;
  logic [LOSTCNT_W-1:0] lost_now;
  assign u        = u_live[q]  ? unack[q]     : '0;
  assign sh       = sh_live[q] ? sack_high[q] : '0;
  assign is_sack  = (in_pkt.opcode == OP_SACK) || (in_pkt.opcode == OP_SACK_OVF);
  assign is_fnack = (in_pkt.opcode == OP_FNACK);
  assign is_ovf   = (in_pkt.opcode == OP_SACK_OVF);
  assign adv      = do_pkt && (psn_diff(in_pkt.ack_psn, u) > 0);
  assign a_new    = adv ? in_pkt.ack_psn : u;
  // a timeout event, or an FNACK that is armed
  assign timeout  = do_rto || (do_pkt && is_fnack && fnack_armed[q]);
  assign lost_now = pl_live[q] ? prev_lost[q] : '0;

  function automatic retx_req_t mkr(logic [QW-1:0] qq, psn_t p, psn_t n, logic g);
    retx_req_t x;
    x.qpn   = QPN_W'(qq);
    x.psn   = p;
    x.count = n;
    x.gbn   = g;
    return x;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rec         <= '0;
      ovf_seen    <= '0;
      fnack_armed <= '1;
      retx_valid  <= 1'b0;
      retx        <= '0;
      upd_valid   <= 1'b0;
      upd_qp      <= '0;
      upd_unack   <= '0;
      ev          <= '0;
      u_live      <= '0;
      sh_live     <= '0;
      pl_live     <= '0;
    end else begin
      if (retx_valid && retx_ready) retx_valid <= 1'b0;
      if (upd_valid && upd_ready)   upd_valid  <= 1'b0;
      ev <= '0;

      if (adv) begin
        begin unack[q] <= in_pkt.ack_psn; u_live[q] <= 1'b1; end
        fnack_armed[q] <= 1'b1;
        upd_valid      <= 1'b1;
        upd_qp         <= q;
        upd_unack      <= in_pkt.ack_psn;
        if (rec[q] && psn_diff(in_pkt.ack_psn, sh) > 0 && !is_sack) begin
          rec[q]      <= 1'b0;
          ovf_seen[q] <= 1'b0;
          begin prev_lost[q] <= '0; pl_live[q] <= 1'b1; end
        end
      end

      if (do_pkt && is_sack && psn_diff(in_pkt.psn, a_new) > 0) begin
        begin prev_lost[q] <= in_pkt.lost_cnt; pl_live[q] <= 1'b1; end
        if (is_ovf) ovf_seen[q] <= 1'b1;
        if (!rec[q] || psn_diff(a_new, sh) > 0) begin
          // entering loss recovery: resend UNACK .. SACK-1 right away
          rec[q]       <= 1'b1;
          begin sack_high[q] <= in_pkt.psn; sh_live[q] <= 1'b1; end
          retx_valid   <= 1'b1;
          retx         <= mkr(q, a_new, in_pkt.psn - a_new, 1'b0);
          ev.retx_sack <= 1'b1;
        end else if (psn_diff(in_pkt.psn, sh) > 0) begin
          begin sack_high[q] <= in_pkt.psn; sh_live[q] <= 1'b1; end
          if (psn_diff(in_pkt.psn, sh) > 1) begin
            if (in_pkt.lost_cnt > lost_now || is_ovf || ovf_seen[q]) begin
              retx_valid   <= 1'b1;
              retx         <= mkr(q, sh + 1'b1, in_pkt.psn - sh - 1'b1, 1'b0);
              ev.retx_sack <= 1'b1;
            end else begin
              ev.sack_lost <= 1'b1;
            end
          end
        end
      end

      if (do_pkt && is_fnack) begin
        if (fnack_armed[q]) begin
          fnack_armed[q] <= 1'b0;
          ev.fnack_taken <= 1'b1;
        end else begin
          ev.fnack_ign <= 1'b1;
        end
      end

      if (timeout) begin
        retx_valid <= 1'b1;
        if (rec[q] && (lost_now > 3'd1 || ovf_seen[q])) begin
          retx        <= mkr(q, a_new, sh - a_new, 1'b0);
          ev.rto_slow <= 1'b1;
        end else if (rec[q] && lost_now == 3'd1) begin
          retx        <= mkr(q, a_new, 24'd1, 1'b0);
          ev.rto_fast <= 1'b1;
        end else begin
          retx        <= mkr(q, a_new, '0, 1'b1);
          ev.rto_gbn  <= 1'b1;
        end
      end
    end
  end
endmodule
