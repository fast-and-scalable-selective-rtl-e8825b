// sr_rx: receiver side of the FaSR selective-retransmission logic (Sec. III-B.1, III-D).
//
// For every data packet it compares the PSN with the QP's RCV-NXT and, during loss recovery,
// with sack-high, and decides whether the packet is in order, out of order (OoO), the
// retransmission of RCV-NXT, a duplicate, or a retransmission arriving behind a lost one.
// A QP that is not recovering owns no SR state: only RCV-NXT and a 1-byte pointer live in
// its QPC group here. On the first loss a Level-1 SR state unit is taken from the shared
// pool. lost-cnt counts the holes below sack-high:
//  * fast path (lost-cnt = 1): only sack-high moves on OoO packets; the retransmission of
//    RCV-NXT sets RCV-NXT = sack-high + 1 and returns the unit. No bitmap is touched.
//  * slow path (lost-cnt > 1, or overflowed): OoO packets are recorded in the QP's list of
//    shared bitmap blocks (bitmap_ctrl); a retransmission of RCV-NXT scans the list from
//    its head for the next hole. When lost-cnt falls back to 1 the blocks are released and
//    the QP returns to the fast path.
//  * bitmap acceleration: on the switch to the slow path, if the run of received packets
//    after RCV-NXT is at least one block long it is held in the 10-bit compression-cnt
//    instead of the bitmap; shorter runs are written into the first block.
//  * FNACK: a PSN between RCV-NXT and sack-high is a retransmission whose predecessor was
//    lost; it is dropped and reported in an FNACK.
//  * lost-cnt (3 bits) that overflows stays frozen and the SACKs carry OP_SACK_OVF.
//  * if a shared pool is exhausted the packet is dropped and only a plain ACK is returned
//    (GBN); blocks already recorded are kept until the recovery ends. If the switch to the
//    slow path itself cannot be recorded, the partial list is released and the QP stays on
//    the fast path with further OoO packets dropped, so the exit RCV-NXT = sack-high + 1
//    stays exact.
// Replies: ACK(psn = RCV-NXT), SACK(psn = OoO PSN, ack_psn = RCV-NXT, lost-cnt),
// FNACK(psn = dropped PSN, ack_psn = RCV-NXT). Accepted packets are reported on dlv_* for
// placement by DMA.
//
// Timing: one packet at a time. Fast-path decisions (and every case that needs no bitmap)
// are taken in the cycle the packet is accepted and the reply is valid the next cycle,
// so back-to-back packets are taken every other cycle (the document's two clock cycles).
// Slow-path packets wait for bitmap_ctrl. in_ready is high only in the idle state, with both
// output registers free and no SR state write outstanding. The PSN arithmetic is modulo 2^24. The packet classification
// follows the document; the FSM, handshakes and the exact GBN fallback are this design's.
//
// Output bits that are constant by construction: the reply's retransmit flag and ack_psn of
// some opcodes, the QPN bits above the QP index width, and the fields of alloc_data that
// start at zero.
module sr_rx
  import fasr_pkg::*;
#(
  parameter int NUM_QP   = 5120,
  parameter int N_BLK    = 70,
  parameter int BLK_BITS = 10,
  localparam int QW      = (NUM_QP > 1) ? $clog2(NUM_QP) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // data packets from SackQ
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [QW-1:0]     in_qp,
  input  psn_t              in_psn,
  // replies towards ACKQ
  output logic              out_valid,
  input  logic              out_ready,
  output pkt_t              out_pkt,
  // accepted data packets towards DMA
  output logic              dlv_valid,
  input  logic              dlv_ready,
  output logic [QW-1:0]     dlv_qp,
  output psn_t              dlv_psn,
  // Level-1 pool
  output logic              sp_alloc_valid,
  output sr_state_t         sp_alloc_data,
  input  logic              sp_alloc_ok,
  input  logic [BPTR_W-1:0] sp_alloc_idx,
  output logic              sp_free_valid,
  output logic [BPTR_W-1:0] sp_free_idx,
  output logic [BPTR_W-1:0] sp_rd_idx,
  input  sr_state_t         sp_rd_data,
  output logic              sp_wr_en,
  output logic [BPTR_W-1:0] sp_wr_idx,
  output sr_state_t         sp_wr_data,
  // bitmap control
  output logic              bm_req_valid,
  input  logic              bm_req_ready,
  output logic [1:0]        bm_req_cmd,
  output logic [BPTR_W-1:0] bm_req_head,
  output logic [BPTR_W-1:0] bm_req_tail,
  output logic [BPTR_W-1:0] bm_req_nblk,
  output psn_t              bm_req_base,
  output logic [15:0]       bm_req_lo,
  output logic [15:0]       bm_req_hi,
  input  logic              bm_rsp_valid,
  input  logic              bm_rsp_ok,
  input  logic [BPTR_W-1:0] bm_rsp_head,
  input  logic [BPTR_W-1:0] bm_rsp_tail,
  input  logic [BPTR_W-1:0] bm_rsp_nblk,
  input  psn_t              bm_rsp_base,
  input  psn_t              bm_rsp_psn,
  // statistics
  output rx_ev_t            ev
);
  localparam logic [1:0] CMD_SET = 2'd0, CMD_SCAN = 2'd1, CMD_FREE_ALL = 2'd2;
  localparam int LOST_MAX = (1 << LOSTCNT_W) - 1;
  localparam int COMP_MAX = (1 << COMP_W) - 1;
  localparam int BM_SPAN  = N_BLK * BLK_BITS;

  typedef enum logic [2:0] {S_IDLE, S_BMREQ, S_BMWAIT} state_e;
  typedef enum logic [2:0] {A_OOO, A_RUN, A_RUNFAIL, A_SCAN, A_DONE, A_TOFAST} act_e;

  // QPC receive group
  psn_t              rcv_nxt [NUM_QP];
  logic [NUM_QP-1:0] has_st;
  logic [BPTR_W-1:0] st_ptr  [NUM_QP];
  logic [NUM_QP-1:0] r_live;      // 0: RCV-NXT never written, reads as 0

  state_e            st;
  act_e              act;
  logic [QW-1:0]     c_q;
  psn_t              c_psn, c_r, c_newr;
  logic [BPTR_W-1:0] c_ptr;
  sr_state_t         c_s;          // working copy of the SR state unit
  logic [1:0]        c_cmd;
  logic [15:0]       c_lo, c_hi;
  logic [LOSTCNT_W-1:0] c_lost;    // lost-cnt to store when the command completes
  logic              c_ovf;

  // ---------------------------------------------------------------- idle-cycle decode
  psn_t              r;
  logic              hs;
  sr_state_t         s;
  logic signed [PSN_W-1:0] d_r, d_sh;
  psn_t              off;          // sack_high - rcv_nxt
  psn_t              add;          // newly lost packets below an OoO PSN
  logic [PSN_W:0]    newlost;
  logic              ovf_n;
  logic [LOSTCNT_W-1:0] lost_n;

  assign r         = r_live[in_qp] ? rcv_nxt[in_qp] : '0;
  assign hs        = has_st[in_qp];
  assign sp_rd_idx = st_ptr[in_qp];
  assign s         = sp_rd_data;
  assign d_r       = psn_diff(in_psn, r);
  assign d_sh      = psn_diff(in_psn, s.sack_high);
  assign off       = s.sack_high - r;
  assign add       = in_psn - s.sack_high - 1'b1;
  assign newlost   = {1'b0, PSN_W'(s.lost_cnt)} + {1'b0, add};
  assign ovf_n     = s.ovf || (newlost > (PSN_W+1)'(LOST_MAX));
  assign lost_n    = s.ovf ? s.lost_cnt : (newlost > (PSN_W+1)'(LOST_MAX)) ? LOSTCNT_W'(LOST_MAX)
                                                               : LOSTCNT_W'(newlost);

  logic outs_free;
  assign outs_free = (!out_valid || out_ready) && (!dlv_valid || dlv_ready);
  // A write to the SR state pool lands at the next edge; the next packet waits for it so
  // that it never reads a stale unit.
  assign in_ready  = (st == S_IDLE) && outs_free && !sp_wr_en && !sp_free_valid;

  logic take;
  assign take = in_valid && in_ready;

  // Level-1 allocation happens only on the first loss of a QP.
  assign sp_alloc_valid = take && !hs && (d_r > 0);
  always_comb begin
    sp_alloc_data           = '0;
    sp_alloc_data.sack_high = in_psn;
    sp_alloc_data.lost_cnt  = (d_r > signed'(PSN_W'(LOST_MAX))) ? LOSTCNT_W'(LOST_MAX) : LOSTCNT_W'(d_r);
    sp_alloc_data.ovf       = (d_r > signed'(PSN_W'(LOST_MAX)));
    sp_alloc_data.slow      = (d_r > 1);
    sp_alloc_data.base      = r + 1'b1;
  end

  // bitmap request
  assign bm_req_valid = (st == S_BMREQ);
  assign bm_req_cmd   = c_cmd;
  assign bm_req_head  = c_s.head;
  assign bm_req_tail  = c_s.tail;
  assign bm_req_nblk  = c_s.nblk;
  assign bm_req_base  = c_s.base;
  assign bm_req_lo    = c_lo;
  assign bm_req_hi    = c_hi;

  function automatic pkt_t mk(opcode_e op, logic [QW-1:0] q, psn_t p, psn_t a,
                              logic [LOSTCNT_W-1:0] l);
    pkt_t k;
    k          = '0;
    k.opcode   = op;
    k.qpn      = QPN_W'(q);
    k.psn      = p;
    k.ack_psn  = a;
    k.lost_cnt = l;
    return k;
  endfunction

  function automatic logic [15:0] off16(psn_t x);
    return (x >= PSN_W'(BM_SPAN)) ? 16'hFFFF : 16'(x);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      act       <= A_OOO;
      has_st    <= '0;
      out_valid <= 1'b0;
      out_pkt   <= '0;
      dlv_valid <= 1'b0;
      dlv_qp    <= '0;
      dlv_psn   <= '0;
      sp_free_valid <= 1'b0;
      sp_free_idx   <= '0;
      sp_wr_en      <= 1'b0;
      sp_wr_idx     <= '0;
      sp_wr_data    <= '0;
      ev        <= '0;
      c_q <= '0; c_psn <= '0; c_r <= '0; c_newr <= '0; c_ptr <= '0; c_s <= '0;
      c_cmd <= '0; c_lo <= '0; c_hi <= '0; c_lost <= '0; c_ovf <= 1'b0;
      r_live    <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (dlv_valid && dlv_ready) dlv_valid <= 1'b0;
      sp_free_valid <= 1'b0;
      sp_wr_en      <= 1'b0;
      ev            <= '0;

      unique case (st)
        // ------------------------------------------------------------------ decide
        S_IDLE: if (take) begin
          c_q   <= in_qp;
          c_psn <= in_psn;
          c_r   <= r;
          if (!hs) begin
            if (d_r == 0) begin                        // in order
              begin rcv_nxt[in_qp] <= r + 1'b1; r_live[in_qp] <= 1'b1; end
              out_pkt   <= mk(OP_ACK, in_qp, r + 1'b1, r + 1'b1, '0);
              out_valid <= 1'b1;
              dlv_valid <= 1'b1; dlv_qp <= in_qp; dlv_psn <= in_psn;
            end else if (d_r > 0) begin                // first loss of this QP
              if (!sp_alloc_ok) begin                  // Level-1 pool exhausted: GBN
                out_pkt   <= mk(OP_ACK, in_qp, r, r, '0);
                out_valid <= 1'b1;
                ev.gbn_drop <= 1'b1;
              end else begin
                has_st[in_qp] <= 1'b1;
                st_ptr[in_qp] <= sp_alloc_idx;
                ev.lost_ovf   <= sp_alloc_data.ovf;
                if (d_r == 1) begin                    // fast path
                  out_pkt   <= mk(OP_SACK, in_qp, in_psn, r, 3'd1);
                  out_valid <= 1'b1;
                  dlv_valid <= 1'b1; dlv_qp <= in_qp; dlv_psn <= in_psn;
                end else begin                         // slow path from the start
                  c_ptr  <= sp_alloc_idx;
                  c_s    <= sp_alloc_data;
                  c_lost <= sp_alloc_data.lost_cnt;
                  c_ovf  <= sp_alloc_data.ovf;
                  c_cmd  <= CMD_SET;
                  c_lo   <= off16(in_psn - r - 1'b1);
                  c_hi   <= off16(in_psn - r - 1'b1);
                  act    <= A_OOO;
                  ev.to_slow <= 1'b1;
                  st     <= S_BMREQ;
                end
              end
            end else begin                             // duplicate
              out_pkt   <= mk(OP_ACK, in_qp, r, r, '0);
              out_valid <= 1'b1;
            end
          end else begin
            c_ptr <= st_ptr[in_qp];
            c_s   <= s;
            if (d_r == 0) begin                        // retransmission of RCV-NXT
              dlv_valid <= 1'b1; dlv_qp <= in_qp; dlv_psn <= in_psn;
              if (!s.slow) begin                       // fast path exit
                begin rcv_nxt[in_qp] <= s.sack_high + 1'b1; r_live[in_qp] <= 1'b1; end
                has_st[in_qp]  <= 1'b0;
                sp_free_valid  <= 1'b1;
                sp_free_idx    <= st_ptr[in_qp];
                out_pkt   <= mk(OP_ACK, in_qp, s.sack_high + 1'b1, s.sack_high + 1'b1, '0);
                out_valid <= 1'b1;
                ev.fast_retx <= 1'b1;
              end else begin
                c_lost <= s.ovf ? s.lost_cnt : s.lost_cnt - 1'b1;
                c_ovf  <= s.ovf;
                if (psn_diff(r + 1'b1 + PSN_W'(s.comp_cnt), s.sack_high) > 0) begin
                  c_newr <= s.sack_high + 1'b1;        // everything up to sack-high is in
                  c_cmd  <= CMD_FREE_ALL;
                  act    <= A_DONE;
                end else begin
                  c_cmd  <= CMD_SCAN;
                  c_lo   <= off16(r + 1'b1 + PSN_W'(s.comp_cnt) - s.base);
                  c_hi   <= '0;
                  act    <= A_SCAN;
                end
                st <= S_BMREQ;
              end
            end else if (d_sh > 0) begin               // new OoO packet
              if (s.gbn) begin
                out_pkt   <= mk(OP_ACK, in_qp, r, r, '0);
                out_valid <= 1'b1;
                ev.gbn_drop <= 1'b1;
              end else if (!s.slow && add == '0) begin // stays on the fast path
                sp_wr_en   <= 1'b1;
                sp_wr_idx  <= st_ptr[in_qp];
                sp_wr_data <= s;
                sp_wr_data.sack_high <= in_psn;
                out_pkt   <= mk(OP_SACK, in_qp, in_psn, r, s.lost_cnt);
                out_valid <= 1'b1;
                dlv_valid <= 1'b1; dlv_qp <= in_qp; dlv_psn <= in_psn;
              end else begin
                c_lost <= lost_n;
                c_ovf  <= ovf_n;
                act    <= A_OOO;
                c_cmd  <= CMD_SET;
                if (!s.slow) begin                     // switch fast -> slow
                  ev.to_slow <= 1'b1;
                  if (off >= PSN_W'(BLK_BITS) && off <= PSN_W'(COMP_MAX)) begin
                    c_s.comp_cnt <= COMP_W'(off);      // bitmap acceleration
                    c_s.base     <= s.sack_high + 1'b1;
                    c_s.slow     <= 1'b1;
                    c_lo <= off16(add);
                    c_hi <= off16(add);
                    ev.comp_used <= 1'b1;
                    st   <= S_BMREQ;
                  end else if (off < PSN_W'(BLK_BITS)) begin
                    c_s.comp_cnt <= '0;
                    c_s.base     <= r + 1'b1;
                    c_s.slow     <= 1'b1;
                    c_lo <= 16'd0;                     // received run r+1 .. sack_high
                    c_hi <= 16'(off) - 16'd1;
                    act  <= A_RUN;
                    st   <= S_BMREQ;
                  end else begin                       // run longer than compression-cnt
                    sp_wr_en   <= 1'b1;
                    sp_wr_idx  <= st_ptr[in_qp];
                    sp_wr_data <= s;                   // stays on the fast path
                    sp_wr_data.gbn  <= 1'b1;
                    out_pkt   <= mk(OP_ACK, in_qp, r, r, '0);
                    out_valid <= 1'b1;
                    ev.gbn_drop <= 1'b1;
                  end
                end else begin
                  c_lo <= off16(in_psn - s.base);
                  c_hi <= off16(in_psn - s.base);
                  st   <= S_BMREQ;
                end
              end
            end else if (d_r < 0 || d_sh == 0) begin   // duplicate
              out_pkt   <= mk(OP_ACK, in_qp, r, r, '0);
              out_valid <= 1'b1;
            end else begin                             // behind a lost retransmission
              out_pkt   <= mk(OP_FNACK, in_qp, in_psn, r, s.lost_cnt);
              out_valid <= 1'b1;
              ev.fnack  <= 1'b1;
            end
          end
        end
        // ------------------------------------------------------------ bitmap access
        S_BMREQ: if (bm_req_ready) st <= S_BMWAIT;
        S_BMWAIT: if (bm_rsp_valid) begin
          c_s.head <= bm_rsp_head;
          c_s.tail <= bm_rsp_tail;
          c_s.nblk <= bm_rsp_nblk;
          c_s.base <= bm_rsp_base;
          st       <= S_IDLE;
          unique case (act)
            A_RUN: begin
              if (!bm_rsp_ok) begin                    // run only partly recorded:
                c_cmd <= CMD_FREE_ALL;                 // release it, stay on the fast path
                act   <= A_RUNFAIL;
                st    <= S_BMREQ;
              end else begin                           // now record the OoO PSN itself
                c_lo <= off16(c_psn - c_s.base);
                c_hi <= off16(c_psn - c_s.base);
                act  <= A_OOO;
                st   <= S_BMREQ;
              end
            end
            A_OOO: begin
              sp_wr_en   <= 1'b1;
              sp_wr_idx  <= c_ptr;
              sp_wr_data <= c_s;
              sp_wr_data.head <= bm_rsp_head; sp_wr_data.tail <= bm_rsp_tail;
              sp_wr_data.nblk <= bm_rsp_nblk; sp_wr_data.base <= bm_rsp_base;
              sp_wr_data.slow <= 1'b1;
              out_valid <= 1'b1;
              if (bm_rsp_ok) begin
                sp_wr_data.sack_high <= c_psn;
                sp_wr_data.lost_cnt  <= c_lost;
                sp_wr_data.ovf       <= c_ovf;
                out_pkt   <= mk(c_ovf ? OP_SACK_OVF : OP_SACK, c_q, c_psn, c_r, c_lost);
                dlv_valid <= 1'b1; dlv_qp <= c_q; dlv_psn <= c_psn;
                ev.lost_ovf <= c_ovf && !c_s.ovf;
              end else begin
                sp_wr_data.gbn <= 1'b1;
                out_pkt   <= mk(OP_ACK, c_q, c_r, c_r, '0);
                ev.gbn_drop <= 1'b1;
              end
            end
            A_SCAN: begin
              ev.slow_retx <= 1'b1;
              if (psn_diff(bm_rsp_psn, c_s.sack_high) > 0) begin
                c_newr <= c_s.sack_high + 1'b1;
                c_cmd  <= CMD_FREE_ALL;
                act    <= A_DONE;
                st     <= S_BMREQ;
              end else if (c_lost == 3'd1 && !c_ovf && !c_s.gbn) begin
                c_newr <= bm_rsp_psn;                  // one hole left: back to fast path
                c_cmd  <= CMD_FREE_ALL;
                act    <= A_TOFAST;
                st     <= S_BMREQ;
              end else begin
                begin rcv_nxt[c_q] <= bm_rsp_psn; r_live[c_q] <= 1'b1; end
                sp_wr_en   <= 1'b1;
                sp_wr_idx  <= c_ptr;
                sp_wr_data <= c_s;
                sp_wr_data.head <= bm_rsp_head; sp_wr_data.tail <= bm_rsp_tail;
                sp_wr_data.nblk <= bm_rsp_nblk; sp_wr_data.base <= bm_rsp_base;
                sp_wr_data.lost_cnt <= c_lost;
                sp_wr_data.comp_cnt <= '0;
                out_pkt   <= mk(OP_ACK, c_q, bm_rsp_psn, bm_rsp_psn, '0);
                out_valid <= 1'b1;
              end
            end
            A_RUNFAIL: begin                           // fast path, new OoO packets dropped
              sp_wr_en   <= 1'b1;
              sp_wr_idx  <= c_ptr;
              sp_wr_data <= c_s;
              sp_wr_data.nblk <= '0;
              sp_wr_data.slow <= 1'b0;
              sp_wr_data.gbn  <= 1'b1;
              out_pkt   <= mk(OP_ACK, c_q, c_r, c_r, '0);
              out_valid <= 1'b1;
              ev.gbn_drop <= 1'b1;
            end
            A_DONE: begin                              // loss recovery finished
              begin rcv_nxt[c_q] <= c_newr; r_live[c_q] <= 1'b1; end
              has_st[c_q]   <= 1'b0;
              sp_free_valid <= 1'b1;
              sp_free_idx   <= c_ptr;
              out_pkt   <= mk(OP_ACK, c_q, c_newr, c_newr, '0);
              out_valid <= 1'b1;
            end
            A_TOFAST: begin
              begin rcv_nxt[c_q] <= c_newr; r_live[c_q] <= 1'b1; end
              sp_wr_en   <= 1'b1;
              sp_wr_idx  <= c_ptr;
              sp_wr_data <= c_s;
              sp_wr_data.nblk     <= '0;
              sp_wr_data.slow     <= 1'b0;
              sp_wr_data.lost_cnt <= 3'd1;
              sp_wr_data.comp_cnt <= '0;
              out_pkt   <= mk(OP_ACK, c_q, c_newr, c_newr, '0);
              out_valid <= 1'b1;
              ev.to_fast <= 1'b1;
            end
            default: ;
          endcase
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
