// fasr_pkg: types and constants shared by the FaSR transport-layer modules.
//
// Packet headers are carried between modules as a packed struct (pkt_t); only the
// transport-relevant header fields are modelled, the payload moves on the DMA data path
// outside this logic. The SACK lost-cnt overflow flag is carried as a distinct opcode
// (OP_SACK_OVF), following the document's choice of an unused op-type value for it.
// PSNs are 24 bits wide as in RoCEv2 and compared with serial (modulo 2^24) arithmetic.
//
// The SR state fields follow the document; the struct layouts, widths of fields the
// document does not size, and the event records are this design's choice.
package fasr_pkg;

  localparam int PSN_W     = 24;   // RoCEv2 PSN width
  localparam int QPN_W     = 24;   // QPN field width in the header
  localparam int LOSTCNT_W = 3;    // per-QP lost-cnt, 3 bits
  localparam int COMP_W    = 10;   // compression-cnt, 10 bits
  localparam int TS_W      = 32;   // cycle time stamps for the retransmission timer

  typedef logic [PSN_W-1:0] psn_t;

  typedef enum logic [2:0] {
    OP_DATA     = 3'd0,   // WRITE/SEND data packet
    OP_ACK      = 3'd1,   // cumulative ACK, psn = receiver's RCV-NXT
    OP_SACK     = 3'd2,   // selective ACK: psn = OoO PSN, ack_psn = RCV-NXT, lost_cnt
    OP_SACK_OVF = 3'd3,   // SACK whose receiver lost-cnt has overflowed
    OP_FNACK    = 3'd4    // lost retransmission report: psn = discarded PSN, ack_psn = RCV-NXT
  } opcode_e;

  typedef struct packed {
    opcode_e                opcode;
    logic [QPN_W-1:0]       qpn;
    psn_t                   psn;
    psn_t                   ack_psn;
    logic [LOSTCNT_W-1:0]   lost_cnt;
    logic                   retx;      // data packet is a retransmission
  } pkt_t;

  // Retransmission request from SR to CC (RetxQ). gbn=1: go back and resend from psn.
  typedef struct packed {
    logic [QPN_W-1:0] qpn;
    psn_t             psn;
    psn_t             count;
    logic             gbn;
  } retx_req_t;

  // New work request from the scheduler (NewWQEQ): npkts packets to send on qpn.
  typedef struct packed {
    logic [QPN_W-1:0] qpn;
    logic [15:0]      npkts;
  } wqe_t;

  // Level-1 SR state unit (shared SR state pool). Bitmap block pointers are 1 byte.
  localparam int BPTR_W = 8;
  typedef struct packed {
    psn_t                 sack_high;  // highest PSN received out of order
    logic [LOSTCNT_W-1:0] lost_cnt;   // number of holes below sack_high
    logic                 ovf;        // lost-cnt overflowed; frozen until recovery ends
    logic                 slow;       // slow path: bitmap in use
    logic                 gbn;        // bitmap pool exhausted: QP fell back to GBN
    logic [BPTR_W-1:0]    head;       // first bitmap block of the QP's list
    logic [BPTR_W-1:0]    tail;       // last bitmap block of the QP's list
    logic [BPTR_W-1:0]    nblk;       // number of blocks in the list
    psn_t                 base;       // PSN recorded by bit 0 of the head block
    logic [COMP_W-1:0]    comp_cnt;   // run of received PSNs after RCV-NXT not in the bitmap
  } sr_state_t;

  // One-cycle event pulses from the receiver path, used for statistics and coverage.
  typedef struct packed {
    logic fast_retx;   // head retransmission finished on the fast path (no bitmap)
    logic slow_retx;   // head retransmission finished through a bitmap scan
    logic to_slow;     // QP switched from the fast to the slow path
    logic to_fast;     // QP switched back from the slow to the fast path
    logic fnack;       // FNACK sent: a retransmission arrived behind a lost one
    logic gbn_drop;    // packet dropped because a shared pool was exhausted (GBN fallback)
    logic lost_ovf;    // lost-cnt overflowed
    logic comp_used;   // bitmap acceleration: compression-cnt set on the switch to slow path
  } rx_ev_t;

  // One-cycle event pulses from the sender path.
  typedef struct packed {
    logic retx_sack;   // range retransmitted because of a SACK
    logic sack_lost;   // SACK gap seen as a lost SACK, nothing retransmitted
    logic rto_fast;    // timeout with lost-cnt 1: only UNACK resent
    logic rto_slow;    // timeout with lost-cnt > 1
    logic rto_gbn;     // timeout with lost-cnt 0: go back to UNACK
    logic fnack_taken; // FNACK acted on
    logic fnack_ign;   // FNACK ignored (already answered since the last new ACK)
  } tx_ev_t;

  // Shared QPC group read by CC and the RTO scanner, written only through the update queue.
  typedef struct packed {
    psn_t            unack;     // oldest unacknowledged PSN (from SR)
    psn_t            snd_nxt;   // next new PSN to send (from CC)
    logic [TS_W-1:0] ts;        // time the retransmission timer was last restarted
  } qpc_t;

  // Field write enables of a QPC write request.
  typedef struct packed {
    logic unack;
    logic snd_nxt;
    logic ts;
  } qpc_mask_t;

  // QPC write request as queued in the update queue.
  typedef struct packed {
    logic [QPN_W-1:0] qp;
    qpc_mask_t        mask;
    qpc_t             val;
  } qpc_upd_t;

  // a - b as a signed serial distance (RFC 1982 style) on 24-bit PSNs.
  function automatic logic signed [PSN_W-1:0] psn_diff(psn_t a, psn_t b);
    return signed'(a - b);
  endfunction

endpackage
