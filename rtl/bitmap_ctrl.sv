// bitmap_ctrl: bitmap control for the Level-2 shared bitmap pool.
//
// Serves one QP's linked list of bitmap blocks at a time (Sec. III-C.2, III-D, Fig. 5). The
// list is described by the caller's SR state unit: head and tail block, number of blocks and
// base, the PSN recorded by bit 0 of the head block; block i of the list covers PSNs
// base + i*BLK_BITS ... base + (i+1)*BLK_BITS - 1. Because out-of-order packets only touch
// the tail and retransmissions only the head, the controller keeps both ends and never
// searches the middle of a list.
//
// Commands (req_valid/req_ready handshake, one outstanding; a one-cycle rsp_valid pulse
// returns the updated list descriptor):
//   CMD_SET      set bits req_lo..req_hi (offsets from base; the range lies in one block at
//                or after the current tail). Blocks are appended at the tail, one per cycle,
//                until the range is covered. rsp_ok=0 if the pool ran out of blocks; the
//                blocks already linked stay in the list.
//   CMD_SCAN     find the first 0 bit at offset >= req_lo, walking from the head one block
//                per cycle; every head block passed completely is released and base moves
//                up by BLK_BITS. rsp_psn = PSN of that 0 bit (the new RCV-NXT); past the end of
//                the list every bit counts as 0.
//                A range marked 16'hFFFF (beyond the whole pool) fails at once.
//   CMD_FREE_ALL release every block of the list, one per cycle.
// Latency from the accepting clock edge to rsp_valid: SET 4 + (blocks appended) cycles,
// SCAN 2 + (blocks visited), FREE_ALL 3 + (blocks in list), growing with the number of blocks as the document states for
// RCV-NXT updates. The command set and its timing are this design's choice.
module bitmap_ctrl
  import fasr_pkg::*;
#(
  parameter int N_BLK    = 70,
  parameter int BLK_BITS = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       req_valid,
  output logic                       req_ready,
  input  logic [1:0]                 req_cmd,
  input  logic [BPTR_W-1:0]          req_head,
  input  logic [BPTR_W-1:0]          req_tail,
  input  logic [BPTR_W-1:0]          req_nblk,
  input  psn_t                       req_base,
  input  logic [15:0]                req_lo,
  input  logic [15:0]                req_hi,
  output logic                       rsp_valid,
  output logic                       rsp_ok,
  output logic [BPTR_W-1:0]          rsp_head,
  output logic [BPTR_W-1:0]          rsp_tail,
  output logic [BPTR_W-1:0]          rsp_nblk,
  output psn_t                       rsp_base,
  output psn_t                       rsp_psn,
  output logic [$clog2(N_BLK+1)-1:0] blocks_used
);
  localparam logic [1:0] CMD_SET = 2'd0, CMD_SCAN = 2'd1, CMD_FREE_ALL = 2'd2;

  typedef enum logic [2:0] {S_IDLE, S_SET_ALLOC, S_SET_WRITE, S_SCAN, S_FREE, S_RSP} state_e;
  state_e st;

  logic [BPTR_W-1:0]   head, tail, nblk;
  psn_t                base;
  logic [15:0]         lo, hi;
  logic                ok;
  psn_t                zpsn;

  // pool ports
  logic                alloc_valid, alloc_ok;
  logic [BPTR_W-1:0]   alloc_idx;
  logic                free_valid;
  logic [BPTR_W-1:0]   free_idx;
  logic [BLK_BITS-1:0] rd_bits;
  logic [BPTR_W-1:0]   rd_nxt;
  logic                set_valid;
  logic [BLK_BITS-1:0] set_mask;
  logic                link_valid;

  bitmap_pool #(.N_BLK(N_BLK), .BLK_BITS(BLK_BITS)) u_pool (
    .clk, .rst_n,
    .alloc_valid, .alloc_ok, .alloc_idx,
    .free_valid, .free_idx,
    .rd_idx(head), .rd_bits, .rd_nxt,
    .set_valid, .set_idx(tail), .set_mask,
    .link_valid, .link_idx(tail), .link_ptr(alloc_idx),
    .n_used(blocks_used)
  );

  // Offset of the tail block's first bit, relative to base.
  logic [15:0] tail_off, cover_off;
  assign cover_off    = 16'(nblk) * 16'(BLK_BITS);
  assign tail_off = (nblk == '0) ? 16'd0 : cover_off - 16'(BLK_BITS);

  // Mask of bits lo..hi inside the tail block.
  always_comb begin
    set_mask = '0;
    for (int k = 0; k < BLK_BITS; k++) begin
      if (16'(k) + tail_off >= lo && 16'(k) + tail_off <= hi) set_mask[k] = 1'b1;
    end
  end

  // First zero at or after lo in the head block.
  logic                zero_found;
  logic [15:0]         zero_pos;
  always_comb begin
    zero_found = 1'b0;
    zero_pos   = '0;
    for (int k = BLK_BITS - 1; k >= 0; k--) begin
      if (!rd_bits[k] && 16'(k) >= lo) begin
        zero_found = 1'b1;
        zero_pos   = 16'(k);
      end
    end
  end

  assign req_ready   = (st == S_IDLE);
  assign alloc_valid = (st == S_SET_ALLOC) && (hi >= cover_off);
  assign link_valid  = alloc_valid && alloc_ok && (nblk != '0);
  assign set_valid   = (st == S_SET_WRITE);
  assign free_valid  = ((st == S_SCAN) && (nblk != '0) && !zero_found) ||
                       ((st == S_FREE) && (nblk != '0));
  assign free_idx    = head;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      rsp_valid <= 1'b0;
      head <= '0; tail <= '0; nblk <= '0; base <= '0; lo <= '0; hi <= '0;
      ok <= 1'b0; zpsn <= '0;
      rsp_ok <= 1'b0; rsp_head <= '0; rsp_tail <= '0; rsp_nblk <= '0; rsp_base <= '0;
      rsp_psn <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (st)
        S_IDLE: if (req_valid) begin
          head <= req_head;
          tail <= req_tail;
          nblk <= req_nblk;
          base <= req_base;
          lo   <= req_lo;
          hi   <= req_hi;
          ok   <= 1'b1;
          unique case (req_cmd)
            CMD_SET:  if (req_hi == 16'hFFFF) begin    // beyond the span of the whole pool
                        ok <= 1'b0;
                        st <= S_RSP;
                      end else st <= S_SET_ALLOC;
            CMD_SCAN: st <= S_SCAN;
            CMD_FREE_ALL: st <= S_FREE;
            default: begin                             // unused code: fail, change nothing
              ok <= 1'b0;
              st <= S_RSP;
            end
          endcase
        end
        S_SET_ALLOC: begin
          if (hi < cover_off) begin
            st <= S_SET_WRITE;
          end else if (!alloc_ok) begin
            ok <= 1'b0;
            st <= S_RSP;
          end else begin
            if (nblk == '0) head <= alloc_idx;
            tail <= alloc_idx;
            nblk <= nblk + 1'b1;
          end
        end
        S_SET_WRITE: st <= S_RSP;
        S_SCAN: begin
          if (nblk == '0) begin                     // nothing recorded from base on
            zpsn <= base + PSN_W'(lo);
            st   <= S_RSP;
          end else if (zero_found) begin
            zpsn <= base + PSN_W'(zero_pos);
            st   <= S_RSP;
          end else begin
            head <= rd_nxt;
            nblk <= nblk - 1'b1;
            base <= base + PSN_W'(BLK_BITS);
            lo   <= (lo > 16'(BLK_BITS)) ? lo - 16'(BLK_BITS) : 16'd0;
          end
        end
        S_FREE: begin
          if (nblk == '0) begin
            st <= S_RSP;
          end else begin
            head <= rd_nxt;
            nblk <= nblk - 1'b1;
            base <= base + PSN_W'(BLK_BITS);
          end
        end
        S_RSP: begin
          rsp_valid <= 1'b1;
          rsp_ok    <= ok;
          rsp_head  <= head;
          rsp_tail  <= tail;
          rsp_nblk  <= nblk;
          rsp_base  <= base;
          rsp_psn   <= zpsn;
          st        <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
