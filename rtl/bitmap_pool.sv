// bitmap_pool: Level-2 shared bitmap pool.
//
// N_BLK bitmap blocks of BLK_BITS bits each, shared by all QPs on the slow SR path. Every
// block has a next-block pointer (Nxt_ptr) so that the blocks owned by one QP form a singly
// linked list, and one bit in the "available block bitmap" (0 = free, 1 = in use)
// (Sec. III-C.2, Fig. 5(b)). Bit k of a block records whether the PSN it stands for arrived.
//
// Ports, all single-cycle: alloc_valid takes the lowest free block (priority encoder),
// returns it on alloc_idx with alloc_ok, clears its bits and sets its pointer to NULL_PTR.
// free_valid releases block free_idx. rd_idx reads a block's bits and pointer
// combinationally. set_valid ORs set_mask into block set_idx. link_valid writes link_ptr
// into the pointer of block link_idx. n_used counts blocks in use. Reset frees all blocks.
//
// The pool size, block width, availability bitmap and linked lists follow the document;
// the port set, the priority encoder and the null-pointer value are this design's choice.
module bitmap_pool
  import fasr_pkg::*;
#(
  parameter int N_BLK    = 70,  // bitmap blocks, Sec. III-D
  parameter int BLK_BITS = 10   // bits per block, Sec. III-D
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       alloc_valid,
  output logic                       alloc_ok,
  output logic [BPTR_W-1:0]          alloc_idx,
  input  logic                       free_valid,
  input  logic [BPTR_W-1:0]          free_idx,
  input  logic [BPTR_W-1:0]          rd_idx,
  output logic [BLK_BITS-1:0]        rd_bits,
  output logic [BPTR_W-1:0]          rd_nxt,
  input  logic                       set_valid,
  input  logic [BPTR_W-1:0]          set_idx,
  input  logic [BLK_BITS-1:0]        set_mask,
  input  logic                       link_valid,
  input  logic [BPTR_W-1:0]          link_idx,
  input  logic [BPTR_W-1:0]          link_ptr,
  output logic [$clog2(N_BLK+1)-1:0] n_used
);
  localparam logic [BPTR_W-1:0] NULL_PTR = '1;

  logic [BLK_BITS-1:0] bits   [N_BLK];
  logic [BPTR_W-1:0]   nxt    [N_BLK];
  logic [N_BLK-1:0]    avail_bm;

  // array indices (pointers are 1 byte wide; range is checked before use)
  localparam int IW = (N_BLK > 1) ? $clog2(N_BLK) : 1;
  logic [IW-1:0] rd_i, free_i, alloc_i, set_i, link_i;
  assign rd_i = IW'(rd_idx);
  assign free_i = IW'(free_idx);
  assign alloc_i = IW'(alloc_idx);
  assign set_i = IW'(set_idx);
  assign link_i = IW'(link_idx);

  always_comb begin
    alloc_ok  = 1'b0;
    alloc_idx = NULL_PTR;
    for (int i = N_BLK - 1; i >= 0; i--) begin
      if (!avail_bm[i]) begin
        alloc_ok  = 1'b1;
        alloc_idx = BPTR_W'(i);
      end
    end
  end

  always_comb begin
    rd_bits = '0;
    rd_nxt  = NULL_PTR;
    if (int'(rd_idx) < N_BLK) begin
      rd_bits = bits[rd_i];
      rd_nxt  = nxt[rd_i];
    end
  end

  always_comb begin
    n_used = '0;
    for (int i = 0; i < N_BLK; i++) n_used += avail_bm[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      avail_bm <= '0;
    end else begin
      if (free_valid && int'(free_idx) < N_BLK) avail_bm[free_i] <= 1'b0;
      if (alloc_valid && alloc_ok)              avail_bm[alloc_i] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (set_valid && int'(set_idx) < N_BLK)   bits[set_i] <= bits[set_i] | set_mask;
    if (link_valid && int'(link_idx) < N_BLK) nxt[link_i] <= link_ptr;
    if (alloc_valid && alloc_ok) begin
      bits[alloc_i] <= '0;
      nxt[alloc_i]  <= NULL_PTR;
    end
  end
endmodule
