// sr_state_pool: Level-1 shared SR state pool.
//
// Holds N_UNITS fixed-size SR state units (fasr_pkg::sr_state_t) shared by all QPs, and the
// "available SR state bitmap": one bit per unit, 0 = free, 1 = owned by a QP. A QP gets a unit
// when it first loses a packet and returns it when it leaves loss recovery; its QPC then holds
// only a 1-byte pointer to the unit (Sec. III-C.1, Fig. 5(a)).
//
// Interface: alloc_valid takes the lowest free unit (priority encoder over the availability
// bitmap) in the same cycle, returns its index on alloc_idx and writes alloc_data into it;
// alloc_ok tells whether a unit was free. free_valid releases unit free_idx. One read port
// (combinational, rd_idx -> rd_data) and one write port (wr_en, wr_idx, wr_data, applied at
// the clock edge). n_used counts occupied units. All operations complete in one cycle.
// Reset frees every unit. Storage layout and the priority encoder are this design's choice.
module sr_state_pool
  import fasr_pkg::*;
#(
  parameter int N_UNITS = 20   // SR state units, Sec. III-D
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        alloc_valid,
  input  sr_state_t                   alloc_data,
  output logic                        alloc_ok,
  output logic [BPTR_W-1:0]           alloc_idx,
  input  logic                        free_valid,
  input  logic [BPTR_W-1:0]           free_idx,
  input  logic [BPTR_W-1:0]           rd_idx,
  output sr_state_t                   rd_data,
  input  logic                        wr_en,
  input  logic [BPTR_W-1:0]           wr_idx,
  input  sr_state_t                   wr_data,
  output logic [$clog2(N_UNITS+1)-1:0] n_used
);
  sr_state_t          units [N_UNITS];
  logic [N_UNITS-1:0] avail_bm;   // 1 = occupied

  // array indices (pointers are 1 byte wide; range is checked before use)
  localparam int IW = (N_UNITS > 1) ? $clog2(N_UNITS) : 1;
  logic [IW-1:0] rd_i, free_i, alloc_i, wr_i;
  assign rd_i = IW'(rd_idx);
  assign free_i = IW'(free_idx);
  assign alloc_i = IW'(alloc_idx);
  assign wr_i = IW'(wr_idx);

  always_comb begin
    alloc_ok  = 1'b0;
    alloc_idx = '0;
    for (int i = N_UNITS - 1; i >= 0; i--) begin
      if (!avail_bm[i]) begin
        alloc_ok  = 1'b1;
        alloc_idx = BPTR_W'(i);
      end
    end
  end

  assign rd_data = (int'(rd_idx) < N_UNITS) ? units[rd_i] : '0;

  always_comb begin
    n_used = '0;
    for (int i = 0; i < N_UNITS; i++) n_used += avail_bm[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      avail_bm <= '0;
    end else begin
      if (free_valid && int'(free_idx) < N_UNITS) avail_bm[free_i] <= 1'b0;
      if (alloc_valid && alloc_ok)                avail_bm[alloc_i] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_idx) < N_UNITS) units[wr_i] <= wr_data;
    if (alloc_valid && alloc_ok)         units[alloc_i] <= alloc_data;
  end
endmodule
