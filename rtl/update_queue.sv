// update_queue: serialises QPC write requests into the one write port of the QPC RAM.
//
// Each of the N_SRC sources (in this transport: 0 = CC, 1 = SR, 2 = RTO) has its own FIFO
// of SRC_DEPTH requests with a valid/ready input. Every cycle the non-empty FIFO with the
// lowest index is popped and its request is driven on wr_en/wr in the same cycle (one write
// per cycle, fixed priority). The document names the queue and says it serves CC, SR and the
// QPC manager in priority order; the order used here, the FIFO depth and the RTO source are
// this design's choices. The QPC manager of this transport has no QPC fields to write.
module update_queue
  import fasr_pkg::*;
#(
  parameter int N_SRC     = 3,
  parameter int SRC_DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_SRC-1:0] in_valid,
  output logic [N_SRC-1:0] in_ready,
  input  qpc_upd_t         in_req [N_SRC],
  output logic             wr_en,
  output qpc_upd_t         wr,
  output logic [N_SRC-1:0] granted   // which source was written this cycle
);
  logic [N_SRC-1:0] f_valid, f_ready;
  qpc_upd_t         f_data [N_SRC];

  for (genvar g = 0; g < N_SRC; g++) begin : g_src
    sync_fifo #(.T(qpc_upd_t), .DEPTH(SRC_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid(in_valid[g]), .in_ready(in_ready[g]), .in_data(in_req[g]),
      .out_valid(f_valid[g]), .out_ready(f_ready[g]), .out_data(f_data[g]),
      .count()
    );
  end

  always_comb begin
    f_ready = '0;
    wr_en   = 1'b0;
    wr      = '0;
    for (int i = N_SRC - 1; i >= 0; i--) begin
      if (f_valid[i]) begin
        f_ready = '0;
        f_ready[i] = 1'b1;
        wr_en   = 1'b1;
        wr      = f_data[i];
      end
    end
  end
  assign granted = f_ready;

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(granted));
endmodule
