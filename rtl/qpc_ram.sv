// qpc_ram: the shared part of the on-chip queue-pair context (QPC) memory.
//
// One entry per QP holding UNACK, SND-NXT and the retransmission timer stamp (fasr_pkg::qpc_t).
// The document keeps QPC in FPGA dual-port RAM and splits each module's state variables into
// separate groups so that the modules never contend for a port. Here every module keeps its
// private group next to its logic (sr_rx, sr_tx, cc) and this RAM holds the group that is
// shared: it has a single write port, fed by the update queue, and two read ports, one for
// CC (window check) and one for the RTO scanner. The write applies the fields selected by
// wr.mask at the clock edge; reads are combinational, so a write is visible to both readers
// the next cycle. Reset marks every entry as unwritten, which reads as 0 (all PSNs start
// at 0), so the arrays themselves need no reset.
//
// The split into per-module groups follows the document; which fields form the shared
// group and the port arrangement are this design's choice.
module qpc_ram
  import fasr_pkg::*;
#(
  parameter int NUM_QP = 5120,
  localparam int QW    = (NUM_QP > 1) ? $clog2(NUM_QP) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  qpc_upd_t      wr,
  input  logic [QW-1:0] ra_qp,
  output qpc_t          ra_data,
  input  logic [QW-1:0] rb_qp,
  output qpc_t          rb_data
);
  psn_t            unack   [NUM_QP];
  psn_t            snd_nxt [NUM_QP];
  logic [TS_W-1:0] ts      [NUM_QP];
  // 0: the field of this QP was never written and reads as 0, so reset need not clear the
  // arrays themselves
  logic [NUM_QP-1:0] u_live, n_live, t_live;

  logic [QW-1:0] wq;
  assign wq = QW'(wr.qp);

  always_comb begin
    ra_data.unack   = u_live[ra_qp] ? unack[ra_qp]   : '0;
    ra_data.snd_nxt = n_live[ra_qp] ? snd_nxt[ra_qp] : '0;
    ra_data.ts      = t_live[ra_qp] ? ts[ra_qp]      : '0;
    rb_data.unack   = u_live[rb_qp] ? unack[rb_qp]   : '0;
    rb_data.snd_nxt = n_live[rb_qp] ? snd_nxt[rb_qp] : '0;
    rb_data.ts      = t_live[rb_qp] ? ts[rb_qp]      : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u_live <= '0;
      n_live <= '0;
      t_live <= '0;
    end else if (wr_en && int'(wr.qp) < NUM_QP) begin
      if (wr.mask.unack)   u_live[wq] <= 1'b1;
      if (wr.mask.snd_nxt) n_live[wq] <= 1'b1;
      if (wr.mask.ts)      t_live[wq] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr.qp) < NUM_QP) begin
      if (wr.mask.unack)   unack[wq]   <= wr.val.unack;
      if (wr.mask.snd_nxt) snd_nxt[wq] <= wr.val.snd_nxt;
      if (wr.mask.ts)      ts[wq]      <= wr.val.ts;
    end
  end
endmodule
