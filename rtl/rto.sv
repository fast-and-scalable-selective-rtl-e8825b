// rto: retransmission-timeout scanner.
//
// Walks the shared QPC RAM one QP per cycle (read port b). A QP whose timer runs (UNACK !=
// SND-NXT, i.e. data is outstanding) and whose stamp is RTO_CYCLES or more in the past has
// timed out: a timeout event carrying the QP index is sent to the SR module, and a request
// to restart the timer (ts = now) is sent to the update queue. The scan holds on a QP until
// both outputs accept, so no timeout is lost. A full sweep takes NUM_QP cycles, so a timeout
// is seen at most NUM_QP cycles late. The document describes the traversal and the hand-off
// to SR; READ-request resubmission to the QPC manager is not part of this transport (no READ
// support). The timeout value and the one-QP-per-cycle sweep are this design's choices.
//
// Output bits that are constant by construction: the QPC write carries only the timer
// stamp (its UNACK/SND-NXT fields and mask bits are fixed).
module rto
  import fasr_pkg::*;
#(
  parameter int NUM_QP     = 5120,
  parameter int RTO_CYCLES = 20000,
  localparam int QW        = (NUM_QP > 1) ? $clog2(NUM_QP) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TS_W-1:0] now,
  output logic [QW-1:0]   rd_qp,
  input  qpc_t            rd_data,
  output logic            ev_valid,
  input  logic            ev_ready,
  output logic [QW-1:0]   ev_qp,
  output logic            upd_valid,
  input  logic            upd_ready,
  output qpc_upd_t        upd
);
  logic [QW-1:0] idx;
  logic          expired;

  assign rd_qp   = idx;
  assign expired = (rd_data.unack != rd_data.snd_nxt) &&
                   ((now - rd_data.ts) >= TS_W'(RTO_CYCLES));

  // Each valid waits for the other side's ready so that both words move together.
  assign ev_valid  = expired && upd_ready;
  assign ev_qp     = idx;
  assign upd_valid = expired && ev_ready;
  always_comb begin
    upd          = '0;
    upd.qp       = QPN_W'(idx);
    upd.mask.ts  = 1'b1;
    upd.val.ts   = now;
  end

  // Both outputs must take the word in the same cycle before the scan moves on.
  logic advance;
  assign advance = !expired || (ev_ready && upd_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx <= '0;
    end else if (advance) begin
      idx <= (int'(idx) == NUM_QP - 1) ? '0 : idx + 1'b1;
    end
  end
endmodule
