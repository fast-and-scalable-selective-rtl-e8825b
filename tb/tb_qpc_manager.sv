// tb_qpc_manager: self-checking testbench for the QPC manager.
//
// Sends legal and illegal packets (QPN out of range, unknown opcode) and work requests
// (QPN out of range, zero length) with random output backpressure. Legal packets must come
// out on SackQ and legal work requests on NewWQEQ, in order, with QPC index = QPN; illegal
// items must be dropped and counted.
//
// The expected results follow the rules the document gives for this block (or, where it
// gives only the function, this design's documented behaviour); stimulus, sizes and the
// reference model are this testbench's own.
module tb_qpc_manager;
  import fasr_pkg::*;
  localparam int NUM_QP = 100, QW = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic pkt_valid, pkt_ready, wqe_valid, wqe_ready, sq_valid, sq_ready, nw_valid, nw_ready;
  pkt_t pkt, sq_pkt;
  wqe_t wqe;
  logic [QW-1:0] sq_qp, nw_qp;
  logic [15:0] nw_npkts, drops;
  qpc_manager #(.NUM_QP(NUM_QP)) dut (.*);

  pkt_t ep [$];
  wqe_t ew [$];
  int exp_drops = 0, n_sq = 0, n_nw = 0;

  always @(posedge clk) if (rst_n) begin
    if (sq_valid && sq_ready) begin
      check(ep.size() > 0 && sq_pkt == ep[0] && sq_qp == QW'(ep[0].qpn), "SackQ item");
      if (ep.size() > 0) void'(ep.pop_front());
      n_sq++;
    end
    if (nw_valid && nw_ready) begin
      check(ew.size() > 0 && nw_qp == QW'(ew[0].qpn) && nw_npkts == ew[0].npkts, "NewWQEQ item");
      if (ew.size() > 0) void'(ew.pop_front());
      n_nw++;
    end
  end

  initial begin
    pkt_valid = 0; wqe_valid = 0; pkt = '0; wqe = '0; sq_ready = 0; nw_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      pkt_valid = ($urandom_range(0, 1) == 1);
      pkt = '0;
      pkt.qpn = QPN_W'($urandom_range(0, 9) == 0 ? 100 + $urandom_range(0, 1000) : $urandom_range(0, NUM_QP - 1));
      pkt.opcode = opcode_e'($urandom_range(0, 9) == 0 ? 3'd6 : 3'($urandom_range(0, 4)));
      pkt.psn = PSN_W'($urandom);
      wqe_valid = ($urandom_range(0, 1) == 1);
      wqe.qpn = QPN_W'($urandom_range(0, 9) == 0 ? 5000 : $urandom_range(0, NUM_QP - 1));
      wqe.npkts = ($urandom_range(0, 9) == 0) ? 16'd0 : 16'($urandom_range(1, 64));
      sq_ready = ($urandom_range(0, 3) != 0);
      nw_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (pkt_valid && pkt_ready) begin
        if (int'(pkt.qpn) < NUM_QP && pkt.opcode <= OP_FNACK) ep.push_back(pkt); else exp_drops++;
      end
      if (wqe_valid && wqe_ready) begin
        if (int'(wqe.qpn) < NUM_QP && wqe.npkts != 0) ew.push_back(wqe); else exp_drops++;
      end
    end
    @(negedge clk); pkt_valid = 0; wqe_valid = 0; sq_ready = 1; nw_ready = 1;
    repeat (5) @(posedge clk);
    check(ep.size() == 0 && ew.size() == 0, "items lost");
    check(int'(drops) == exp_drops, $sformatf("drops %0d exp %0d", drops, exp_drops));
    check(exp_drops > 0 && n_sq > 0 && n_nw > 0, "traffic mix");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
