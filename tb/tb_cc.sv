// tb_cc: self-checking testbench for the congestion-control / transmit scheduling stage.
//
// A behavioural QPC memory returns UNACK and takes CC's SND-NXT writes. Work requests are
// posted on several QPs; the testbench checks that every QP's new packets leave in PSN
// order with no gap or repeat, that no packet leaves beyond the window (SND-NXT - UNACK <
// WINDOW), that a range retransmission request produces exactly its PSNs back to back with
// the retransmission flag, that a go-back request restarts the QP at the given PSN, and
// that SND-NXT written to QPC follows the packets sent. UNACK advances slowly so that the
// window blocks at times.
//
// The expected results follow the rules the document gives for this block (or, where it
// gives only the function, this design's documented behaviour); stimulus, sizes and the
// reference model are this testbench's own.
module tb_cc;
  import fasr_pkg::*;
  localparam int NUM_QP = 8, QW = 3, WINDOW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic [TS_W-1:0] now = 0;
  logic wqe_valid, wqe_ready, retx_valid, retx_ready, tx_valid, tx_ready, upd_valid, upd_ready;
  logic [QW-1:0] wqe_qp, qpc_qp;
  logic [15:0] wqe_npkts;
  retx_req_t retx;
  qpc_t qpc;
  pkt_t tx_pkt;
  qpc_upd_t upd;
  logic win_stall;
  cc #(.NUM_QP(NUM_QP), .WINDOW(WINDOW)) dut (.*);

  qpc_t mem [NUM_QP];
  assign qpc = mem[qpc_qp];
  int next_new [NUM_QP];     // next new PSN expected per QP
  int posted [NUM_QP];       // PSNs posted per QP
  int retx_q [$];            // expected retransmitted (qp*1000+psn)
  int n_new = 0, n_retx = 0, n_stall = 0;
  bit gbn_pending [NUM_QP];

  always @(posedge clk) if (rst_n) begin
    now <= now + 1;
    if (win_stall) n_stall++;
    if (upd_valid && upd_ready) begin
      if (upd.mask.snd_nxt) mem[int'(upd.qp)].snd_nxt = upd.val.snd_nxt;
    end
    if (tx_valid && tx_ready) begin
      automatic int q = int'(tx_pkt.qpn), p = int'(tx_pkt.psn);
      check(tx_pkt.opcode == OP_DATA, "data opcode");
      if (tx_pkt.retx) begin
        check(retx_q.size() > 0 && retx_q[0] == q * 1000 + p, $sformatf("retx qp %0d psn %0d", q, p));
        if (retx_q.size() > 0) void'(retx_q.pop_front());
        n_retx++;
      end else begin
        check(p == next_new[q], $sformatf("qp %0d new psn %0d exp %0d", q, p, next_new[q]));
        check(p - int'(mem[q].unack) < WINDOW, $sformatf("qp %0d psn %0d beyond window", q, p));
        check(p < posted[q], "sent more than posted");
        next_new[q] = p + 1;
        n_new++;
      end
    end
  end

  task automatic post(int q, int n);
    @(negedge clk); wqe_valid = 1; wqe_qp = QW'(q); wqe_npkts = 16'(n);
    do @(posedge clk); while (!wqe_ready);
    #1 wqe_valid = 0;
    posted[q] += n;
  endtask

  task automatic request(int q, int psn, int count, bit gbn);
    @(negedge clk); retx_valid = 1;
    retx.qpn = QPN_W'(q); retx.psn = PSN_W'(psn); retx.count = PSN_W'(count); retx.gbn = gbn;
    do @(posedge clk); while (!retx_ready);
    #1 retx_valid = 0;
    if (gbn) next_new[q] = psn;
    else for (int i = 0; i < count; i++) retx_q.push_back(q * 1000 + psn + i);
  endtask

  initial begin
    wqe_valid = 0; retx_valid = 0; wqe_qp = '0; wqe_npkts = '0; retx = '0;
    tx_ready = 1; upd_ready = 1;
    for (int i = 0; i < NUM_QP; i++) begin mem[i] = '0; next_new[i] = 0; posted[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    post(1, 20); post(2, 5); post(5, 30);
    repeat (40) @(posedge clk);
    request(1, 2, 3, 0);                    // selective range
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      tx_ready = ($urandom_range(0, 3) != 0);
      // the receiver acknowledges slowly
      if ($urandom_range(0, 3) == 0) begin
        automatic int q = $urandom_range(0, NUM_QP - 1);
        if (int'(mem[q].unack) < next_new[q]) mem[q].unack = mem[q].unack + 1;
      end
      if (k == 100) begin
        request(5, int'(mem[5].unack), 0, 1); // go back N on qp 5
      end
      if (k == 150) post(2, 4);
    end
    tx_ready = 1;
    for (int q = 0; q < NUM_QP; q++) mem[q].unack = PSN_W'(next_new[q]);
    repeat (200) begin
      @(negedge clk);
      for (int q = 0; q < NUM_QP; q++) mem[q].unack = PSN_W'(next_new[q]);
    end
    for (int q = 0; q < NUM_QP; q++) begin
      check(next_new[q] == posted[q], $sformatf("qp %0d sent %0d of %0d", q, next_new[q], posted[q]));
      check(int'(mem[q].snd_nxt) == posted[q], $sformatf("qp %0d QPC SND-NXT %0d", q, mem[q].snd_nxt));
    end
    check(retx_q.size() == 0, "retransmissions missing");
    check(n_retx == 3, $sformatf("retransmitted %0d", n_retx));
    check(n_stall > 0, "window never blocked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
