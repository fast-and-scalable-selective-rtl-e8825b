// tb_sr_tx: self-checking testbench for the sender SR logic.
//
// Scripted ACK/SACK/FNACK/timeout sequences on two QPs whose expected outcomes were worked
// out by hand from the sender rules: the first SACK resends UNACK..SACK-1; a later SACK gap
// is resent only when lost-cnt grew or overflow is reported, and is otherwise taken as lost
// SACKs; a timeout resends the whole UNACK..sack-high range (lost-cnt > 1), UNACK only
// (lost-cnt 1) or goes back N (lost-cnt 0); FNACK acts as an early timeout once per new
// ACK. Every event's retransmission request and UNACK update are compared field by field,
// and the outputs must be valid one cycle after the event is taken.
//
// The expected results follow the rules the document gives for this block (or, where it
// gives only the function, this design's documented behaviour); stimulus, sizes and the
// reference model are this testbench's own.
module tb_sr_tx;
  import fasr_pkg::*;
  localparam int NUM_QP = 4, QW = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic in_valid, in_ready, rto_valid, rto_ready, retx_valid, retx_ready, upd_valid, upd_ready;
  logic [QW-1:0] in_qp, rto_qp, upd_qp;
  pkt_t in_pkt;
  retx_req_t retx;
  psn_t upd_unack;
  tx_ev_t ev;
  sr_tx #(.NUM_QP(NUM_QP)) dut (.*);

  // outputs seen during the last event
  bit got_retx, got_upd;
  retx_req_t seen_retx;
  psn_t seen_unack;
  int lat_retx;
  tx_ev_t evs;
  int t_evt;
  always @(posedge clk) begin
    if (retx_valid && retx_ready) begin
      got_retx = 1; seen_retx = retx; lat_retx = (int'($time) - t_evt) / 10;
    end
    if (upd_valid && upd_ready) begin got_upd = 1; seen_unack = upd_unack; end
    evs = evs | ev;
  end

  task automatic pkt(int q, opcode_e op, int psn, int ack, int lost);
    @(negedge clk);
    got_retx = 0; got_upd = 0; evs = '0;
    in_valid = 1; in_qp = QW'(q);
    in_pkt = '0; in_pkt.opcode = op; in_pkt.qpn = QPN_W'(q); in_pkt.psn = PSN_W'(psn);
    in_pkt.ack_psn = PSN_W'(ack); in_pkt.lost_cnt = LOSTCNT_W'(lost);
    do @(posedge clk); while (!in_ready);
    t_evt = int'($time);
    #1 in_valid = 0;
    repeat (3) @(posedge clk);
  endtask

  task automatic timeout(int q);
    @(negedge clk);
    got_retx = 0; got_upd = 0; evs = '0;
    rto_valid = 1; rto_qp = QW'(q);
    do @(posedge clk); while (!rto_ready);
    t_evt = int'($time);
    #1 rto_valid = 0;
    repeat (3) @(posedge clk);
  endtask

  task automatic expect_retx(string what, int psn, int count, bit gbn);
    check(got_retx, {what, ": no retransmission request"});
    if (got_retx) begin
      check(int'(seen_retx.psn) == psn, $sformatf("%s: retx psn %0d exp %0d", what, seen_retx.psn, psn));
      check(int'(seen_retx.count) == count, $sformatf("%s: retx count %0d exp %0d", what, seen_retx.count, count));
      check(seen_retx.gbn == gbn, $sformatf("%s: gbn %0d exp %0d", what, seen_retx.gbn, gbn));
      check(lat_retx == 1, $sformatf("%s: latency %0d exp 1", what, lat_retx));
    end
  endtask
  task automatic expect_no_retx(string what);
    check(!got_retx, {what, ": unexpected retransmission"});
  endtask
  task automatic expect_upd(string what, int unack);
    check(got_upd && int'(seen_unack) == unack, $sformatf("%s: UNACK update %0d/%0d exp %0d", what, got_upd, seen_unack, unack));
  endtask

  initial begin
    in_valid = 0; rto_valid = 0; in_qp = '0; rto_qp = '0; in_pkt = '0;
    retx_ready = 1; upd_ready = 1; evs = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    pkt(1, OP_ACK, 5, 5, 0);        expect_upd("ack5", 5); expect_no_retx("ack5");
    pkt(1, OP_SACK, 7, 5, 2);       expect_retx("first sack", 5, 2, 0); check(!got_upd, "first sack: no update");
    check(evs.retx_sack, "first sack event");
    pkt(1, OP_SACK, 8, 5, 2);       expect_no_retx("contiguous sack");
    pkt(1, OP_SACK, 11, 5, 4);      expect_retx("gap+lost up", 9, 2, 0);
    pkt(1, OP_SACK, 14, 5, 4);      expect_no_retx("gap, lost same"); check(evs.sack_lost, "sack-lost event");
    timeout(1);                     expect_retx("rto slow", 5, 9, 0); check(evs.rto_slow, "rto_slow event");
    pkt(1, OP_FNACK, 9, 5, 4);      expect_retx("fnack armed", 5, 9, 0); check(evs.fnack_taken, "fnack taken");
    pkt(1, OP_FNACK, 9, 5, 4);      expect_no_retx("fnack repeat"); check(evs.fnack_ign, "fnack ignored");
    pkt(1, OP_ACK, 10, 10, 0);      expect_upd("ack10", 10); expect_no_retx("ack10");
    pkt(1, OP_FNACK, 12, 10, 3);    expect_retx("fnack rearmed", 10, 4, 0);
    pkt(1, OP_ACK, 15, 15, 0);      expect_upd("ack15", 15);
    timeout(1);                     expect_retx("rto gbn", 15, 0, 1); check(evs.rto_gbn, "rto_gbn event");
    pkt(2, OP_SACK, 1, 0, 1);       expect_retx("q2 first sack", 0, 1, 0);
    timeout(2);                     expect_retx("q2 rto fast", 0, 1, 0); check(evs.rto_fast, "rto_fast event");
    pkt(2, OP_SACK_OVF, 20, 0, 7);  expect_retx("q2 overflow sack", 2, 18, 0);
    pkt(2, OP_SACK, 25, 0, 7);      expect_retx("q2 after overflow", 21, 4, 0);
    pkt(2, OP_ACK, 3, 3, 0);        expect_upd("q2 ack3", 3);
    pkt(2, OP_ACK, 2, 2, 0);        check(!got_upd, "stale ACK must not move UNACK");
    pkt(3, OP_ACK, 0, 0, 0);        check(!got_upd, "q3 duplicate ACK");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
