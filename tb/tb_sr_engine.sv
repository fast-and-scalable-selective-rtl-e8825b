// tb_sr_engine: self-checking testbench for the SR module (receiver and sender halves with
// the two-level shared pool).
//
// One stream carries data packets for QP 0 (receiver side) and SACKs for QP 1 (sender
// side), plus a timeout event; every reply, retransmission request, UNACK write and the
// occupancy of both pools was worked out by hand. QP 0 loses PSN 1 (fast path), then 3 and
// 4 (lost-cnt 3, slow path with a bitmap), then gets 1, 3 and 4 back: the first is
// answered from a bitmap scan, the second takes the QP back to the fast path and releases
// the bitmap, the third ends recovery and releases the SR state unit.
//
// The expected results follow the rules the document gives for this block (or, where it
// gives only the function, this design's documented behaviour); stimulus, sizes and the
// reference model are this testbench's own.
module tb_sr_engine;
  import fasr_pkg::*;
  localparam int NUM_QP = 4, QW = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic [TS_W-1:0] now = 0;
  always @(posedge clk) now <= now + 1;
  logic in_valid, in_ready, rto_valid, rto_ready, ack_valid, ack_ready, retx_valid, retx_ready;
  logic upd_valid, upd_ready, dlv_valid, dlv_ready;
  logic [QW-1:0] in_qp, rto_qp, dlv_qp;
  pkt_t in_pkt, ack_pkt;
  retx_req_t retx;
  qpc_upd_t upd;
  psn_t dlv_psn;
  rx_ev_t rx_ev;
  tx_ev_t tx_ev;
  logic [$clog2(21)-1:0] units_used;
  logic [$clog2(71)-1:0] blocks_used;
  sr_engine #(.NUM_QP(NUM_QP)) dut (.*);

  pkt_t acks [$];
  retx_req_t retxs [$];
  qpc_upd_t upds [$];
  int n_dlv = 0;
  always @(posedge clk) begin
    if (ack_valid && ack_ready) acks.push_back(ack_pkt);
    if (retx_valid && retx_ready) retxs.push_back(retx);
    if (upd_valid && upd_ready) upds.push_back(upd);
    if (dlv_valid && dlv_ready) n_dlv++;
  end

  task automatic send(int q, opcode_e op, int psn, int ack, int lost);
    @(negedge clk);
    in_valid = 1; in_qp = QW'(q); in_pkt = '0; in_pkt.opcode = op; in_pkt.qpn = QPN_W'(q);
    in_pkt.psn = PSN_W'(psn); in_pkt.ack_psn = PSN_W'(ack); in_pkt.lost_cnt = LOSTCNT_W'(lost);
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 0;
    repeat (40) @(posedge clk);
  endtask

  task automatic expect_ack(string w, opcode_e op, int psn, int lost);
    check(acks.size() == 1, $sformatf("%s: %0d replies", w, acks.size()));
    if (acks.size() > 0) begin
      check(acks[0].opcode == op && int'(acks[0].psn) == psn,
            $sformatf("%s: reply %0d/%0d exp %0d/%0d", w, acks[0].opcode, acks[0].psn, op, psn));
      if (op == OP_SACK) check(int'(acks[0].lost_cnt) == lost, $sformatf("%s: lost %0d", w, acks[0].lost_cnt));
    end
    acks.delete();
  endtask

  initial begin
    in_valid = 0; rto_valid = 0; in_qp = '0; rto_qp = '0; in_pkt = '0;
    ack_ready = 1; retx_ready = 1; upd_ready = 1; dlv_ready = 1;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    acks.delete(); retxs.delete(); upds.delete(); n_dlv = 0;
    send(0, OP_DATA, 0, 0, 0);  expect_ack("in order", OP_ACK, 1, 0);
    send(0, OP_DATA, 2, 0, 0);  expect_ack("first loss", OP_SACK, 2, 1);
    check(units_used == 1 && blocks_used == 0, "fast path: unit, no bitmap");
    send(0, OP_DATA, 5, 0, 0);  expect_ack("second loss", OP_SACK, 5, 3);
    check(units_used == 1 && blocks_used == 1, $sformatf("slow path: %0d units %0d blocks", units_used, blocks_used));
    send(1, OP_SACK, 6, 3, 2);
    check(retxs.size() == 1 && retxs[0].qpn == 1 && retxs[0].psn == 3 && retxs[0].count == 3 && !retxs[0].gbn,
          "sender: first SACK resends 3..5");
    check(upds.size() == 1 && upds[0].qp == 1 && upds[0].val.unack == 3 && upds[0].mask.unack && upds[0].mask.ts,
          "sender: UNACK 3 written with timer restart");
    retxs.delete(); upds.delete();
    @(negedge clk); rto_valid = 1; rto_qp = 2'd1;
    do @(posedge clk); while (!rto_ready);
    #1 rto_valid = 0;
    repeat (4) @(posedge clk);
    check(retxs.size() == 1 && retxs[0].psn == 3 && retxs[0].count == 3, "timeout, lost-cnt 2: resend 3..5");
    retxs.delete();
    check(acks.size() == 0, "no reply to sender-side events");
    send(0, OP_DATA, 1, 0, 0);  expect_ack("retx 1, bitmap scan", OP_ACK, 3, 0);
    check(blocks_used == 1, "still slow");
    send(0, OP_DATA, 4, 0, 0);  expect_ack("retx behind a lost one", OP_FNACK, 4, 0);
    send(0, OP_DATA, 3, 0, 0);  expect_ack("retx 3, back to fast path", OP_ACK, 4, 0);
    check(blocks_used == 0 && units_used == 1, "bitmap released, unit kept");
    send(0, OP_DATA, 4, 0, 0);  expect_ack("retx 4, recovery done", OP_ACK, 6, 0);
    check(units_used == 0, "unit released");
    check(n_dlv == 6, $sformatf("delivered %0d packets, exp 6", n_dlv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
