// tb_sr_rx: self-checking testbench for the receiver SR logic, with the Level-1 state pool
// and the bitmap controller around it.
//
// A reference model keeps, for every QP, the set of PSNs received and derives from it
// RCV-NXT, sack-high and the number of holes; from these it predicts the reply to every
// packet (ACK, SACK with lost-cnt, SACK_OVF, FNACK), whether the packet is handed to DMA,
// and, for packets that need no bitmap, that the reply comes one cycle after the packet is
// taken. Traffic: several QPs interleaved; each sends PSNs 0..L-1 with random and scripted
// losses (single losses, bursts long enough to overflow lost-cnt, losses behind a long
// received run to trigger the compression counter), then retransmits its holes in order,
// sometimes skipping the first hole so that an FNACK is produced. At the end every SR state
// unit and bitmap block must be free again.
//
// The expected results follow the rules the document gives for this block (or, where it
// gives only the function, this design's documented behaviour); stimulus, sizes and the
// reference model are this testbench's own.
module tb_sr_rx;
  import fasr_pkg::*;
  localparam int NUM_QP = 8, N_UNITS = 20, N_BLK = 70, BLK_BITS = 10, L = 80, QW = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  logic in_valid, in_ready, out_valid, out_ready, dlv_valid, dlv_ready;
  logic [QW-1:0] in_qp, dlv_qp;
  psn_t in_psn, dlv_psn;
  pkt_t out_pkt;
  rx_ev_t ev;
  logic sp_alloc_valid, sp_alloc_ok, sp_free_valid, sp_wr_en;
  sr_state_t sp_alloc_data, sp_rd_data, sp_wr_data;
  logic [BPTR_W-1:0] sp_alloc_idx, sp_free_idx, sp_rd_idx, sp_wr_idx;
  logic bm_req_valid, bm_req_ready, bm_rsp_valid, bm_rsp_ok;
  logic [1:0] bm_req_cmd;
  logic [BPTR_W-1:0] bm_req_head, bm_req_tail, bm_req_nblk, bm_rsp_head, bm_rsp_tail, bm_rsp_nblk;
  psn_t bm_req_base, bm_rsp_base, bm_rsp_psn;
  logic [15:0] bm_req_lo, bm_req_hi;
  logic [$clog2(N_UNITS+1)-1:0] units_used;
  logic [$clog2(N_BLK+1)-1:0] blocks_used;

  sr_rx #(.NUM_QP(NUM_QP), .N_BLK(N_BLK), .BLK_BITS(BLK_BITS)) dut (.*, .ev(ev));
  sr_state_pool #(.N_UNITS(N_UNITS)) u_sp (
    .clk, .rst_n, .alloc_valid(sp_alloc_valid), .alloc_data(sp_alloc_data),
    .alloc_ok(sp_alloc_ok), .alloc_idx(sp_alloc_idx), .free_valid(sp_free_valid),
    .free_idx(sp_free_idx), .rd_idx(sp_rd_idx), .rd_data(sp_rd_data), .wr_en(sp_wr_en),
    .wr_idx(sp_wr_idx), .wr_data(sp_wr_data), .n_used(units_used));
  bitmap_ctrl #(.N_BLK(N_BLK), .BLK_BITS(BLK_BITS)) u_bm (
    .clk, .rst_n, .req_valid(bm_req_valid), .req_ready(bm_req_ready), .req_cmd(bm_req_cmd),
    .req_head(bm_req_head), .req_tail(bm_req_tail), .req_nblk(bm_req_nblk),
    .req_base(bm_req_base), .req_lo(bm_req_lo), .req_hi(bm_req_hi),
    .rsp_valid(bm_rsp_valid), .rsp_ok(bm_rsp_ok), .rsp_head(bm_rsp_head),
    .rsp_tail(bm_rsp_tail), .rsp_nblk(bm_rsp_nblk), .rsp_base(bm_rsp_base),
    .rsp_psn(bm_rsp_psn), .blocks_used(blocks_used));

  // ---------------------------------------------------------------- reference model
  bit rcvd [NUM_QP][L+1];
  int m_rnxt [NUM_QP];
  int m_sh   [NUM_QP];
  bit m_rec  [NUM_QP];
  bit m_ovf  [NUM_QP];

  function automatic int holes(int q, int upto);   // missing PSNs in [rnxt, upto)
    int n = 0;
    for (int i = m_rnxt[q]; i < upto; i++) if (!rcvd[q][i]) n++;
    return n;
  endfunction

  // data handed to DMA since the current packet was sent
  bit got_dlv;
  psn_t got_psn;
  logic [QW-1:0] got_qp;
  always @(posedge clk) if (dlv_valid && dlv_ready) begin
    got_dlv = 1; got_psn = dlv_psn; got_qp = dlv_qp;
  end

  int n_ev [8];
  always @(posedge clk) begin
    if (ev.fast_retx) n_ev[0]++;
    if (ev.slow_retx) n_ev[1]++;
    if (ev.to_slow)   n_ev[2]++;
    if (ev.to_fast)   n_ev[3]++;
    if (ev.fnack)     n_ev[4]++;
    if (ev.gbn_drop)  n_ev[5]++;
    if (ev.lost_ovf)  n_ev[6]++;
    if (ev.comp_used) n_ev[7]++;
  end

  task automatic send(int q, int p);
    opcode_e exp_op;
    int exp_psn, exp_ack, exp_lost, t0, lat;
    bit exp_dlv, bitmap_free;
    // --- prediction
    exp_dlv = 0; exp_ack = m_rnxt[q]; exp_lost = 0;
    bitmap_free = 1;
    if (p == m_rnxt[q]) begin
      bitmap_free = !m_rec[q] || (holes(q, m_sh[q]) == 1 && !m_ovf[q]);
      rcvd[q][p] = 1;
      while (rcvd[q][m_rnxt[q]]) m_rnxt[q]++;
      if (m_rec[q] && m_rnxt[q] > m_sh[q]) begin m_rec[q] = 0; m_ovf[q] = 0; end
      exp_op = OP_ACK; exp_psn = m_rnxt[q]; exp_dlv = 1;
    end else if (p > m_rnxt[q] && (!m_rec[q] || p > m_sh[q])) begin
      int h;
      if (!m_rec[q]) bitmap_free = (p == m_rnxt[q] + 1);
      else bitmap_free = (holes(q, m_sh[q]) == 1) && !m_ovf[q] && (p == m_sh[q] + 1);
      rcvd[q][p] = 1;
      h = holes(q, p);
      if (h > 7) m_ovf[q] = 1;
      m_rec[q] = 1; m_sh[q] = p;
      exp_op = m_ovf[q] ? OP_SACK_OVF : OP_SACK; exp_psn = p; exp_lost = m_ovf[q] ? 7 : h;
      exp_dlv = 1;
    end else if (p > m_rnxt[q] && p < m_sh[q]) begin
      exp_op = OP_FNACK; exp_psn = p;
      exp_lost = -1;
    end else begin
      exp_op = OP_ACK; exp_psn = m_rnxt[q];
    end
    // --- drive
    @(negedge clk);
    got_dlv = 0;
    in_valid = 1; in_qp = QW'(q); in_psn = PSN_W'(p);
    do @(posedge clk); while (!in_ready);
    t0 = int'($time);
    do @(posedge clk); while (!out_valid);
    lat = (int'($time) - t0) / 10;
    in_valid = 0;
    check(out_pkt.opcode == exp_op, $sformatf("q%0d psn %0d: opcode %0d exp %0d", q, p, out_pkt.opcode, exp_op));
    check(int'(out_pkt.psn) == exp_psn, $sformatf("q%0d psn %0d: reply psn %0d exp %0d", q, p, out_pkt.psn, exp_psn));
    check(int'(out_pkt.ack_psn) == exp_ack || exp_op == OP_ACK, $sformatf("q%0d psn %0d: ack_psn %0d exp %0d", q, p, out_pkt.ack_psn, exp_ack));
    if (exp_op == OP_SACK) check(int'(out_pkt.lost_cnt) == exp_lost, $sformatf("q%0d psn %0d: lost %0d exp %0d", q, p, out_pkt.lost_cnt, exp_lost));
    check(out_pkt.qpn == QPN_W'(q), "reply qpn");
    @(negedge clk);
    check(got_dlv == exp_dlv, $sformatf("q%0d psn %0d: deliver %0d exp %0d", q, p, got_dlv, exp_dlv));
    if (exp_dlv) check(got_psn == PSN_W'(p) && got_qp == QW'(q), "deliver psn/qp");
    // packets that need no bitmap are answered the cycle after they are taken
    if (bitmap_free && exp_op != OP_FNACK) check(lat == 1, $sformatf("q%0d psn %0d: latency %0d, expected 1", q, p, lat));
  endtask

  // ---------------------------------------------------------------- traffic
  int phase_next [NUM_QP];
  bit lose_plan [NUM_QP][L];

  initial begin
    in_valid = 0; in_qp = '0; in_psn = '0; out_ready = 1; dlv_ready = 1;
    for (int q = 0; q < NUM_QP; q++) begin
      m_rnxt[q] = 0; m_sh[q] = 0; m_rec[q] = 0; m_ovf[q] = 0; phase_next[q] = 0;
      for (int i = 0; i <= L; i++) rcvd[q][i] = 0;
      for (int i = 0; i < L; i++) lose_plan[q][i] = ($urandom_range(0, 99) < 6);
    end
    // scripted patterns
    lose_plan[0][5] = 1;                                  // q0: single losses only
    for (int i = 10; i < 20; i++) lose_plan[1][i] = 1;     // q1: burst of 10, lost-cnt overflow
    lose_plan[2][3] = 1; for (int i = 4; i < 30; i++) lose_plan[2][i] = 0;
    lose_plan[2][30] = 1; lose_plan[2][31] = 1;            // q2: compression-cnt path
    lose_plan[3][2] = 1; lose_plan[3][3] = 0; lose_plan[3][4] = 0; lose_plan[3][5] = 1; // q3: short run
    for (int i = 0; i < 8; i++) n_ev[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // phase 1: first transmission, QPs interleaved
    for (int step = 0; step < NUM_QP * L; step++) begin
      automatic int q = step % NUM_QP;
      automatic int p = phase_next[q]++;
      if (!lose_plan[q][p]) send(q, p);
    end
    // phase 2: retransmission of holes, sometimes out of order (FNACK case)
    for (int round = 0; round < 40; round++) begin
      for (int q = 0; q < NUM_QP; q++) begin
        automatic int hs [$];
        for (int i = m_rnxt[q]; i < L; i++) if (!rcvd[q][i]) hs.push_back(i);
        if (hs.size() > 1 && $urandom_range(0, 3) == 0) send(q, hs[1]);   // FNACK
        if (hs.size() > 0) begin
          if (q == 4 && round == 0) send(q, m_rnxt[q] > 0 ? m_rnxt[q] - 1 : 0); // duplicate
          send(q, hs[0]);
        end
      end
    end
    // phase 3: one new in-order packet per QP checks the RCV-NXT left by the recovery
    for (int q = 0; q < NUM_QP; q++) if (m_rnxt[q] == L) send(q, L);
    repeat (10) @(posedge clk);
    for (int q = 0; q < NUM_QP; q++)
      check(m_rnxt[q] == L + 1, $sformatf("q%0d incomplete: rcv_nxt %0d", q, m_rnxt[q]));
    check(units_used == 0, $sformatf("SR state units left in use: %0d", units_used));
    check(blocks_used == 0, $sformatf("bitmap blocks left in use: %0d", blocks_used));
    check(n_ev[0] > 0, "fast-path retransmission never happened");
    check(n_ev[1] > 0, "slow-path retransmission never happened");
    check(n_ev[2] > 0, "switch to slow path never happened");
    check(n_ev[3] > 0, "switch back to fast path never happened");
    check(n_ev[4] > 0, "FNACK never happened");
    check(n_ev[6] > 0, "lost-cnt overflow never happened");
    check(n_ev[7] > 0, "compression-cnt never used");
    $display("events: fast %0d slow %0d to_slow %0d to_fast %0d fnack %0d gbn %0d ovf %0d comp %0d",
             n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4], n_ev[5], n_ev[6], n_ev[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
