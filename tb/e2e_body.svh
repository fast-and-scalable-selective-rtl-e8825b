// e2e_body.svh: body shared by the end-to-end testbenches tb_fasr_transport (reduced sizes)
// and tb_fasr_transport_full (the design's default sizes). The including module defines the
// sizes and the traffic knobs as localparams and instantiates two transports, A and B.
//
// A sends data on N_ACTIVE QPs to B through a behavioural link with a fixed one-way delay;
// B returns ACK/SACK/FNACK replies to A over the same kind of link. The link drops new data
// packets at random, sometimes drops a run of packets of one QP (longer than lost-cnt can
// count), drops retransmitted data and drops replies. A's DMA engine is a behavioural model
// that returns each read request after a short random delay, in order. Illegal packets and
// zero-length work requests are mixed in and must be counted as dropped.
//
// Checks: every posted packet is delivered by B exactly once and no packet that was never
// posted is delivered; both pools of B are empty at the end; the illegal-drop counter
// matches; every FaSR mechanism (fast and slow path, both switches, FNACK on both sides,
// lost-cnt overflow, bitmap acceleration, pool exhaustion and GBN, each timeout case, SACK
// loss, window stall) happened at least once. Link and traffic models are this testbench's
// own; the document gives no traffic pattern at this level.

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int QW = (NUM_QP > 1) ? $clog2(NUM_QP) : 1;

  // A (sender) and B (receiver) ports
  logic a_rx_valid, a_rx_ready, a_wqe_valid, a_wqe_ready, a_tx_valid, a_tx_ready;
  logic a_dreq_valid, a_dreq_ready, a_drsp_valid, a_drsp_ready, a_dlv_valid, a_dlv_ready;
  pkt_t a_rx_pkt, a_tx_pkt, a_dreq, a_drsp;
  wqe_t a_wqe;
  logic [QW-1:0] a_dlv_qp;
  psn_t a_dlv_psn;
  rx_ev_t a_rx_ev;
  tx_ev_t a_tx_ev;
  logic a_win_stall;
  logic [15:0] a_drops;
  logic [$clog2(N_UNITS+1)-1:0] a_units;
  logic [$clog2(N_BLK+1)-1:0]   a_blocks;

  logic b_rx_valid, b_rx_ready, b_tx_valid, b_tx_ready, b_dreq_valid, b_dlv_valid, b_dlv_ready;
  logic b_drsp_ready, b_wqe_ready;
  pkt_t b_rx_pkt, b_tx_pkt, b_dreq;
  logic [QW-1:0] b_dlv_qp;
  psn_t b_dlv_psn;
  rx_ev_t b_rx_ev;
  tx_ev_t b_tx_ev;
  logic b_win_stall;
  logic [15:0] b_drops;
  logic [$clog2(N_UNITS+1)-1:0] b_units;
  logic [$clog2(N_BLK+1)-1:0]   b_blocks;

  `define A_PORTS \
    .clk, .rst_n, .rx_valid(a_rx_valid), .rx_ready(a_rx_ready), .rx_pkt(a_rx_pkt), \
    .wqe_valid(a_wqe_valid), .wqe_ready(a_wqe_ready), .wqe(a_wqe), \
    .tx_valid(a_tx_valid), .tx_ready(a_tx_ready), .tx_pkt(a_tx_pkt), \
    .dma_req_valid(a_dreq_valid), .dma_req_ready(a_dreq_ready), .dma_req(a_dreq), \
    .dma_rsp_valid(a_drsp_valid), .dma_rsp_ready(a_drsp_ready), .dma_rsp(a_drsp), \
    .dlv_valid(a_dlv_valid), .dlv_ready(a_dlv_ready), .dlv_qp(a_dlv_qp), .dlv_psn(a_dlv_psn), \
    .rx_ev(a_rx_ev), .tx_ev(a_tx_ev), .win_stall(a_win_stall), .illegal_drops(a_drops), \
    .units_used(a_units), .blocks_used(a_blocks)
  `define B_PORTS \
    .clk, .rst_n, .rx_valid(b_rx_valid), .rx_ready(b_rx_ready), .rx_pkt(b_rx_pkt), \
    .wqe_valid(1'b0), .wqe_ready(b_wqe_ready), .wqe('0), \
    .tx_valid(b_tx_valid), .tx_ready(b_tx_ready), .tx_pkt(b_tx_pkt), \
    .dma_req_valid(b_dreq_valid), .dma_req_ready(1'b1), .dma_req(b_dreq), \
    .dma_rsp_valid(1'b0), .dma_rsp_ready(b_drsp_ready), .dma_rsp('0), \
    .dlv_valid(b_dlv_valid), .dlv_ready(b_dlv_ready), .dlv_qp(b_dlv_qp), .dlv_psn(b_dlv_psn), \
    .rx_ev(b_rx_ev), .tx_ev(b_tx_ev), .win_stall(b_win_stall), .illegal_drops(b_drops), \
    .units_used(b_units), .blocks_used(b_blocks)

  // ---------------------------------------------------------------- traffic
  typedef struct { pkt_t p; longint due; } fl_t;
  fl_t chab[$], chba[$], dmaq[$];
  wqe_t wq[$];
  int qps[N_ACTIVE];
  int tot[int];              // posted packets per QP
  int ndlv[int];             // delivered packets per QP
  bit got[longint];          // {qp, psn} delivered
  int burst[int];
  int n_illegal = 0, n_posted = 0, n_delivered = 0;
  int n_lost_new = 0, n_lost_retx = 0, n_lost_rep = 0, n_bursts = 0;

  // event counters
  int c_fast_retx, c_slow_retx, c_to_slow, c_to_fast, c_fnack, c_gbn_drop, c_ovf, c_comp;
  int c_retx_sack, c_sack_lost, c_rto_fast, c_rto_slow, c_rto_gbn, c_fn_taken, c_fn_ign;
  int c_stall, max_units, max_blocks;
  initial begin
    {c_fast_retx, c_slow_retx, c_to_slow, c_to_fast, c_fnack, c_gbn_drop, c_ovf, c_comp} = '0;
    {c_retx_sack, c_sack_lost, c_rto_fast, c_rto_slow, c_rto_gbn, c_fn_taken, c_fn_ign} = '0;
    c_stall = 0; max_units = 0; max_blocks = 0;
  end

  function automatic longint key(int q, int psn);
    return (longint'(q) << 32) | longint'(psn);
  endfunction

  // Link and DMA models: accept on the clock edge, present at the falling edge.
  always @(posedge clk) if (rst_n) begin
    if (a_tx_valid && a_tx_ready) begin
      automatic pkt_t p = a_tx_pkt;
      automatic int q = int'(p.qpn);
      automatic bit drop = 0;
      if (p.opcode == OP_DATA) begin
        if (p.retx) drop = ($urandom % 1000) < P_RETX_PERMIL;
        else if (burst.exists(q) && burst[q] > 0) begin drop = 1; burst[q]--; end
        else if (($urandom % 100000) < P_BURST_PER100K) begin
          drop = 1; burst[q] = BURST_LEN - 1; n_bursts++;
        end else drop = ($urandom % 100000) < P_LOSS_PER100K;
        if (drop) begin if (p.retx) n_lost_retx++; else n_lost_new++; end
      end
      if (!drop) chab.push_back('{p: p, due: cyc + longint'(LINK_DELAY)});
    end
    if (b_tx_valid && b_tx_ready) begin
      if (($urandom % 1000) < P_REPLY_PERMIL) n_lost_rep++;
      else chba.push_back('{p: b_tx_pkt, due: cyc + longint'(LINK_DELAY)});
    end
    if (a_dreq_valid && a_dreq_ready) begin
      automatic int j = int'($urandom % 7);
      automatic longint d = cyc + 2 + longint'(j);
      if (dmaq.size() > 0 && dmaq[$].due > d) d = dmaq[$].due;
      dmaq.push_back('{p: a_dreq, due: d});
    end
    if (a_drsp_valid && a_drsp_ready) void'(dmaq.pop_front());
    if (b_rx_valid && b_rx_ready) void'(chab.pop_front());
    if (a_rx_valid && a_rx_ready) void'(chba.pop_front());
    if (a_wqe_valid && a_wqe_ready) void'(wq.pop_front());
    if (b_dlv_valid && b_dlv_ready) begin
      automatic int q = int'(b_dlv_qp);
      automatic int s = int'(b_dlv_psn);
      check(tot.exists(q) && s < tot[q], $sformatf("QP %0d PSN %0d delivered but never posted", q, s));
      check(!got.exists(key(q, s)), $sformatf("QP %0d PSN %0d delivered twice", q, s));
      got[key(q, s)] = 1;
      if (ndlv.exists(q)) ndlv[q]++; else ndlv[q] = 1;
      n_delivered++;
    end
    check(!a_dlv_valid, "A delivered data but was sent none");
    check(!b_dreq_valid, "B issued a data read but was given no work");
    // events
    c_fast_retx += int'(b_rx_ev.fast_retx); c_slow_retx += int'(b_rx_ev.slow_retx);
    c_to_slow   += int'(b_rx_ev.to_slow);   c_to_fast   += int'(b_rx_ev.to_fast);
    c_fnack     += int'(b_rx_ev.fnack);     c_gbn_drop  += int'(b_rx_ev.gbn_drop);
    c_ovf       += int'(b_rx_ev.lost_ovf);  c_comp      += int'(b_rx_ev.comp_used);
    c_retx_sack += int'(a_tx_ev.retx_sack); c_sack_lost += int'(a_tx_ev.sack_lost);
    c_rto_fast  += int'(a_tx_ev.rto_fast);  c_rto_slow  += int'(a_tx_ev.rto_slow);
    c_rto_gbn   += int'(a_tx_ev.rto_gbn);   c_fn_taken  += int'(a_tx_ev.fnack_taken);
    c_fn_ign    += int'(a_tx_ev.fnack_ign); c_stall     += int'(a_win_stall);
    if (int'(b_units) > max_units) max_units = int'(b_units);
    if (int'(b_blocks) > max_blocks) max_blocks = int'(b_blocks);
  end

  always @(negedge clk) begin
    // an illegal packet now and then: unknown QP or unused opcode
    if (rst_n && ($urandom % 4000) == 0) begin
      automatic pkt_t bad = '0;
      if ($urandom % 2 == 0) begin bad.opcode = OP_ACK; bad.qpn = QPN_W'(NUM_QP + ($urandom % 5)); end
      else begin bad.opcode = opcode_e'(5 + ($urandom % 3)); bad.qpn = QPN_W'(qps[0]); end
      chba.push_front('{p: bad, due: cyc});
      n_illegal++;
    end
    b_rx_valid = chab.size() > 0 && chab[0].due <= cyc;
    b_rx_pkt   = chab.size() > 0 ? chab[0].p : '0;
    a_rx_valid = chba.size() > 0 && chba[0].due <= cyc;
    a_rx_pkt   = chba.size() > 0 ? chba[0].p : '0;
    a_drsp_valid = dmaq.size() > 0 && dmaq[0].due <= cyc;
    a_drsp       = dmaq.size() > 0 ? dmaq[0].p : '0;
    a_wqe_valid = wq.size() > 0 && ($urandom % 4 == 0);
    a_wqe       = wq.size() > 0 ? wq[0] : '0;
    a_tx_ready  = ($urandom % 16) != 0;
    b_tx_ready  = ($urandom % 16) != 0;
    a_dreq_ready = ($urandom % 8) != 0;
    b_dlv_ready = ($urandom % 8) != 0;
    a_dlv_ready = 1'b1;
  end

  // ---------------------------------------------------------------- main
  initial begin
    automatic bit done = 0;
    automatic longint t_done;
    for (int i = 0; i < N_ACTIVE; i++) begin
      automatic int q;
      automatic bit dup;
      do begin
        q = (i == 0) ? NUM_QP - 1 : int'($urandom % NUM_QP);
        dup = 0;
        for (int j = 0; j < i; j++) if (qps[j] == q) dup = 1;
      end while (dup);
      qps[i] = q; tot[q] = 0;
    end
    // work requests in random QP order; a few of zero length
    for (int k = 0; k < WQES_PER_QP * N_ACTIVE; k++) begin
      automatic int q = qps[$urandom % N_ACTIVE];
      automatic int n = 1 + int'($urandom % MAX_WQE_PKTS);
      automatic wqe_t w;
      if ($urandom % 50 == 0) begin n = 0; n_illegal++; end
      w.qpn = QPN_W'(q); w.npkts = 16'(n);
      wq.push_back(w);
      tot[q] += n; n_posted += n;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!done) begin
      @(posedge clk);
      if (n_delivered == n_posted && wq.size() == 0) done = 1;
    end
    t_done = cyc;
    // let the last ACKs drain, then the pools of B must be empty
    repeat (LINK_DELAY * 4 + 200) @(posedge clk);
    check(b_units == 0 && b_blocks == 0, $sformatf("B pools not empty: %0d units %0d blocks", b_units, b_blocks));
    foreach (qps[i]) begin
      automatic int q = qps[i];
      automatic int d = ndlv.exists(q) ? ndlv[q] : 0;
      check(d == tot[q], $sformatf("QP %0d delivered %0d of %0d", q, d, tot[q]));
    end
    check(int'(a_drops) == n_illegal, $sformatf("A dropped %0d illegal inputs, exp %0d", a_drops, n_illegal));
    check(b_drops == 0, "B dropped legal packets");
    $display("posted %0d packets on %0d QPs, all delivered at cycle %0d", n_posted, N_ACTIVE, t_done);
    $display("link drops: new %0d (bursts %0d) retx %0d replies %0d; illegal inputs %0d",
             n_lost_new, n_bursts, n_lost_retx, n_lost_rep, n_illegal);
    $display("B peak pool use: %0d units, %0d blocks", max_units, max_blocks);
    $display("receiver: fast_retx %0d slow_retx %0d to_slow %0d to_fast %0d fnack %0d gbn_drop %0d ovf %0d comp %0d",
             c_fast_retx, c_slow_retx, c_to_slow, c_to_fast, c_fnack, c_gbn_drop, c_ovf, c_comp);
    $display("sender: retx_sack %0d sack_lost %0d rto_fast %0d rto_slow %0d rto_gbn %0d fnack_taken %0d fnack_ign %0d win_stall %0d",
             c_retx_sack, c_sack_lost, c_rto_fast, c_rto_slow, c_rto_gbn, c_fn_taken, c_fn_ign, c_stall);
    check(c_fast_retx > 0, "mechanism never seen: fast-path retransmission");
    check(c_slow_retx > 0, "mechanism never seen: slow-path retransmission (bitmap scan)");
    check(c_to_slow > 0,   "mechanism never seen: switch fast -> slow");
    check(c_to_fast > 0,   "mechanism never seen: switch slow -> fast");
    check(c_fnack > 0,     "mechanism never seen: FNACK sent");
    check(c_gbn_drop > 0,  "mechanism never seen: pool exhaustion / GBN fallback");
    check(c_ovf > 0,       "mechanism never seen: lost-cnt overflow");
    check(c_comp > 0,      "mechanism never seen: bitmap acceleration (compression-cnt)");
    check(c_retx_sack > 0, "mechanism never seen: SACK-driven retransmission");
    check(c_sack_lost > 0, "mechanism never seen: lost SACK detected");
    check(c_rto_fast > 0,  "mechanism never seen: timeout with lost-cnt 1");
    check(c_rto_slow > 0,  "mechanism never seen: timeout with lost-cnt > 1");
    check(c_rto_gbn > 0,   "mechanism never seen: timeout with lost-cnt 0 (go back N)");
    check(c_fn_taken > 0,  "mechanism never seen: FNACK acted on");
    check(c_fn_ign > 0,    "mechanism never seen: repeated FNACK ignored");
    check(c_stall > 0,     "mechanism never seen: window stall");
    check(n_illegal > 0 && a_drops > 0, "mechanism never seen: illegal input dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired: delivered %0d of %0d", n_delivered, n_posted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
