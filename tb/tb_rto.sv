// tb_rto: self-checking testbench for the retransmission-timeout scanner.
//
// A behavioural QPC memory (read by the scanner, written by the testbench from the
// scanner's timer-restart requests) holds 16 QPs: some with data outstanding and an old
// time stamp, some idle, some recently restarted. Each timed-out QP must be reported
// exactly once per RTO period with a restart stamp equal to the current time, no idle or
// fresh QP may be reported, and events must wait while the event queue is not ready.
//
// The expected results follow the rules the document gives for this block (or, where it
// gives only the function, this design's documented behaviour); stimulus, sizes and the
// reference model are this testbench's own.
module tb_rto;
  import fasr_pkg::*;
  localparam int NUM_QP = 16, QW = 4, RTO = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic [TS_W-1:0] now;
  logic [QW-1:0] rd_qp, ev_qp;
  qpc_t rd_data;
  logic ev_valid, ev_ready, upd_valid, upd_ready;
  qpc_upd_t upd;
  rto #(.NUM_QP(NUM_QP), .RTO_CYCLES(RTO)) dut (.*);

  qpc_t mem [NUM_QP];
  assign rd_data = mem[rd_qp];
  int fired [NUM_QP];
  int blocked = 0;

  always @(posedge clk) if (rst_n) begin
    if (ev_valid && !ev_ready) blocked++;
    check(ev_valid == upd_valid || !(ev_ready && upd_ready), "event and restart move together");
    if (ev_valid && ev_ready && upd_valid && upd_ready) begin
      automatic qpc_t e = mem[ev_qp];
      check(e.unack != e.snd_nxt, $sformatf("qp %0d reported without outstanding data", ev_qp));
      check(now - e.ts >= RTO, $sformatf("qp %0d reported early", ev_qp));
      check(upd.qp == QPN_W'(ev_qp) && upd.mask.ts && !upd.mask.unack && upd.val.ts == now,
            "restart request");
      fired[ev_qp]++;
      mem[ev_qp].ts = now;
    end
  end

  initial begin
    now = 0; ev_ready = 1; upd_ready = 1;
    for (int i = 0; i < NUM_QP; i++) begin
      mem[i] = '0; fired[i] = 0;
      mem[i].unack = 24'd10;
      mem[i].snd_nxt = (i % 3 == 0) ? 24'd10 : 24'd20;   // every third QP is idle
      mem[i].ts = (i % 4 == 1) ? 32'd150 : 32'd0;         // some restarted later
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      now = now + 1;
      ev_ready  = (k < 300) ? 1'b1 : ($urandom_range(0, 3) != 0);
      upd_ready = 1'b1;
    end
    // 1000 cycles, RTO 200: each busy QP fires about every 200 cycles (4 or 5 times)
    for (int i = 0; i < NUM_QP; i++) begin
      if (i % 3 == 0) check(fired[i] == 0, $sformatf("idle qp %0d fired %0d", i, fired[i]));
      else check(fired[i] >= 4 && fired[i] <= 5, $sformatf("qp %0d fired %0d times", i, fired[i]));
    end
    check(blocked > 0, "event backpressure never seen");
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
