// tb_update_queue: self-checking testbench for the QPC write arbiter.
//
// Three sources push tagged requests at random. Every cycle the testbench predicts, from
// its own per-source queues, which source must be written (the lowest-numbered non-empty
// one) and which request; it also checks one write per cycle at most, that each source's
// requests keep their order, and that backpressure appears when a source queue fills.
//
// The expected results follow the rules the document gives for this block (or, where it
// gives only the function, this design's documented behaviour); stimulus, sizes and the
// reference model are this testbench's own.
module tb_update_queue;
  import fasr_pkg::*;
  localparam int N = 3, D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic [N-1:0] in_valid, in_ready, granted;
  qpc_upd_t in_req [N];
  logic wr_en;
  qpc_upd_t wr;
  update_queue #(.N_SRC(N), .SRC_DEPTH(D)) dut (.*);

  qpc_upd_t mq [N][$];
  int writes [N];
  int stalls = 0;

  initial begin
    in_valid = '0;
    for (int s = 0; s < N; s++) begin in_req[s] = '0; writes[s] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      int exp_src;
      @(negedge clk);
      for (int s = 0; s < N; s++) begin
        in_valid[s] = ($urandom_range(0, 99) < 40);
        in_req[s] = '0;
        in_req[s].qp = QPN_W'(s * 100000 + k);
        in_req[s].val.unack = PSN_W'($urandom);
      end
      #1;
      exp_src = -1;
      for (int s = N - 1; s >= 0; s--) if (mq[s].size() > 0) exp_src = s;
      check(wr_en == (exp_src >= 0), "write enable");
      if (exp_src >= 0) begin
        check(granted == N'(1 << exp_src), $sformatf("granted %b exp source %0d", granted, exp_src));
        check(wr == mq[exp_src][0], $sformatf("write request from source %0d", exp_src));
      end
      for (int s = 0; s < N; s++) begin
        check(in_ready[s] == (mq[s].size() < D), "in_ready");
        if (!in_ready[s]) stalls++;
      end
      @(posedge clk);
      if (exp_src >= 0) begin void'(mq[exp_src].pop_front()); writes[exp_src]++; end
      for (int s = 0; s < N; s++) if (in_valid[s] && in_ready[s]) mq[s].push_back(in_req[s]);
    end
    check(stalls > 0, "no source ever backpressured");
    for (int s = 0; s < N; s++) check(writes[s] > 0, $sformatf("source %0d never written", s));
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
