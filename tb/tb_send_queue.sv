// tb_send_queue: self-checking testbench for the priority send queue.
//
// Replies (input 0) and data (input 1) arrive at random while the MAC side accepts at
// random. Reference queues predict every transmitted packet: a waiting reply always goes
// before waiting data, each class keeps its order, and nothing is lost or duplicated.
//
// The expected results follow the rules the document gives for this block (or, where it
// gives only the function, this design's documented behaviour); stimulus, sizes and the
// reference model are this testbench's own.
module tb_send_queue;
  import fasr_pkg::*;
  localparam int N = 2, D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic [N-1:0] in_valid, in_ready, out_src;
  pkt_t in_pkt [N];
  logic out_valid, out_ready;
  pkt_t out_pkt;
  send_queue #(.N_IN(N), .DEPTH(D)) dut (.*);

  pkt_t mq [N][$];
  int sent [N];
  int overtakes = 0;

  initial begin
    in_valid = '0; out_ready = 0;
    for (int s = 0; s < N; s++) begin in_pkt[s] = '0; sent[s] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      int exp_src;
      @(negedge clk);
      for (int s = 0; s < N; s++) begin
        in_valid[s] = ($urandom_range(0, 99) < 35);
        in_pkt[s] = '0;
        in_pkt[s].opcode = (s == 0) ? OP_ACK : OP_DATA;
        in_pkt[s].psn = PSN_W'(k);
        in_pkt[s].qpn = QPN_W'($urandom);
      end
      out_ready = ($urandom_range(0, 99) < 70);
      #1;
      exp_src = -1;
      for (int s = N - 1; s >= 0; s--) if (mq[s].size() > 0) exp_src = s;
      check(out_valid == (exp_src >= 0), "out_valid");
      if (exp_src >= 0) begin
        check(out_pkt == mq[exp_src][0], $sformatf("packet from class %0d", exp_src));
        check(out_src == N'(1 << exp_src), "out_src");
        if (exp_src == 0 && mq[1].size() > 0 && out_ready) overtakes++;
      end
      @(posedge clk);
      if (out_valid && out_ready && exp_src >= 0) begin void'(mq[exp_src].pop_front()); sent[exp_src]++; end
      for (int s = 0; s < N; s++) if (in_valid[s] && in_ready[s]) mq[s].push_back(in_pkt[s]);
    end
    check(overtakes > 0, "a reply never overtook waiting data");
    check(sent[0] > 0 && sent[1] > 0, "both classes sent");
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
