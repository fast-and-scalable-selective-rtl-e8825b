// tb_bitmap_ctrl: self-checking testbench for the bitmap controller and its Level-2 pool.
//
// Builds one QP's block list with SET commands (a run written into the first block, PSNs
// that skip whole blocks), advances it with SCAN commands (a head block passed completely
// is released, the first hole is returned as the new RCV-NXT), exhausts a 6-block pool, and
// releases everything with FREE_ALL. Expected descriptors, hole PSNs, block-pool occupancy
// and latencies (SET a+4, SCAN v+2, FREE_ALL n+3 cycles from the accepting edge to the edge
// that sees the response, a = blocks appended, v = blocks visited, n = blocks freed) were
// worked out by hand.
//
// The expected results follow the rules the document gives for this block (or, where it
// gives only the function, this design's documented behaviour); stimulus, sizes and the
// reference model are this testbench's own.
module tb_bitmap_ctrl;
  import fasr_pkg::*;
  localparam int N_BLK = 6, BLK_BITS = 10;
  localparam logic [1:0] SET = 2'd0, SCAN = 2'd1, FREE = 2'd2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic req_valid, req_ready, rsp_valid, rsp_ok;
  logic [1:0] req_cmd;
  logic [BPTR_W-1:0] req_head, req_tail, req_nblk, rsp_head, rsp_tail, rsp_nblk;
  psn_t req_base, rsp_base, rsp_psn;
  logic [15:0] req_lo, req_hi;
  logic [$clog2(N_BLK+1)-1:0] blocks_used;
  bitmap_ctrl #(.N_BLK(N_BLK), .BLK_BITS(BLK_BITS)) dut (.*);

  // current list descriptor, as returned by the controller
  logic [BPTR_W-1:0] head = 0, tail = 0, nblk = 0;
  psn_t base = 100;
  int lat;

  task automatic cmd(logic [1:0] c, int lo, int hi);
    int t0;
    @(negedge clk);
    req_valid = 1; req_cmd = c; req_head = head; req_tail = tail; req_nblk = nblk;
    req_base = base; req_lo = 16'(lo); req_hi = 16'(hi);
    do @(posedge clk); while (!req_ready);
    t0 = int'($time);
    #1 req_valid = 0;
    do @(posedge clk); while (!rsp_valid);
    lat = (int'($time) - t0) / 10;
    head = rsp_head; tail = rsp_tail; nblk = rsp_nblk; base = rsp_base;
  endtask

  task automatic expect_list(string w, int h, int t, int n, int b, int used);
    check(int'(head) == h, $sformatf("%s: head %0d exp %0d", w, head, h));
    if (n > 0) check(int'(tail) == t, $sformatf("%s: tail %0d exp %0d", w, tail, t));
    check(int'(nblk) == n, $sformatf("%s: nblk %0d exp %0d", w, nblk, n));
    check(int'(base) == b, $sformatf("%s: base %0d exp %0d", w, base, b));
    check(int'(blocks_used) == used, $sformatf("%s: blocks used %0d exp %0d", w, blocks_used, used));
  endtask

  initial begin
    req_valid = 0; req_cmd = '0; req_head = '0; req_tail = '0; req_nblk = '0;
    req_base = '0; req_lo = '0; req_hi = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    cmd(SET, 0, 8);   check(rsp_ok && lat == 5, $sformatf("set run: ok %0d lat %0d", rsp_ok, lat));
    @(posedge clk);   expect_list("set run", 0, 0, 1, 100, 1);
    cmd(SET, 9, 9);   check(rsp_ok && lat == 4, $sformatf("set 9: ok %0d lat %0d", rsp_ok, lat));
    cmd(SET, 12, 12); check(rsp_ok && lat == 5, $sformatf("set 12: lat %0d", lat));
    cmd(SET, 25, 25); check(rsp_ok && lat == 5, $sformatf("set 25: lat %0d", lat));
    @(posedge clk);   expect_list("three blocks", 0, 2, 3, 100, 3);
    cmd(SCAN, 0, 0);  check(int'(rsp_psn) == 110 && lat == 4, $sformatf("scan: psn %0d lat %0d", rsp_psn, lat));
    @(posedge clk);   expect_list("after scan", 1, 2, 2, 110, 2);
    cmd(SCAN, 3, 0);  check(int'(rsp_psn) == 113 && lat == 3, $sformatf("scan 2: psn %0d lat %0d", rsp_psn, lat));
    cmd(SCAN, 2, 0);  check(int'(rsp_psn) == 113, $sformatf("scan from a set bit: psn %0d", rsp_psn));
    cmd(SET, 59, 59); check(rsp_ok && lat == 8, $sformatf("set 59: ok %0d lat %0d", rsp_ok, lat));
    @(posedge clk);   expect_list("pool full", 1, 5, 6, 110, 6);
    cmd(SET, 65, 65); check(!rsp_ok, "set beyond the pool must fail");
    @(posedge clk);   expect_list("after exhaustion", 1, 5, 6, 110, 6);
    cmd(SCAN, 13, 0); check(int'(rsp_psn) == 123, $sformatf("scan past a passed head block: psn %0d", rsp_psn));
    @(posedge clk);   expect_list("after scan 3", 2, 5, 5, 120, 5);
    cmd(FREE, 0, 0);  check(lat == 8, $sformatf("free all: lat %0d", lat));
    @(posedge clk);   expect_list("freed", 255, 0, 0, 170, 0);
    cmd(SCAN, 0, 0);  check(int'(rsp_psn) == 170 && lat == 3, $sformatf("scan empty: psn %0d lat %0d", rsp_psn, lat));
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
