// tb_sr_state_pool: self-checking testbench for the Level-1 shared SR state pool.
//
// Allocates every unit (lowest free index first, as the availability bitmap is scanned from
// bit 0), checks that allocation fails when the pool is full, that the stored state can be
// read back and rewritten, and that freed units are reused lowest-first. A software copy of
// the availability bitmap gives the expected index and occupancy.
//
// The expected results follow the rules the document gives for this block (or, where it
// gives only the function, this design's documented behaviour); stimulus, sizes and the
// reference model are this testbench's own.
module tb_sr_state_pool;
  import fasr_pkg::*;
  localparam int N = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic alloc_valid, alloc_ok, free_valid, wr_en;
  sr_state_t alloc_data, rd_data, wr_data;
  logic [BPTR_W-1:0] alloc_idx, free_idx, rd_idx, wr_idx;
  logic [$clog2(N+1)-1:0] n_used;
  sr_state_pool #(.N_UNITS(N)) dut (.*);

  bit used [N];
  function automatic int lowest_free();
    for (int i = 0; i < N; i++) if (!used[i]) return i;
    return -1;
  endfunction
  function automatic int count_used();
    int n = 0;
    foreach (used[i]) n += used[i];
    return n;
  endfunction

  task automatic do_alloc(int tag);
    int e = lowest_free();
    @(negedge clk);
    alloc_data = '0; alloc_data.sack_high = PSN_W'(tag); alloc_data.lost_cnt = 3'(tag);
    alloc_valid = 1;
    #1;
    check(alloc_ok == (e >= 0), $sformatf("alloc_ok %0d, expected free %0d", alloc_ok, e));
    if (e >= 0) check(int'(alloc_idx) == e, $sformatf("alloc idx %0d exp %0d", alloc_idx, e));
    @(posedge clk); #1 alloc_valid = 0;
    if (e >= 0) used[e] = 1;
    check(int'(n_used) == count_used(), $sformatf("n_used %0d exp %0d", n_used, count_used()));
  endtask

  task automatic do_free(int i);
    @(negedge clk); free_valid = 1; free_idx = BPTR_W'(i);
    @(posedge clk); #1 free_valid = 0; used[i] = 0;
    check(int'(n_used) == count_used(), $sformatf("after free n_used %0d exp %0d", n_used, count_used()));
  endtask

  initial begin
    alloc_valid = 0; free_valid = 0; wr_en = 0; alloc_data = '0; wr_data = '0;
    free_idx = '0; rd_idx = '0; wr_idx = '0;
    foreach (used[i]) used[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    check(n_used == 0, "empty after reset");
    for (int i = 0; i < N; i++) do_alloc(1000 + i);
    do_alloc(5);   // pool full: must fail
    for (int i = 0; i < N; i++) begin
      rd_idx = BPTR_W'(i); #1;
      check(int'(rd_data.sack_high) == 1000 + i, $sformatf("unit %0d holds %0d", i, rd_data.sack_high));
    end
    @(negedge clk); wr_en = 1; wr_idx = 8'd7; wr_data = '0; wr_data.sack_high = 24'h00ABCD; wr_data.slow = 1;
    @(posedge clk); #1 wr_en = 0; rd_idx = 8'd7; #1;
    check(rd_data.sack_high == 24'h00ABCD && rd_data.slow, "write port");
    do_free(13); do_free(4); do_free(17);
    do_alloc(1); do_alloc(2); do_alloc(3); do_alloc(4);
    for (int k = 0; k < 200; k++) begin
      if ($urandom_range(0, 1) == 0) do_alloc(k);
      else begin
        automatic int i = $urandom_range(0, N - 1);
        if (used[i]) do_free(i);
      end
    end
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
