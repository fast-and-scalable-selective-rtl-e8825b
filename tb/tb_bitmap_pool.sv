// tb_bitmap_pool: self-checking testbench for the Level-2 shared bitmap pool storage.
//
// Allocates all 70 blocks and expects failure on the 71st, links blocks into a chain and
// follows it, ORs masks into blocks and reads the bits back, checks that a freed and
// re-allocated block comes back cleared with a NULL next pointer, and keeps a software copy
// of the availability bitmap and block contents to predict every read.
//
// The expected results follow the rules the document gives for this block (or, where it
// gives only the function, this design's documented behaviour); stimulus, sizes and the
// reference model are this testbench's own.
module tb_bitmap_pool;
  import fasr_pkg::*;
  localparam int N_BLK = 70, BLK_BITS = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic alloc_valid, alloc_ok, free_valid, set_valid, link_valid;
  logic [BPTR_W-1:0] alloc_idx, free_idx, rd_idx, rd_nxt, set_idx, link_idx, link_ptr;
  logic [BLK_BITS-1:0] rd_bits, set_mask;
  logic [$clog2(N_BLK+1)-1:0] n_used;
  bitmap_pool #(.N_BLK(N_BLK), .BLK_BITS(BLK_BITS)) dut (.*);

  bit used [N_BLK];
  logic [BLK_BITS-1:0] m_bits [N_BLK];
  logic [BPTR_W-1:0] m_nxt [N_BLK];

  task automatic alloc(output int idx);
    int e = -1;
    for (int i = N_BLK - 1; i >= 0; i--) if (!used[i]) e = i;
    @(negedge clk); alloc_valid = 1; #1;
    check(alloc_ok == (e >= 0), "alloc_ok");
    if (e >= 0) check(int'(alloc_idx) == e, $sformatf("alloc idx %0d exp %0d", alloc_idx, e));
    idx = int'(alloc_idx);
    @(posedge clk); #1 alloc_valid = 0;
    if (e >= 0) begin used[e] = 1; m_bits[e] = '0; m_nxt[e] = '1; end
  endtask

  initial begin
    int b;
    alloc_valid = 0; free_valid = 0; set_valid = 0; link_valid = 0;
    free_idx = '0; rd_idx = '0; set_idx = '0; set_mask = '0; link_idx = '0; link_ptr = '0;
    foreach (used[i]) used[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int i = 0; i < N_BLK; i++) alloc(b);
    check(int'(n_used) == N_BLK, "all blocks used");
    alloc(b);                         // must fail
    // chain 3 -> 40 -> 69 and random masks
    @(negedge clk); link_valid = 1; link_idx = 8'd3;  link_ptr = 8'd40; @(posedge clk);
    @(negedge clk);                   link_idx = 8'd40; link_ptr = 8'd69; @(posedge clk);
    #1 link_valid = 0;
    m_nxt[3] = 40; m_nxt[40] = 69;
    for (int k = 0; k < 100; k++) begin
      automatic int i = $urandom_range(0, N_BLK - 1);
      automatic logic [BLK_BITS-1:0] m = BLK_BITS'($urandom);
      @(negedge clk); set_valid = 1; set_idx = BPTR_W'(i); set_mask = m;
      @(posedge clk); #1 set_valid = 0;
      m_bits[i] |= m;
    end
    for (int i = 0; i < N_BLK; i++) begin
      rd_idx = BPTR_W'(i); #1;
      check(rd_bits == m_bits[i] && rd_nxt == m_nxt[i], $sformatf("block %0d read", i));
    end
    rd_idx = 8'd3; #1; rd_idx = rd_nxt; #1; rd_idx = rd_nxt; #1;
    check(rd_idx == 8'd69 && rd_nxt == 8'hFF, "follow chain 3 -> 40 -> 69 -> NULL");
    @(negedge clk); free_valid = 1; free_idx = 8'd40; @(posedge clk); #1 free_valid = 0; used[40] = 0;
    check(int'(n_used) == N_BLK - 1, "one block freed");
    alloc(b);
    check(b == 40, "freed block reused");
    rd_idx = 8'd40; #1;
    check(rd_bits == '0 && rd_nxt == 8'hFF, "reallocated block cleared");
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
