// tb_sync_fifo: self-checking testbench for the FIFO used by every transport queue.
//
// Random pushes and pops with random valid/ready against a SystemVerilog queue as the
// reference: every popped word must match, the count must match, in_ready must fall
// exactly when DEPTH words are held, and a word pushed into an empty FIFO must be readable
// on the next cycle.
//
// The expected results follow the rules the document gives for this block (or, where it
// gives only the function, this design's documented behaviour); stimulus, sizes and the
// reference model are this testbench's own.
module tb_sync_fifo;
  localparam int DEPTH = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  sync_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

  logic [15:0] model [$];
  int full_seen = 0;

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 99) < (k < 1500 ? 70 : 30));
      out_ready = ($urandom_range(0, 99) < (k < 1500 ? 30 : 70));
      in_data   = 16'($urandom);
      #1;
      check(int'(count) == model.size(), $sformatf("count %0d exp %0d", count, model.size()));
      check(in_ready == (model.size() < DEPTH), "in_ready");
      check(out_valid == (model.size() > 0), "out_valid");
      if (model.size() == DEPTH) full_seen++;
      if (out_valid && model.size() > 0) check(out_data == model[0], "head word");
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    check(full_seen > 0, "FIFO never filled");
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
