// tb_qpc_ram: self-checking testbench for the shared QPC RAM.
//
// Random masked writes to random QPs against a reference copy; both read ports are checked
// every cycle, and entries never written must read as 0 after reset.
//
// The expected results follow the rules the document gives for this block (or, where it
// gives only the function, this design's documented behaviour); stimulus, sizes and the
// reference model are this testbench's own.
module tb_qpc_ram;
  import fasr_pkg::*;
  localparam int NUM_QP = 64, QW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic wr_en;
  qpc_upd_t wr;
  logic [QW-1:0] ra_qp, rb_qp;
  qpc_t ra_data, rb_data;
  qpc_ram #(.NUM_QP(NUM_QP)) dut (.*);

  qpc_t m [NUM_QP];

  initial begin
    wr_en = 0; wr = '0; ra_qp = '0; rb_qp = '0;
    foreach (m[i]) m[i] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      ra_qp = QW'($urandom); rb_qp = QW'($urandom);
      #1;
      check(ra_data == m[ra_qp], $sformatf("port a qp %0d", ra_qp));
      check(rb_data == m[rb_qp], $sformatf("port b qp %0d", rb_qp));
      wr_en = ($urandom_range(0, 1) == 1);
      wr.qp = QPN_W'(k < 1000 ? $urandom_range(0, NUM_QP / 2 - 1) : $urandom_range(0, NUM_QP - 1));
      wr.mask = 3'($urandom);
      wr.val.unack = PSN_W'($urandom); wr.val.snd_nxt = PSN_W'($urandom); wr.val.ts = $urandom;
      @(posedge clk);
      if (wr_en) begin
        if (wr.mask.unack)   m[int'(wr.qp)].unack   = wr.val.unack;
        if (wr.mask.snd_nxt) m[int'(wr.qp)].snd_nxt = wr.val.snd_nxt;
        if (wr.mask.ts)      m[int'(wr.qp)].ts      = wr.val.ts;
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
