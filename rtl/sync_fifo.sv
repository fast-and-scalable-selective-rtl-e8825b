// sync_fifo: single-clock FIFO used for every queue between the transport modules
// (InputQ, SackQ, ACKQ, RetxQ, NewWQEQ, DMAQ, OutputQ and the RTO event queue).
//
// DEPTH entries of type T in a circular array with read and write pointers and an
// occupancy counter. Valid/ready handshake on both sides: a word moves when valid and
// ready are both high at a rising clock edge. The head word is shown combinationally on
// out_data, so an entry written in cycle n can be read in cycle n+1. Synchronous active-low
// reset empties the FIFO. The queues are named in the document; their depth and handshake
// are choices of this design.
module sync_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [AW-1:0]   wptr, rptr;
  logic            push, pop;

  assign in_ready  = (count != DEPTH[$bits(count)-1:0]);
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rptr];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= incr(wptr);
      if (pop)  rptr <= incr(rptr);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= in_data;
  end

  // A push is never accepted when full, a pop never issued when empty.
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) int'(count) <= DEPTH;
  endproperty
  a_no_overflow: assert property (p_no_overflow);
endmodule
