// send_queue: priority send queue in front of the MAC transmit side.
//
// N_IN packet classes (in this transport: 0 = ACK/SACK/FNACK replies from SR, 1 = data
// packets returned by DMA) each enter their own FIFO of DEPTH headers. Each cycle the
// non-empty FIFO with the lowest index sends its head packet on out_*, so replies overtake
// data. One packet per cycle leaves when out_ready is high. The document describes a send
// queue that packs and sends packets with priority among data, ACK and request packets; the
// order and depth are this design's choices, and packing/checking of payloads is outside
// this header-level model.
module send_queue
  import fasr_pkg::*;
#(
  parameter int N_IN  = 2,
  parameter int DEPTH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_IN-1:0] in_valid,
  output logic [N_IN-1:0] in_ready,
  input  pkt_t            in_pkt [N_IN],
  output logic            out_valid,
  input  logic            out_ready,
  output pkt_t            out_pkt,
  output logic [N_IN-1:0] out_src
);
  logic [N_IN-1:0] f_valid, f_ready;
  pkt_t            f_data [N_IN];

  for (genvar g = 0; g < N_IN; g++) begin : g_in
    sync_fifo #(.T(pkt_t), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid(in_valid[g]), .in_ready(in_ready[g]), .in_data(in_pkt[g]),
      .out_valid(f_valid[g]), .out_ready(f_ready[g]), .out_data(f_data[g]),
      .count()
    );
  end

  always_comb begin
    out_src   = '0;
    out_valid = 1'b0;
    out_pkt   = '0;
    for (int i = N_IN - 1; i >= 0; i--) begin
      if (f_valid[i]) begin
        out_src    = '0;
        out_src[i] = 1'b1;
        out_valid  = 1'b1;
        out_pkt    = f_data[i];
      end
    end
    f_ready = out_ready ? out_src : '0;
  end
endmodule
