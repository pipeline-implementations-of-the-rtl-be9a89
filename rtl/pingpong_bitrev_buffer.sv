// pingpong_bitrev_buffer: block input buffer made of two memories used in ping-pong fashion,
// read in bit-reversed address order.
//
// A block-based FFT (for instance a decimation-in-time FFT, which wants its inputs in the
// order x[0], x[N/2], x[N/4], ...) needs its input block buffered. While the input fills one
// memory in natural order, the other memory, holding the previous block, is read at the
// bit-reversed addresses bitrev(0), bitrev(1), ...; after N samples the memories swap roles.
// Interface: one sample in per enabled clock (in_valid is the enable). out_data is the sample
// x[out_index] of the previous block, out_index = bitrev(position); out_valid is high once a
// whole block has been stored. Latency N enabled cycles. out_bank tells which memory is
// being filled. The memories are arrays with one write and one asynchronous read port and
// are not reset. The two memories, the role swap and the bit-reversed reading follow the
// buffering scheme described for block FFTs; the interface is this design's own.
module pingpong_bitrev_buffer
  import fft_pkg::*;
#(
  parameter int N = 8  // block length, a power of 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output cplx_t                out_data,
  output logic [$clog2(N)-1:0] out_index,
  output logic                 out_bank
);

  localparam int AW = $clog2(N);

  cplx_t         mem0 [N];
  cplx_t         mem1 [N];
  logic [AW-1:0] wr_addr, rd_addr;
  logic          bank;   // memory being written
  logic          full;   // the other memory holds a complete block

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr <= '0;
      bank    <= 1'b0;
      full    <= 1'b0;
    end else if (in_valid) begin
      wr_addr <= wr_addr + 1'b1;
      if (wr_addr == AW'(N - 1)) begin
        bank <= ~bank;
        full <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && !bank) mem0[wr_addr] <= in_data;
    if (in_valid && bank) mem1[wr_addr] <= in_data;
  end

  assign rd_addr   = AW'(bit_reverse(int'(wr_addr), AW));
  assign out_data  = bank ? mem0[rd_addr] : mem1[rd_addr];
  assign out_index = rd_addr;
  assign out_valid = in_valid && full;
  assign out_bank  = bank;

endmodule
