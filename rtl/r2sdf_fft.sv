// r2sdf_fft: radix-2 single-path delay feedback (R2SDF) FFT pipeline, decimation in
// frequency, N points (N a power of 2, default 8).
//
// log2(N) elements (r2sdf_stage) in a chain with delays N/2, N/4, ..., 1: N-1 delay words
// in all, against 3N/2-2 for the multi-path pipeline, with the same number of butterflies
// and multipliers. One sample enters and one leaves per enabled clock, and every element
// runs at the sample rate; each butterfly computes half of the time. A single counter of
// the samples in a block drives all elements: element L switches mode on bit log2(L).
//
// Output: X[k]/N in bit-reversed order. The output at position p of a block (p = 0..N-1) is
// bin bitrev(p), given on out_bin; position 0 leaves N-1 enabled cycles after the block's
// first sample entered, and the next block's outputs follow without a gap.
// in_valid is a clock enable: while it is low the pipeline holds and out_valid is low.
// The first sample after reset is sample 0 of a block. Word widths, scaling, the stall and
// the flags are this design's choices; the structure (4D, 2D, 1D elements for 8 points)
// follows the R2SDF pipeline.
module r2sdf_fft
  import fft_pkg::*;
#(
  parameter int          N          = 8,
  parameter delay_impl_e DELAY_IMPL = DL_DPRAM
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output cplx_t                out_data,
  output logic [$clog2(N)-1:0] out_bin
);

  localparam int S  = $clog2(N);
  localparam int CW = S;

  logic          en;
  logic [CW-1:0] cnt;
  logic          primed;
  assign en = in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      primed <= 1'b0;
    end else if (en) begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(N - 2)) primed <= 1'b1;
    end
  end

  for (genvar s = 0; s < S; s++) begin : g_stage
    cplx_t x, y;  // input and output of this element
    if (s == 0) begin : g_first
      assign x = in_data;
    end else begin : g_next
      assign x = g_stage[s-1].y;
    end
    r2sdf_stage #(.N(N), .L(N >> (s + 1)), .DELAY_IMPL(DELAY_IMPL), .CW(CW)) u_stage (
      .clk, .rst_n, .en, .cnt, .x, .y
    );
  end

  logic [CW-1:0] opos;
  assign opos      = cnt + 1'b1;
  assign out_valid = en && primed;
  assign out_data  = g_stage[S-1].y;
  assign out_bin   = CW'(bit_reverse(int'(opos), S));

endmodule
