// r4sdf_fft: radix-4 single-path delay feedback (R4SDF) FFT pipeline, decimation in
// frequency, N points (N a power of 4, default 16).
//
// log4(N) elements (r4sdf_stage) with three delays each of N/4, N/16, ..., 1 samples, N-1
// delay words in all, and a twiddle multiplier between elements. One sample enters and one
// leaves per enabled clock; the pipeline runs at the sample rate. A single counter of the
// samples in a block drives all elements.
//
// Output: X[k]/N in base-4 digit-reversed order: position p of a block is bin
// digitrev4(p), given on out_bin; position 0 leaves N-1 enabled cycles after the block's
// first sample entered, blocks follow without gaps. in_valid is a clock enable (stall);
// out_valid marks the outputs. The first sample after reset is sample 0 of a block.
// The structure (4D x3 and 1D x3 elements with one multiplier between them for 16 points)
// follows the R4SDF pipeline; widths, scaling (1/4 per element) and flags are this design's.
module r4sdf_fft
  import fft_pkg::*;
#(
  parameter int          N          = 16,
  parameter delay_impl_e DELAY_IMPL = DL_2SPRAM,
  parameter bit          USE_R22    = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output cplx_t                out_data,
  output logic [$clog2(N)-1:0] out_bin
);

  localparam int CW = $clog2(N);
  localparam int S  = CW / 2;  // radix-4 stages

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
    r4sdf_stage #(
      .N(N), .L(N >> (2 * (s + 1))), .DELAY_IMPL(DELAY_IMPL), .USE_R22(USE_R22), .CW(CW)
    ) u_stage (
      .clk, .rst_n, .en, .cnt, .x, .y
    );
  end

  logic [CW-1:0] opos;
  assign opos      = cnt + 1'b1;
  assign out_valid = en && primed;
  assign out_data  = g_stage[S-1].y;
  assign out_bin   = CW'(digit_reverse4(int'(opos), S));

endmodule
