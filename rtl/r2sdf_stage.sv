// r2sdf_stage: one element of a radix-2 single-path delay feedback (R2SDF) pipeline.
//
// A delay line of L samples is wrapped around a radix-2 DIF butterfly (bfly2). The element
// alternates every L samples between two modes, chosen by bit log2(L) of the pipeline's
// sample counter (cnt):
//   fill  (bit = 0): the incoming sample is shifted into the delay line, and the sample
//                    leaving the delay line (a difference stored in the previous period)
//                    is multiplied by its twiddle factor and sent on;
//   compute (bit = 1): the incoming sample (second half) meets the sample leaving the delay
//                    line (first half) in the butterfly; the half sum goes on to the next
//                    stage and the half difference is fed back into the delay line.
// The twiddle factor for the difference that leaves at counter value cnt is W_{2L}^{cnt mod L}
// = W_N^{(cnt mod L) * N/(2L)}; the last element (L = 1) needs none and has no multiplier.
// Latency: L enabled cycles. Single path in, single path out, combinational from x to y.
// The element and its two modes follow the R2SDF element; placing the twiddle multiplier
// at the element's output is this design's choice.
module r2sdf_stage
  import fft_pkg::*;
#(
  parameter int          N          = 8,  // size of the whole transform
  parameter int          L          = 4,  // delay of this element (a power of 2, < N)
  parameter delay_impl_e DELAY_IMPL = DL_DPRAM,
  parameter int          CW         = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [CW-1:0] cnt,
  input  cplx_t         x,
  output cplx_t         y
);

  localparam int LB = $clog2(L);

  logic  compute;  // 1: butterfly mode, 0: fill mode
  cplx_t fb, fb_in, s, d;

  assign compute = cnt[LB];

  delay_line #(.L(L), .IMPL(DELAY_IMPL)) u_delay (.clk, .rst_n, .en, .d(fb_in), .q(fb));

  bfly2 u_bf (.a(fb), .b(x), .s, .d);

  assign fb_in = compute ? d : x;

  if (L == 1) begin : g_no_twiddle
    assign y = compute ? s : fb;
  end else begin : g_twiddle
    cplx_t fb_w;
    logic [CW-1:0] k;
    assign k = CW'((int'(cnt) % L) * (N / (2 * L)));
    twiddle_mult #(.N(N), .KW(CW)) u_mult (.x(fb), .k, .y(fb_w));
    assign y = compute ? s : fb_w;
  end

endmodule
