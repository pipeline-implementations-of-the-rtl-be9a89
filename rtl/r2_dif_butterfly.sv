// r2_dif_butterfly: radix-2 decimation-in-frequency butterfly.
//
// Two inputs a = x[n], b = x[n+N/2]; two outputs y0 = (a + b)/2 and y1 = ((a - b)/2) * W_N^k,
// i.e. one complex addition, one complex subtraction and one complex multiplication that
// comes after the subtraction. The twiddle exponent k is an input so that the pipeline that
// uses the butterfly supplies n (or a multiple of it) each cycle. The factor 1/2 is this
// design's scaling (see bfly2). Combinational, zero latency.
module r2_dif_butterfly
  import fft_pkg::*;
#(
  parameter int N  = 8,
  parameter int KW = (N > 1) ? $clog2(N) : 1
) (
  input  cplx_t         a,
  input  cplx_t         b,
  input  logic [KW-1:0] k,
  output cplx_t         y0,
  output cplx_t         y1
);

  cplx_t diff;

  bfly2 u_core (.a(a), .b(b), .s(y0), .d(diff));

  twiddle_mult #(.N(N), .KW(KW)) u_mult (.x(diff), .k(k), .y(y1));

endmodule
