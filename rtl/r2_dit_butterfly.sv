// r2_dit_butterfly: radix-2 decimation-in-time butterfly.
//
// Two inputs a (from the DFT of the even samples) and b (from the DFT of the odd samples);
// the multiplication comes first: t = b * W_N^k, then y0 = (a + t)/2 and y1 = (a - t)/2.
// One complex multiplication, one addition, one subtraction. The factor 1/2 is this
// design's scaling (see bfly2). Combinational, zero latency.
module r2_dit_butterfly
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

  cplx_t t;

  twiddle_mult #(.N(N), .KW(KW)) u_mult (.x(b), .k(k), .y(t));

  bfly2 u_core (.a(a), .b(t), .s(y0), .d(y1));

endmodule
