// twiddle_mult: multiply a complex sample by the twiddle factor W_N^k = exp(-j*2*pi*k/N).
//
// The N twiddle factors are a constant table computed at elaboration time from cos/sin
// (fft_pkg::twiddle), so no table file is needed; k selects one entry. The complex product
// uses four real multipliers and two adders; the result drops the TF twiddle fraction bits
// by arithmetic shift (truncation) and is saturated to DW bits, which only matters when a
// rounded twiddle of magnitude just above 1 meets a sample at full scale.
// Interface: x and k in, y out, purely combinational (no clock, zero latency).
// A multiplication by a twiddle factor is a rotation of the sample vector; the way the table
// is stored and the truncation are this design's choices.
module twiddle_mult
  import fft_pkg::*;
#(
  parameter int N  = 8,                      // transform size the factors belong to
  parameter int KW = (N > 1) ? $clog2(N) : 1 // width of the exponent input
) (
  input  cplx_t           x,
  input  logic [KW-1:0]   k,
  output cplx_t           y
);

  localparam int PW = DW + TW + 1;  // full product-sum width

  typedef twid_t [N-1:0] table_t;

  function automatic table_t make_table();
    table_t t;
    for (int i = 0; i < N; i++) t[i] = twiddle(N, i);
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  twid_t w;
  always_comb begin
    w = TABLE[0];
    for (int i = 0; i < N; i++) if (int'(k) == i) w = TABLE[i];
  end

  logic signed [PW-1:0] pre, pim;
  always_comb begin
    pre = PW'(x.re * w.re) - PW'(x.im * w.im);
    pim = PW'(x.re * w.im) + PW'(x.im * w.re);
  end

  function automatic dword_t sat(logic signed [PW-1:0] v);
    logic signed [PW-1:0] s;
    s = v >>> TF;
    if (s > PW'(2 ** (DW - 1) - 1)) return dword_t'(2 ** (DW - 1) - 1);
    if (s < -PW'(2 ** (DW - 1))) return dword_t'(-(2 ** (DW - 1)));
    return dword_t'(s);
  endfunction

  assign y.re = sat(pre);
  assign y.im = sat(pim);

endmodule
