// bfly2: radix-2 add/subtract core shared by the radix-2 butterflies and pipeline stages.
//
// s = (a + b) / 2 and d = (a - b) / 2. The sum and difference are formed with one guard bit
// and halved by an arithmetic shift (truncation), so the outputs stay DW bits wide; an
// N-point radix-2 pipeline therefore computes X[k]/N. The halving per stage is this design's
// choice of scaling. Combinational, zero latency.
module bfly2
  import fft_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t s,
  output cplx_t d
);

  logic signed [DW:0] sre, sim, dre, dim;
  always_comb begin
    sre = (DW + 1)'(a.re) + (DW + 1)'(b.re);
    sim = (DW + 1)'(a.im) + (DW + 1)'(b.im);
    dre = (DW + 1)'(a.re) - (DW + 1)'(b.re);
    dim = (DW + 1)'(a.im) - (DW + 1)'(b.im);
  end

  assign s.re = dword_t'(sre >>> 1);
  assign s.im = dword_t'(sim >>> 1);
  assign d.re = dword_t'(dre >>> 1);
  assign d.im = dword_t'(dim >>> 1);

endmodule
