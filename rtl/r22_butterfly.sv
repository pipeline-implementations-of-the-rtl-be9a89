// r22_butterfly: radix-2^2 butterfly, the radix-4 butterfly split into two radix-2 layers.
//
// Layer 1 pairs x0 with x2 and x1 with x3:  a0 = x0 + x2, a1 = x1 + x3,
//                                           a2 = x0 - x2, a3 = -j*(x1 - x3).
// Layer 2 pairs a0 with a1 and a2 with a3:  y0 = a0 + a1, y2 = a0 - a1,
//                                           y1 = a2 + a3, y3 = a2 - a3.
// The multiplication by -j is a swap of real and imaginary part with one negation. The
// result equals the direct radix-4 butterfly (r4_butterfly) with 8 complex additions
// instead of 12. Outputs are given in natural order y[0..3]; drawn as a flow graph the
// layer-2 outputs appear in the order y0, y2, y1, y3. The sums are exact and divided by 4
// once at the end, so the output matches r4_butterfly bit for bit (this scaling is this
// design's choice). Combinational, zero latency.
module r22_butterfly
  import fft_pkg::*;
(
  input  cplx_t [3:0] x,
  output cplx_t [3:0] y
);

  localparam int SW = DW + 2;
  typedef logic signed [SW-1:0] sword_t;

  sword_t a0r, a0i, a1r, a1i, a2r, a2i, a3r, a3i;
  always_comb begin
    a0r = SW'(x[0].re) + SW'(x[2].re);
    a0i = SW'(x[0].im) + SW'(x[2].im);
    a1r = SW'(x[1].re) + SW'(x[3].re);
    a1i = SW'(x[1].im) + SW'(x[3].im);
    a2r = SW'(x[0].re) - SW'(x[2].re);
    a2i = SW'(x[0].im) - SW'(x[2].im);
    // -j * (x1 - x3)
    a3r = SW'(x[1].im) - SW'(x[3].im);
    a3i = SW'(x[3].re) - SW'(x[1].re);
  end

  sword_t [3:0] yre, yim;
  always_comb begin
    yre[0] = a0r + a1r;
    yim[0] = a0i + a1i;
    yre[2] = a0r - a1r;
    yim[2] = a0i - a1i;
    yre[1] = a2r + a3r;
    yim[1] = a2i + a3i;
    yre[3] = a2r - a3r;
    yim[3] = a2i - a3i;
  end

  for (genvar g = 0; g < 4; g++) begin : g_out
    assign y[g].re = yre[g][SW-1:2];
    assign y[g].im = yim[g][SW-1:2];
  end

endmodule
