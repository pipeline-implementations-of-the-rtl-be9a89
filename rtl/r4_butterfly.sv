// r4_butterfly: radix-4 decimation-in-frequency butterfly, direct form.
//
// Inputs x[0..3] = x[n], x[n+N/4], x[n+N/2], x[n+3N/4]. Each output is one four-input sum
// of the inputs scaled by +1, -1, +j or -j (no multiplier is needed for these):
//   y0 = x0 +   x1 + x2 +   x3
//   y1 = x0 - j*x1 - x2 + j*x3
//   y2 = x0 -   x1 + x2 -   x3
//   y3 = x0 + j*x1 - x2 - j*x3
// and is divided by 4 (arithmetic shift) to stay DW bits wide; 12 complex two-input
// additions in all. The twiddle factors W_N^n, W_N^2n, W_N^3n that follow outputs 1..3 are
// applied by the pipeline (twiddle_mult). The scaling is this design's choice.
// Combinational, zero latency. Same function as r22_butterfly, bit for bit.
module r4_butterfly
  import fft_pkg::*;
(
  input  cplx_t [3:0] x,
  output cplx_t [3:0] y
);

  localparam int SW = DW + 2;
  typedef logic signed [SW-1:0] sword_t;

  sword_t r0, r1, r2, r3, i0, i1, i2, i3;
  assign r0 = SW'(x[0].re);
  assign r1 = SW'(x[1].re);
  assign r2 = SW'(x[2].re);
  assign r3 = SW'(x[3].re);
  assign i0 = SW'(x[0].im);
  assign i1 = SW'(x[1].im);
  assign i2 = SW'(x[2].im);
  assign i3 = SW'(x[3].im);

  // -j*(a+jb) = b - ja ; +j*(a+jb) = -b + ja
  sword_t [3:0] yre, yim;
  always_comb begin
    yre[0] = r0 + r1 + r2 + r3;
    yim[0] = i0 + i1 + i2 + i3;
    yre[1] = r0 + i1 - r2 - i3;
    yim[1] = i0 - r1 - i2 + r3;
    yre[2] = r0 - r1 + r2 - r3;
    yim[2] = i0 - i1 + i2 - i3;
    yre[3] = r0 - i1 - r2 + i3;
    yim[3] = i0 + r1 - i2 - r3;
  end

  for (genvar g = 0; g < 4; g++) begin : g_out
    assign y[g].re = yre[g][SW-1:2];
    assign y[g].im = yim[g][SW-1:2];
  end

endmodule
