// tb_fft_ref_pkg: reference arithmetic for the FFT testbenches.
//
// dft_bin() computes one bin of the N-point DFT directly from its definition in double
// precision, divided by N (the pipelines scale by 1/N), independently of any RTL.
// rand_sample() draws a complex sample whose modulus stays below 2^(DW-1), the input range
// the pipelines are specified for.
package tb_fft_ref_pkg;
  import fft_pkg::*;

  function automatic void dft_bin(input cplx_t x[], input int n, input int k,
                                  output real re, output real im);
    real a;
    re = 0.0;
    im = 0.0;
    for (int i = 0; i < n; i++) begin
      a  = -2.0 * 3.14159265358979323846 * real'(k) * real'(i) / real'(n);
      re += real'(x[i].re) * $cos(a) - real'(x[i].im) * $sin(a);
      im += real'(x[i].re) * $sin(a) + real'(x[i].im) * $cos(a);
    end
    re = re / real'(n);
    im = im / real'(n);
  endfunction

  function automatic cplx_t rand_sample(int amp);
    cplx_t c;
    c.re = dword_t'(int'($urandom_range(2 * amp)) - amp);
    c.im = dword_t'(int'($urandom_range(2 * amp)) - amp);
    return c;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction
endpackage
