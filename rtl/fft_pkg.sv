// fft_pkg: shared number formats, enums and index helpers for the FFT pipelines.
//
// Samples are complex numbers with a signed two's-complement real and imaginary part of
// DW bits each (an integer scale; the pipelines scale by 1/2 per radix-2 stage and by 1/4
// per radix-4 stage, so an N-point pipeline delivers X[k]/N). Twiddle factors
// W_N^k = exp(-j*2*pi*k/N) are held with TW bits and TW-2 fraction bits, so that +1.0
// is exactly representable. Both widths are this design's own choice; the pipelines it
// is written for give no word lengths.
package fft_pkg;

  localparam int DW = 16;  // data word width per real/imaginary part
  localparam int TW = 16;  // twiddle word width per real/imaginary part
  localparam int TF = TW - 2;  // twiddle fraction bits

  typedef logic signed [DW-1:0] dword_t;
  typedef logic signed [TW-1:0] tword_t;

  typedef struct packed {
    dword_t re;
    dword_t im;
  } cplx_t;

  typedef struct packed {
    tword_t re;
    tword_t im;
  } twid_t;

  // How a delay buffer of L samples is built (the four options discussed for delay buffers).
  typedef enum logic [1:0] {
    DL_SHIFTREG = 2'd0,  // chain of L registers
    DL_DPRAM    = 2'd1,  // cyclic buffer, L+1 words of a dual-port RAM
    DL_2SPRAM   = 2'd2,  // two single-port RAMs written in turn
    DL_ONEHOT   = 2'd3   // RAM whose address decoders are one-hot shift registers
  } delay_impl_e;



  // Round a real to the nearest integer, halves away from zero.
  function automatic int round_real(real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  // W_N^k in the twiddle format, rounded to the nearest code.
  function automatic twid_t twiddle(int n, int k);
    twid_t w;
    real a;
    a = 2.0 * 3.14159265358979323846 * real'(k) / real'(n);
    w.re = tword_t'(round_real($cos(a) * real'(1 << TF)));
    w.im = tword_t'(round_real(-$sin(a) * real'(1 << TF)));
    return w;
  endfunction

  // Reverse the lowest `bits` bits of v.
  function automatic int bit_reverse(int v, int bits);
    int r;
    r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  // Reverse the order of the lowest `digits` base-4 digits of v.
  function automatic int digit_reverse4(int v, int digits);
    int r;
    r = 0;
    for (int i = 0; i < digits; i++) r = (r << 2) | ((v >> (2 * i)) & 3);
    return r;
  endfunction

  // Multiply by -j: (a + jb)(-j) = b - ja.
  function automatic cplx_t mul_mj(cplx_t a);
    cplx_t r;
    r.re = a.im;
    r.im = -a.re;
    return r;
  endfunction

endpackage
