// tb_r2_dit_butterfly: self-checking testbench of r2_dit_butterfly (N = 8).
//
// Drives random input pairs with every twiddle exponent k = 0..7 and compares
// both outputs against (a +- b*W_N^k)/2 in double precision (tolerance 2 LSBs).
module tb_r2_dit_butterfly;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;

  cplx_t a, b, y0, y1;
  logic [2:0] k;

  r2_dit_butterfly #(.N(8)) dut (.a, .b, .k, .y0, .y1);

  int checks = 0, failures = 0;

  function automatic int floor2(int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  initial begin
    for (int t = 0; t < 300; t++) begin
      real w, dr, di, e0r, e0i, e1r, e1i, tol0;
      a = rand_sample(23000);
      b = rand_sample(23000);
      k = 3'(t);
      #1;
      w = -2.0 * 3.14159265358979323846 * real'(k) / 8.0;
    // t = b * W_N^k; y0 = (a+t)/2, y1 = (a-t)/2
    dr = real'(b.re) * $cos(w) - real'(b.im) * $sin(w);
    di = real'(b.re) * $sin(w) + real'(b.im) * $cos(w);
    e0r = (real'(a.re) + dr) / 2.0;
    e0i = (real'(a.im) + di) / 2.0;
    e1r = (real'(a.re) - dr) / 2.0;
    e1i = (real'(a.im) - di) / 2.0;
    tol0 = 2.0;
      checks += 2;
      if (absr(real'(y0.re) - e0r) > tol0 || absr(real'(y0.im) - e0i) > tol0) begin
        failures++;
        if (failures < 10) $display("FAIL: y0 got (%0d,%0d) expected (%.1f,%.1f)", y0.re, y0.im, e0r, e0i);
      end
      if (absr(real'(y1.re) - e1r) > 2.0 || absr(real'(y1.im) - e1i) > 2.0) begin
        failures++;
        if (failures < 10) $display("FAIL: y1 k=%0d got (%0d,%0d) expected (%.1f,%.1f)", k, y1.re, y1.im, e1r, e1i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
