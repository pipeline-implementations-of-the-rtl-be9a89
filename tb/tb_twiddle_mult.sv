// tb_twiddle_mult: self-checking testbench of twiddle_mult.
//
// For transform sizes 8 and 64, multiplies random samples by every W_N^k and compares with
// the rotation x * exp(-j*2*pi*k/N) computed in double precision (tolerance 2 LSBs).
module tb_twiddle_mult;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;

  cplx_t x, y8, y64;
  logic [2:0] k8;
  logic [5:0] k64;

  twiddle_mult #(.N(8))  dut8  (.x, .k(k8),  .y(y8));
  twiddle_mult #(.N(64)) dut64 (.x, .k(k64), .y(y64));

  int checks = 0, failures = 0;

  task automatic cmp(cplx_t got, int n, int k);
    real a, er, ei;
    a  = -2.0 * 3.14159265358979323846 * real'(k) / real'(n);
    er = real'(x.re) * $cos(a) - real'(x.im) * $sin(a);
    ei = real'(x.re) * $sin(a) + real'(x.im) * $cos(a);
    checks++;
    if (absr(real'(got.re) - er) > 2.0 || absr(real'(got.im) - ei) > 2.0) begin
      failures++;
      if (failures < 10) $display("FAIL: N=%0d k=%0d x=(%0d,%0d) got (%0d,%0d) expected (%.1f,%.1f)",
                                  n, k, x.re, x.im, got.re, got.im, er, ei);
    end
  endtask

  initial begin
    for (int t = 0; t < 60; t++) begin
      x = rand_sample(23000);
      for (int k = 0; k < 64; k++) begin
        k8  = 3'(k);
        k64 = 6'(k);
        #1;
        if (k < 8) cmp(y8, 8, k);
        cmp(y64, 64, k);
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
