// tb_r22_butterfly: self-checking testbench of r22_butterfly.
//
// Drives random and extreme input quadruples and compares each output with
// floor(sum_m x[m] * (-j)^(k*m) / 4), computed in integer arithmetic from the radix-4 DIF
// definition, exactly (bit for bit).
module tb_r22_butterfly;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;

  cplx_t [3:0] x, y;

  r22_butterfly dut (.x, .y);

  int checks = 0, failures = 0;

  // (-j)^p applied to (re, im), p = 0..3
  function automatic void rot(input int p, input int re, input int im, output int ore, output int oim);
    case (p % 4)
      0: begin ore = re;  oim = im;  end
      1: begin ore = im;  oim = -re; end
      2: begin ore = -re; oim = -im; end
      default: begin ore = -im; oim = re; end
    endcase
  endfunction

  function automatic int floor4(int v);
    return (v >= 0) ? v / 4 : -((-v + 3) / 4);
  endfunction

  initial begin
    for (int t = 0; t < 400; t++) begin
      for (int m = 0; m < 4; m++) begin
        if (t == 0) x[m] = cplx_t'({16'sd23000, -16'sd23000});
        else if (t == 1) x[m] = (m % 2 == 0) ? cplx_t'({16'sd23000, 16'sd0}) : cplx_t'({-16'sd23000, 16'sd0});
        else x[m] = rand_sample(23000);
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        int sr, si, rr, ri;
        sr = 0;
        si = 0;
        for (int m = 0; m < 4; m++) begin
          rot(k * m, int'(x[m].re), int'(x[m].im), rr, ri);
          sr += rr;
          si += ri;
        end
        checks++;
        if (int'(y[k].re) != floor4(sr) || int'(y[k].im) != floor4(si)) begin
          failures++;
          if (failures < 10) $display("FAIL: t=%0d y%0d got (%0d,%0d) expected (%0d,%0d)", t, k, y[k].re, y[k].im, floor4(sr), floor4(si));
        end
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
