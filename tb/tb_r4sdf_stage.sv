// tb_r4sdf_stage: self-checking testbench of r4sdf_stage (N = 16, elements with L = 4 and 1,
// one with each butterfly form).
//
// Feeds a random stream with a sample counter, with random stalls, and checks each element
// output against the element's definition computed from the testbench's own input history:
// in phase 3, y0 = floor((x[t-3L] + x[t-2L] + x[t-L] + x[t])/4) exactly; in phases q = 0..2,
// output m = q+1 of the butterfly operation (q+1)L samples earlier, multiplied by
// W_N^{m*(t mod L)*N/(4L)}, within 2 LSBs.
module tb_r4sdf_stage;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;

  localparam int N = 16;
  localparam int NS = 2;
  localparam int LS [NS] = '{4, 1};

  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] cnt = '0;
  cplx_t x = '0;
  cplx_t y [NS];

  r4sdf_stage #(.N(N), .L(4), .USE_R22(1'b1)) dut0 (.clk, .rst_n, .en, .cnt, .x, .y(y[0]));
  r4sdf_stage #(.N(N), .L(1), .USE_R22(1'b0)) dut1 (.clk, .rst_n, .en, .cnt, .x, .y(y[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cplx_t hist [$];

  function automatic int floor4(int v);
    return (v >= 0) ? v / 4 : -((-v + 3) / 4);
  endfunction

  // output m of the radix-4 butterfly whose last input is hist[tb], spacing L, exact
  function automatic void bfly_out(int tb, int L, int m, output int re, output int im);
    int sr, si;
    sr = 0;
    si = 0;
    for (int i = 0; i < 4; i++) begin
      int ar, ai;
      ar = int'(hist[tb - (3 - i) * L].re);
      ai = int'(hist[tb - (3 - i) * L].im);
      case ((m * i) % 4)
        0: begin sr += ar;  si += ai;  end
        1: begin sr += ai;  si -= ar;  end
        2: begin sr -= ar;  si -= ai;  end
        default: begin sr -= ai; si += ar; end
      endcase
    end
    re = floor4(sr);
    im = floor4(si);
  endfunction

  initial begin
    int t;
    t = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    while (t < 200) begin
      @(negedge clk);
      en = ($urandom_range(5) != 0);
      if (en) begin
        x   = rand_sample(23000);
        cnt = 4'(t);
        hist.push_back(x);
        #1;
        for (int i = 0; i < NS; i++) begin
          int L, q, m, br, bi;
          real er, ei, w;
          L = LS[i];
          q = (t / L) % 4;
          m = (q + 1) % 4;
          if (q == 3) begin
            bfly_out(t, L, 0, br, bi);
            er = real'(br);
            ei = real'(bi);
          end else if (t >= 4 * L) begin
            bfly_out(t - (q + 1) * L, L, m, br, bi);
            w  = -2.0 * 3.14159265358979323846 * real'(m * (t % L) * N / (4 * L)) / real'(N);
            er = real'(br) * $cos(w) - real'(bi) * $sin(w);
            ei = real'(br) * $sin(w) + real'(bi) * $cos(w);
          end else continue;
          checks++;
          if (absr(real'(y[i].re) - er) > 2.0 || absr(real'(y[i].im) - ei) > 2.0) begin
            failures++;
            if (failures < 10) $display("FAIL: L=%0d t=%0d got (%0d,%0d) expected (%.1f,%.1f)", L, t, y[i].re, y[i].im, er, ei);
          end
        end
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
