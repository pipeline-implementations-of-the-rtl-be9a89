// tb_r2sdf_stage: self-checking testbench of r2sdf_stage (N = 8, elements with L = 4 and 2).
//
// Feeds a random stream with a sample counter, with random stalls, and checks each element
// output against the element's definition computed from the testbench's own input history:
// in the compute half, (x[t-L] + x[t])/2 exactly; in the fill half,
// ((x[t-2L] - x[t-L])/2) * W_N^{(t mod L) * N/(2L)} within 2 LSBs.
module tb_r2sdf_stage;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;

  localparam int N = 8;
  localparam int NS = 2;
  localparam int LS [NS] = '{4, 2};

  logic clk = 0, rst_n = 0, en = 0;
  logic [2:0] cnt = '0;
  cplx_t x = '0;
  cplx_t y [NS];

  for (genvar i = 0; i < NS; i++) begin : g_dut
    r2sdf_stage #(.N(N), .L(LS[i])) dut (.clk, .rst_n, .en, .cnt, .x, .y(y[i]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cplx_t hist [$];  // all inputs, oldest first

  function automatic int floor2(int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  initial begin
    int t;
    t = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    while (t < 160) begin
      @(negedge clk);
      en = ($urandom_range(5) != 0);
      if (en) begin
        x   = rand_sample(23000);
        cnt = 3'(t);
        hist.push_back(x);
        #1;
        for (int i = 0; i < NS; i++) begin
          int L, n;
          real er, ei, dr, di, w;
          L = LS[i];
          n = t % L;
          if ((t / L) % 2 == 1) begin
            er = real'(floor2(int'(hist[t-L].re) + int'(x.re)));
            ei = real'(floor2(int'(hist[t-L].im) + int'(x.im)));
          end else if (t >= 2 * L) begin
            dr = real'(floor2(int'(hist[t-2*L].re) - int'(hist[t-L].re)));
            di = real'(floor2(int'(hist[t-2*L].im) - int'(hist[t-L].im)));
            w  = -2.0 * 3.14159265358979323846 * real'(n * N / (2 * L)) / real'(N);
            er = dr * $cos(w) - di * $sin(w);
            ei = dr * $sin(w) + di * $cos(w);
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
