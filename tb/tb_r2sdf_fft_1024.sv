// tb_r2sdf_fft_1024: the R2SDF pipeline at 1024 points with its delays in dual-port RAMs
// (the transform size at which shift-register delay lines become impractical).
//
// Streams NB random blocks back to back (plus one flush block) with random one-cycle stalls,
// and checks every output against a double-precision DFT of its block (tolerance TOL LSBs),
// the bit-reversed bin order, and that the first output of each block leaves exactly N-1
// enabled cycles after the block's first sample. Counts stalls and both element modes.
module tb_r2sdf_fft_1024;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;

  localparam int N   = 1024;
  localparam int S   = $clog2(N);
  localparam int NB  = 2;
  localparam int TOL = 2 * S + 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  cplx_t in_data = '0;
  logic out_valid;
  cplx_t out_data;
  logic [S-1:0] out_bin;

  r2sdf_fft #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cplx_t blocks [NB+1][];
  int en_cycle = 0;      // enabled cycles so far
  int nout = 0;          // outputs seen
  int stalls = 0, fills = 0, computes = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // output monitor
  always @(posedge clk) if (rst_n) begin
    if (in_valid) begin
      if (dut.g_stage[0].u_stage.compute) computes++; else fills++;
    end else stalls++;
    if (out_valid) begin
      int b, p;
      real er, ei;
      b = nout / N;
      p = nout % N;
      if (p == 0) check(en_cycle == b * N + N - 1, $sformatf("block %0d latency: first output at enabled cycle %0d", b, en_cycle));
      check(int'(out_bin) == bit_reverse(p, S), $sformatf("bin order at %0d", p));
      if (b < NB) begin
        dft_bin(blocks[b], N, bit_reverse(p, S), er, ei);
        check(absr(real'(out_data.re) - er) <= TOL && absr(real'(out_data.im) - ei) <= TOL,
              $sformatf("block %0d bin %0d: got (%0d,%0d) expected (%.1f,%.1f)", b, bit_reverse(p, S),
                        out_data.re, out_data.im, er, ei));
      end
      nout++;
    end
    if (in_valid) en_cycle++;
  end

  initial begin
    for (int b = 0; b <= NB; b++) begin
      blocks[b] = new[N];
      for (int i = 0; i < N; i++) blocks[b][i] = (b == NB) ? '0 : rand_sample(23000);
    end
    // block 0: an impulse; block 1: a constant, for easy reading
    foreach (blocks[0][i]) blocks[0][i] = (i == 1) ? cplx_t'({16'sd16000, 16'sd0}) : '0;
    foreach (blocks[1][i]) blocks[1][i] = cplx_t'({16'sd12000, -16'sd8000});
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b <= NB; b++)
      for (int i = 0; i < N; i++) begin
        while ($urandom_range(5) == 0) begin
          @(posedge clk) in_valid <= 0;
        end
        @(posedge clk);
        in_valid <= 1;
        in_data  <= blocks[b][i];
      end
    @(posedge clk) in_valid <= 0;
    repeat (3) @(posedge clk);
    check(nout >= NB * N, $sformatf("outputs seen %0d", nout));
    check(stalls > 0 && fills > 0 && computes > 0, "stall and both element modes happened");
    $display("stalls=%0d fill=%0d compute=%0d", stalls, fills, computes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
