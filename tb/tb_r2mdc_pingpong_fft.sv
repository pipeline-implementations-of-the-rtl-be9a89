// tb_r2mdc_pingpong_fft: self-checking testbench of the R2MDC pipeline with ping-pong input
// buffer, without (dut) and with (dut_p, PIPE = 1) pipeline registers after the butterflies.
//
// Streams to both the same NB random blocks back to back (plus three flush blocks) with random one-cycle stalls,
// and checks every output (all lanes of each output group) against a double-precision DFT of its block (tolerance TOL LSBs),
// the bit-reversed bin order, and that the first output of each block leaves exactly 2N-1
// enabled cycles after the block's first sample (2N-1+2*log2 N with the pipeline registers). Counts stalls, the two commutator settings and buffer swaps,
// and checks that once full the butterflies deliver a pair in every half-rate cycle.
module tb_r2mdc_pingpong_fft;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;

  localparam int N   = 8;
  localparam int S   = $clog2(N);
  localparam int NB  = 6;
  localparam int LANES = 2;
  localparam int TOL = 2 * S + 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  cplx_t in_data = '0;
  logic out_valid;
  cplx_t [1:0] out_data;
  logic [1:0][$clog2(N)-1:0] out_bin;

  r2mdc_pingpong_fft #(.N(N)) dut (.*);

  logic out_valid_p;
  cplx_t [1:0] out_data_p;
  logic [1:0][$clog2(N)-1:0] out_bin_p;
  r2mdc_pingpong_fft #(.N(N), .PIPE(1'b1)) dut_p (
    .clk, .rst_n, .in_valid, .in_data,
    .out_valid(out_valid_p), .out_data(out_data_p), .out_bin(out_bin_p)
  );
  int nout_p = 0, busy_p = 0;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cplx_t blocks [NB+3][];
  int en_cycle = 0;      // enabled cycles so far
  int nout = 0;          // outputs seen
  int stalls = 0;
  int straight = 0, crossed = 0, set_swaps = 0, half_cycles = 0, busy = 0;
  logic last_set = 0;


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
      if (dut.g_stage[1].g_next.swap) crossed++; else straight++;
      if (dut.wset != last_set) set_swaps++;
      last_set = dut.wset;
      if (dut.en2) begin
        half_cycles++;
        if (out_valid) busy++;
      end
    end else stalls++;
    if (out_valid) begin
      int b, g;
      real er, ei;
      b = nout / (N / LANES);
      g = nout % (N / LANES);
      if (g == 0) check(en_cycle == b * N + 2 * N - 1, $sformatf("block %0d latency: first output at enabled cycle %0d", b, en_cycle));
      for (int j = 0; j < LANES; j++) begin
        int k;
        k = bit_reverse(2 * g + j, S);
        check(int'(out_bin[j]) == k, $sformatf("bin order at group %0d lane %0d", g, j));
        if (b < NB) begin
          dft_bin(blocks[b], N, k, er, ei);
          check(absr(real'(out_data[j].re) - er) <= TOL && absr(real'(out_data[j].im) - ei) <= TOL,
                $sformatf("block %0d bin %0d: got (%0d,%0d) expected (%.1f,%.1f)", b, k,
                          out_data[j].re, out_data[j].im, er, ei));
        end
      end
      nout++;
    end
    if (in_valid) en_cycle++;
  end

  // output monitor of the pipelined instance
  always @(posedge clk) if (rst_n) begin
    if (dut_p.en2 && out_valid_p) busy_p++;
    if (out_valid_p) begin
      int b, g;
      real er, ei;
      b = nout_p / (N / LANES);
      g = nout_p % (N / LANES);
      if (g == 0) check(en_cycle == b * N + 2 * N - 1 + 2 * S, $sformatf("PIPE block %0d latency: first output at enabled cycle %0d", b, en_cycle));
      for (int j = 0; j < LANES; j++) begin
        int k;
        k = bit_reverse(2 * g + j, S);
        check(int'(out_bin_p[j]) == k, $sformatf("PIPE bin order at group %0d lane %0d", g, j));
        if (b < NB) begin
          dft_bin(blocks[b], N, k, er, ei);
          check(absr(real'(out_data_p[j].re) - er) <= TOL && absr(real'(out_data_p[j].im) - ei) <= TOL,
                $sformatf("PIPE block %0d bin %0d: got (%0d,%0d) expected (%.1f,%.1f)", b, k,
                          out_data_p[j].re, out_data_p[j].im, er, ei));
        end
      end
      nout_p++;
    end
  end

  initial begin
    for (int b = 0; b <= NB + 2; b++) begin
      blocks[b] = new[N];
      for (int i = 0; i < N; i++) blocks[b][i] = (b >= NB) ? '0 : rand_sample(23000);
    end
    // block 0: an impulse; block 1: a constant, for easy reading
    foreach (blocks[0][i]) blocks[0][i] = (i == 1) ? cplx_t'({16'sd16000, 16'sd0}) : '0;
    foreach (blocks[1][i]) blocks[1][i] = cplx_t'({16'sd12000, -16'sd8000});
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b <= NB + 2; b++)
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
    check(nout >= NB * N / LANES, $sformatf("output groups seen %0d", nout));
    check(stalls > 0 && straight > 0 && crossed > 0 && set_swaps > 0, "stall, both commutator settings and buffer swaps happened");
    // after the pipeline filled, every half-rate cycle delivers a pair (100% utilisation)
    check(busy == half_cycles - (N - 1), $sformatf("busy half-rate cycles %0d of %0d", busy, half_cycles));
    check(nout_p >= NB * N / LANES, $sformatf("PIPE output groups seen %0d", nout_p));
    check(busy_p == half_cycles - (N - 1) - S, $sformatf("PIPE busy half-rate cycles %0d of %0d", busy_p, half_cycles));
    $display("stalls=%0d straight=%0d crisscross=%0d set swaps=%0d busy=%0d/%0d", stalls, straight, crossed, set_swaps, busy, half_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
