// tb_r4mdc_qrate_fft: self-checking testbench of the quarter-rate R4MDC pipeline with
// duplicated input buffer.
//
// Streams NB random blocks back to back (plus two flush blocks) with random one-cycle stalls,
// and checks every output (all four lanes of each output group) against a double-precision
// DFT of its block (tolerance TOL LSBs), the digit-reversed bin order, and that the first
// group of each block leaves exactly 2N-1 enabled cycles after the block's first sample.
// Counts stalls, all four commutator rotations and buffer-set swaps, and checks that once
// full the butterflies deliver a group in every quarter-rate cycle (100% utilisation).
module tb_r4mdc_qrate_fft;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;

  localparam int N   = 16;
  localparam int S   = $clog2(N) / 2;
  localparam int NB  = 6;
  localparam int LANES = 4;
  localparam int TOL = 2 * S + 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  cplx_t in_data = '0;
  logic out_valid;
  cplx_t [3:0] out_data;
  logic [3:0][$clog2(N)-1:0] out_bin;

  r4mdc_qrate_fft #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cplx_t blocks [NB+2][];
  int en_cycle = 0;      // enabled cycles so far
  int nout = 0;          // outputs seen
  int stalls = 0;
  int rots [4] = '{0, 0, 0, 0};
  int set_swaps = 0, q_cycles = 0, busy = 0;
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
      rots[dut.g_stage[1].g_comm.rot]++;
      if (dut.wset != last_set) set_swaps++;
      last_set = dut.wset;
      if (dut.en4) begin
        q_cycles++;
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
        k = digit_reverse4(4 * g + j, S);
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

  initial begin
    for (int b = 0; b <= NB + 1; b++) begin
      blocks[b] = new[N];
      for (int i = 0; i < N; i++) blocks[b][i] = (b >= NB) ? '0 : rand_sample(23000);
    end
    // block 0: an impulse; block 1: a constant, for easy reading
    foreach (blocks[0][i]) blocks[0][i] = (i == 1) ? cplx_t'({16'sd16000, 16'sd0}) : '0;
    foreach (blocks[1][i]) blocks[1][i] = cplx_t'({16'sd12000, -16'sd8000});
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b <= NB + 1; b++)
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
    check(stalls > 0 && set_swaps > 0, "stall and buffer swaps happened");
    check(rots[0] > 0 && rots[1] > 0 && rots[2] > 0 && rots[3] > 0, "all four commutator rotations happened");
    // after the pipeline filled, every quarter-rate cycle delivers a group (100% utilisation)
    check(busy == q_cycles - (N / 2 - 1), $sformatf("busy quarter-rate cycles %0d of %0d", busy, q_cycles));
    $display("stalls=%0d rotations=%0d/%0d/%0d/%0d set swaps=%0d busy=%0d/%0d", stalls,
             rots[0], rots[1], rots[2], rots[3], set_swaps, busy, q_cycles);
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
