// tb_fft_pipelines_top: end-to-end testbench of fft_pipelines_top at its default sizes
// (8-point radix-2 pipelines, 16-point radix-4 pipelines).
//
// Each pipeline (the R2MDC with ping-pong input buffer and the quarter-rate R4MDC included) receives its own stream of NB random blocks (plus a flush block) with its
// own random stalls. Every output is checked against a double-precision DFT of its block,
// together with the bin numbering and the latency of each block (N-1 enabled cycles;
// 2N-1 for the ping-pong R2MDC and the quarter-rate R4MDC). The ping-pong
// buffer is checked for bit-reversed read-out and the DIT butterfly against (a +- b*W)/2.
// It counts how often each mechanism happened - stalls, both R2MDC commutator settings,
// both R2SDF element modes, ping-pong buffer-set swaps with busy half-rate butterflies, all R4SDF phases, all R4MDC commutator rotations, quarter-rate R4MDC
// buffer-set swaps with busy quarter-rate butterflies, buffer swaps,
// DIT butterflies - and counts a failure for any that never happened.
module tb_fft_pipelines_top;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;

  localparam int N2 = 8;
  localparam int N4 = 16;
  localparam int NB = 8;

  logic clk = 0, rst_n = 0;

  logic r2mpp_in_valid = 0, r2mdc_in_valid = 0, r2sdf_in_valid = 0, r4sdf_in_valid = 0, r4mdc_in_valid = 0, r4mqr_in_valid = 0, buf_in_valid = 0;
  cplx_t r2mpp_in_data = '0, r2mdc_in_data = '0, r2sdf_in_data = '0, r4sdf_in_data = '0, r4mdc_in_data = '0, r4mqr_in_data = '0, buf_in_data = '0;
  logic r2mpp_out_valid, r2mdc_out_valid, r2sdf_out_valid, r4sdf_out_valid, r4mdc_out_valid, r4mqr_out_valid, buf_out_valid, buf_out_bank;
  cplx_t [1:0] r2mdc_out_data, r2mpp_out_data;
  cplx_t r2sdf_out_data, r4sdf_out_data, buf_out_data;
  cplx_t [3:0] r4mdc_out_data, r4mqr_out_data;
  logic [1:0][2:0] r2mdc_out_bin, r2mpp_out_bin;
  logic [2:0] r2sdf_out_bin, buf_out_index;
  logic [3:0] r4sdf_out_bin;
  logic [3:0][3:0] r4mdc_out_bin, r4mqr_out_bin;
  cplx_t dit_a = '0, dit_b = '0, dit_y0, dit_y1;
  logic [2:0] dit_k = '0;

  fft_pipelines_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cplx_t blk2 [NB+2][];   // 8-point blocks (two trailing zero blocks flush the pipelines)
  cplx_t blk4 [NB+2][];   // 16-point blocks

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic check_bin(string name, cplx_t blk[], int n, int k, cplx_t got, int tol);
    real er, ei;
    dft_bin(blk, n, k, er, ei);
    check(absr(real'(got.re) - er) <= tol && absr(real'(got.im) - ei) <= tol,
          $sformatf("%s bin %0d: got (%0d,%0d) expected (%.1f,%.1f)", name, k, got.re, got.im, er, ei));
  endtask

  // mechanism counters
  int st_r2mpp = 0, mpp_busy = 0, mpp_half = 0, mpp_set_swaps = 0, out_r2mpp = 0, en_r2mpp = 0;
  logic mpp_last_set = 0;
  int st_r4mqr = 0, mqr_busy = 0, mqr_q = 0, mqr_set_swaps = 0, out_r4mqr = 0, en_r4mqr = 0;
  int mqr_rot [4] = '{0, 0, 0, 0};
  logic mqr_last_set = 0;
  int st_r2mdc = 0, st_r2sdf = 0, st_r4sdf = 0, st_r4mdc = 0;
  int mdc_straight = 0, mdc_cross = 0, sdf_fill = 0, sdf_compute = 0;
  int r4sdf_ph [4] = '{0, 0, 0, 0};
  int r4mdc_rot [4] = '{0, 0, 0, 0};
  int buf_swaps = 0, dit_ops = 0;
  int out_r2mdc = 0, out_r2sdf = 0, out_r4sdf = 0, out_r4mdc = 0;
  int en_r2mdc = 0, en_r2sdf = 0, en_r4sdf = 0, en_r4mdc = 0;
  logic last_bank = 0;

  always @(posedge clk) if (rst_n) begin
    // R2MDC: two lanes, N/2 groups per block
    if (!r2mdc_in_valid) st_r2mdc++;
    else if (dut.u_r2mdc.g_stage[1].swap) mdc_cross++; else mdc_straight++;
    if (r2mdc_out_valid) begin
      int b, g;
      b = out_r2mdc / (N2 / 2);
      g = out_r2mdc % (N2 / 2);
      if (g == 0) check(en_r2mdc == b * N2 + N2 - 1, "R2MDC latency");
      for (int j = 0; j < 2; j++) begin
        check(int'(r2mdc_out_bin[j]) == bit_reverse(2 * g + j, 3), "R2MDC bin order");
        if (b < NB) check_bin("R2MDC", blk2[b], N2, bit_reverse(2 * g + j, 3), r2mdc_out_data[j], 8);
      end
      out_r2mdc++;
    end
    if (r2mdc_in_valid) en_r2mdc++;

    // R2MDC with ping-pong input buffer: half-rate butterflies, latency 2N-1
    if (!r2mpp_in_valid) st_r2mpp++;
    if (dut.u_r2mpp.wset != mpp_last_set) mpp_set_swaps++;
    mpp_last_set = dut.u_r2mpp.wset;
    if (dut.u_r2mpp.en2 && dut.u_r2mpp.primed) begin
      mpp_half++;
      if (r2mpp_out_valid) mpp_busy++;
    end
    if (r2mpp_out_valid) begin
      int b, g;
      b = out_r2mpp / (N2 / 2);
      g = out_r2mpp % (N2 / 2);
      if (g == 0) check(en_r2mpp == b * N2 + 2 * N2 - 1, "R2MDC ping-pong latency");
      for (int j = 0; j < 2; j++) begin
        check(int'(r2mpp_out_bin[j]) == bit_reverse(2 * g + j, 3), "R2MDC ping-pong bin order");
        if (b < NB) check_bin("R2MDC ping-pong", blk2[b], N2, bit_reverse(2 * g + j, 3), r2mpp_out_data[j], 8);
      end
      out_r2mpp++;
    end
    if (r2mpp_in_valid) en_r2mpp++;

    // R2SDF
    if (!r2sdf_in_valid) st_r2sdf++;
    else if (dut.u_r2sdf.g_stage[0].u_stage.compute) sdf_compute++; else sdf_fill++;
    if (r2sdf_out_valid) begin
      int b, p;
      b = out_r2sdf / N2;
      p = out_r2sdf % N2;
      if (p == 0) check(en_r2sdf == b * N2 + N2 - 1, "R2SDF latency");
      check(int'(r2sdf_out_bin) == bit_reverse(p, 3), "R2SDF bin order");
      if (b < NB) check_bin("R2SDF", blk2[b], N2, bit_reverse(p, 3), r2sdf_out_data, 8);
      out_r2sdf++;
    end
    if (r2sdf_in_valid) en_r2sdf++;

    // R4SDF
    if (!r4sdf_in_valid) st_r4sdf++;
    else r4sdf_ph[dut.u_r4sdf.g_stage[0].u_stage.q]++;
    if (r4sdf_out_valid) begin
      int b, p;
      b = out_r4sdf / N4;
      p = out_r4sdf % N4;
      if (p == 0) check(en_r4sdf == b * N4 + N4 - 1, "R4SDF latency");
      check(int'(r4sdf_out_bin) == digit_reverse4(p, 2), "R4SDF bin order");
      if (b < NB) check_bin("R4SDF", blk4[b], N4, digit_reverse4(p, 2), r4sdf_out_data, 10);
      out_r4sdf++;
    end
    if (r4sdf_in_valid) en_r4sdf++;

    // R4MDC: four lanes, N/4 groups per block
    if (!r4mdc_in_valid) st_r4mdc++;
    else r4mdc_rot[dut.u_r4mdc.g_stage[1].g_comm.rot]++;
    if (r4mdc_out_valid) begin
      int b, g;
      b = out_r4mdc / (N4 / 4);
      g = out_r4mdc % (N4 / 4);
      if (g == 0) check(en_r4mdc == b * N4 + N4 - 1, "R4MDC latency");
      for (int j = 0; j < 4; j++) begin
        check(int'(r4mdc_out_bin[j]) == digit_reverse4(4 * g + j, 2), "R4MDC bin order");
        if (b < NB) check_bin("R4MDC", blk4[b], N4, digit_reverse4(4 * g + j, 2), r4mdc_out_data[j], 10);
      end
      out_r4mdc++;
    end
    if (r4mdc_in_valid) en_r4mdc++;

    // R4MDC at a quarter of the sample rate: latency 2N-1, a group every fourth cycle
    if (!r4mqr_in_valid) st_r4mqr++;
    else mqr_rot[dut.u_r4mqr.g_stage[1].g_comm.rot]++;
    if (dut.u_r4mqr.wset != mqr_last_set) mqr_set_swaps++;
    mqr_last_set = dut.u_r4mqr.wset;
    if (dut.u_r4mqr.en4 && dut.u_r4mqr.primed) begin
      mqr_q++;
      if (r4mqr_out_valid) mqr_busy++;
    end
    if (r4mqr_out_valid) begin
      int b, g;
      b = out_r4mqr / (N4 / 4);
      g = out_r4mqr % (N4 / 4);
      if (g == 0) check(en_r4mqr == b * N4 + 2 * N4 - 1, "quarter-rate R4MDC latency");
      for (int j = 0; j < 4; j++) begin
        check(int'(r4mqr_out_bin[j]) == digit_reverse4(4 * g + j, 2), "quarter-rate R4MDC bin order");
        if (b < NB) check_bin("quarter-rate R4MDC", blk4[b], N4, digit_reverse4(4 * g + j, 2), r4mqr_out_data[j], 10);
      end
      out_r4mqr++;
    end
    if (r4mqr_in_valid) en_r4mqr++;
  end

  // drive one pipeline input with random stalls
  task automatic drive(int which, int n, ref cplx_t blk[NB+2][]);
    for (int b = 0; b <= NB + 1; b++)
      for (int i = 0; i < n; i++) begin
        @(posedge clk);
        while ($urandom_range(6) == 0) begin
          case (which)
            0: r2mdc_in_valid <= 0;
            1: r2sdf_in_valid <= 0;
            2: r4sdf_in_valid <= 0;
            3: r4mdc_in_valid <= 0;
            5: r4mqr_in_valid <= 0;
            default: r2mpp_in_valid <= 0;
          endcase
          @(posedge clk);
        end
        case (which)
          0: begin r2mdc_in_valid <= 1; r2mdc_in_data <= blk[b][i]; end
          1: begin r2sdf_in_valid <= 1; r2sdf_in_data <= blk[b][i]; end
          2: begin r4sdf_in_valid <= 1; r4sdf_in_data <= blk[b][i]; end
          3: begin r4mdc_in_valid <= 1; r4mdc_in_data <= blk[b][i]; end
          5: begin r4mqr_in_valid <= 1; r4mqr_in_data <= blk[b][i]; end
          default: begin r2mpp_in_valid <= 1; r2mpp_in_data <= blk[b][i]; end
        endcase
      end
    @(posedge clk);
    case (which)
      0: r2mdc_in_valid <= 0;
      1: r2sdf_in_valid <= 0;
      2: r4sdf_in_valid <= 0;
      3: r4mdc_in_valid <= 0;
      5: r4mqr_in_valid <= 0;
      default: r2mpp_in_valid <= 0;
    endcase
  endtask

  // ping-pong buffer and DIT butterfly
  task automatic drive_buf_and_dit();
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < N2; i++) begin
        real w, tr, ti;
        @(negedge clk);
        buf_in_valid = 1;
        buf_in_data  = blk2[b][i];
        dit_a = rand_sample(23000);
        dit_b = rand_sample(23000);
        dit_k = 3'(i);
        #1;
        if (buf_out_bank != last_bank) buf_swaps++;
        last_bank = buf_out_bank;
        if (b > 0) begin
          check(buf_out_valid && int'(buf_out_index) == bit_reverse(i, 3), "buffer index");
          check(buf_out_data == blk2[b-1][bit_reverse(i, 3)], "buffer data");
        end
        w  = -2.0 * 3.14159265358979323846 * real'(i) / 8.0;
        tr = real'(dit_b.re) * $cos(w) - real'(dit_b.im) * $sin(w);
        ti = real'(dit_b.re) * $sin(w) + real'(dit_b.im) * $cos(w);
        check(absr(real'(dit_y0.re) - (real'(dit_a.re) + tr) / 2.0) <= 2.0 &&
              absr(real'(dit_y0.im) - (real'(dit_a.im) + ti) / 2.0) <= 2.0 &&
              absr(real'(dit_y1.re) - (real'(dit_a.re) - tr) / 2.0) <= 2.0 &&
              absr(real'(dit_y1.im) - (real'(dit_a.im) - ti) / 2.0) <= 2.0, "DIT butterfly");
        dit_ops++;
      end
    @(negedge clk) buf_in_valid = 0;
  endtask

  initial begin
    for (int b = 0; b <= NB + 1; b++) begin
      blk2[b] = new[N2];
      blk4[b] = new[N4];
      foreach (blk2[b][i]) blk2[b][i] = (b >= NB) ? '0 : rand_sample(23000);
      foreach (blk4[b][i]) blk4[b][i] = (b >= NB) ? '0 : rand_sample(23000);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    fork
      drive(0, N2, blk2);
      drive(1, N2, blk2);
      drive(2, N4, blk4);
      drive(3, N4, blk4);
      drive(4, N2, blk2);
      drive(5, N4, blk4);
      drive_buf_and_dit();
    join
    repeat (4) @(posedge clk);
    check(out_r2mdc >= NB * N2 / 2, "R2MDC produced every block");
    check(out_r2sdf >= NB * N2, "R2SDF produced every block");
    check(out_r4sdf >= NB * N4, "R4SDF produced every block");
    check(out_r4mdc >= NB * N4 / 4, "R4MDC produced every block");
    check(out_r2mpp >= NB * N2 / 2, "R2MDC ping-pong produced every block");
    check(out_r4mqr >= NB * N4 / 4, "quarter-rate R4MDC produced every block");
    $display("stalls: r2mdc=%0d r2sdf=%0d r4sdf=%0d r4mdc=%0d", st_r2mdc, st_r2sdf, st_r4sdf, st_r4mdc);
    $display("R2MDC commutator straight=%0d crisscross=%0d", mdc_straight, mdc_cross);
    $display("R2SDF element fill=%0d compute=%0d", sdf_fill, sdf_compute);
    $display("R4SDF phases %0d/%0d/%0d/%0d", r4sdf_ph[0], r4sdf_ph[1], r4sdf_ph[2], r4sdf_ph[3]);
    $display("R4MDC rotations %0d/%0d/%0d/%0d", r4mdc_rot[0], r4mdc_rot[1], r4mdc_rot[2], r4mdc_rot[3]);
    $display("R2MDC ping-pong: stalls=%0d buffer-set swaps=%0d busy half-rate cycles=%0d/%0d", st_r2mpp, mpp_set_swaps, mpp_busy, mpp_half);
    $display("quarter-rate R4MDC: stalls=%0d rotations %0d/%0d/%0d/%0d buffer-set swaps=%0d busy quarter-rate cycles=%0d/%0d",
             st_r4mqr, mqr_rot[0], mqr_rot[1], mqr_rot[2], mqr_rot[3], mqr_set_swaps, mqr_busy, mqr_q);
    $display("buffer swaps=%0d DIT butterflies=%0d", buf_swaps, dit_ops);
    check(st_r2mpp > 0 && mpp_set_swaps > 0 && mpp_busy == mpp_half, "R2MDC ping-pong stalled, swapped sets and kept its butterflies busy");
    check(st_r4mqr > 0 && mqr_set_swaps > 0 && mqr_busy == mqr_q, "quarter-rate R4MDC stalled, swapped sets and kept its butterflies busy");
    check(mqr_rot[0] > 0 && mqr_rot[1] > 0 && mqr_rot[2] > 0 && mqr_rot[3] > 0, "quarter-rate R4MDC all rotations");
    check(st_r2mdc > 0 && st_r2sdf > 0 && st_r4sdf > 0 && st_r4mdc > 0, "every pipeline stalled");
    check(mdc_straight > 0 && mdc_cross > 0, "R2MDC commutator both ways");
    check(sdf_fill > 0 && sdf_compute > 0, "R2SDF both element modes");
    check(r4sdf_ph[0] > 0 && r4sdf_ph[1] > 0 && r4sdf_ph[2] > 0 && r4sdf_ph[3] > 0, "R4SDF all phases");
    check(r4mdc_rot[0] > 0 && r4mdc_rot[1] > 0 && r4mdc_rot[2] > 0 && r4mdc_rot[3] > 0, "R4MDC all rotations");
    check(buf_swaps == NB - 1, "buffer swaps");
    check(dit_ops > 0, "DIT butterfly used");
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
