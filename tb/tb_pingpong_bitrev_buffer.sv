// tb_pingpong_bitrev_buffer: self-checking testbench of pingpong_bitrev_buffer (N = 8).
//
// Writes NB random blocks with random stalls and checks that, while block b is being
// written, the buffer returns block b-1 in bit-reversed order (x[0], x[4], x[2], x[6], ...
// for N = 8), that out_index names the sample, that out_valid is low during the first block,
// and that the two memories swap roles at every block boundary.
module tb_pingpong_bitrev_buffer;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;

  localparam int N  = 8;
  localparam int NB = 6;

  logic clk = 0, rst_n = 0, in_valid = 0;
  cplx_t in_data = '0;
  logic out_valid, out_bank;
  cplx_t out_data;
  logic [2:0] out_index;

  pingpong_bitrev_buffer #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, swaps = 0;
  cplx_t blocks [NB][N];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int brev3(int v);
    return ((v & 1) << 2) | (v & 2) | ((v >> 2) & 1);
  endfunction

  initial begin
    logic last_bank;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < N; i++) blocks[b][i] = rand_sample(20000);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    last_bank = 0;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        while ($urandom_range(4) == 0) begin
          in_valid = 0;
          #1 check(!out_valid, "no output during a stall");
          @(negedge clk);
        end
        in_valid = 1;
        in_data  = blocks[b][i];
        #1;
        if (out_bank != last_bank) swaps++;
        last_bank = out_bank;
        check(out_bank == 1'(b % 2), $sformatf("block %0d written into memory %0d", b, out_bank));
        if (b == 0) check(!out_valid, "nothing valid during the first block");
        else begin
          check(out_valid, "valid after the first block");
          check(int'(out_index) == brev3(i), $sformatf("index %0d at position %0d", out_index, i));
          check(out_data == blocks[b-1][brev3(i)], $sformatf("data of block %0d position %0d", b - 1, i));
        end
      end
    @(negedge clk) in_valid = 0;
    check(swaps == NB - 1, $sformatf("memory swaps %0d", swaps));
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
