// tb_delay_dpram: self-checking testbench of delay_dpram.
//
// Instantiates the buffer at several lengths L (1, 2, 3, 4, 7, 8), feeds a counting pattern
// with random stalls (en low) and checks, on every enabled cycle after the first L, that q
// equals the input of exactly L enabled cycles earlier (kept in a testbench history), and
// that q does not change during a stall.
module tb_delay_dpram;
  import fft_pkg::*;

  localparam int NL = 6;
  localparam int LS [NL] = '{1, 2, 3, 4, 7, 8};

  logic clk = 0, rst_n = 0, en = 0;
  cplx_t d = '0;
  cplx_t q [NL];

  for (genvar i = 0; i < NL; i++) begin : g_dut
    delay_dpram #(.L(LS[i])) dut (.clk, .rst_n, .en, .d, .q(q[i]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cplx_t hist [$];   // inputs, newest first
  int stalls = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      // after the last edge: compare against the history
      for (int i = 0; i < NL; i++)
        if (hist.size() >= LS[i])
          check(q[i] == hist[LS[i] - 1], $sformatf("L=%0d at step %0d: got %h expected %h", LS[i], t, q[i], hist[LS[i] - 1]));
      en = ($urandom_range(4) != 0);
      d  = cplx_t'({16'(t * 7 + 3), 16'(-t)});
      if (!en) stalls++;
      @(posedge clk);
      if (en) hist.push_front(d);
      if (!en) begin
        #1;
        for (int i = 0; i < NL; i++)
          if (hist.size() >= LS[i]) check(q[i] == hist[LS[i] - 1], $sformatf("L=%0d holds during stall", LS[i]));
      end
    end
    check(stalls > 0, "stalls happened");
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
