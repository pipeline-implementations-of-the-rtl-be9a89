// delay_line: delay buffer of L samples with a choice of implementation.
//
// IMPL selects one of the four buffer structures (shift register, dual-port RAM cyclic
// buffer, two single-port RAMs, one-hot addressed RAM); all have the same interface and
// the same timing: q shows the d of L enabled clk edges ago. The pipelines build their
// delays from this module so that the buffer structure is a parameter of each pipeline.
module delay_line
  import fft_pkg::*;
#(
  parameter int          L    = 4,
  parameter delay_impl_e IMPL = DL_SHIFTREG
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  cplx_t d,
  output cplx_t q
);

  if (IMPL == DL_DPRAM) begin : g_dpram
    delay_dpram #(.L(L)) u_buf (.clk, .rst_n, .en, .d, .q);
  end else if (IMPL == DL_2SPRAM) begin : g_2spram
    delay_2spram #(.L(L)) u_buf (.clk, .rst_n, .en, .d, .q);
  end else if (IMPL == DL_ONEHOT) begin : g_onehot
    delay_onehot #(.L(L)) u_buf (.clk, .rst_n, .en, .d, .q);
  end else begin : g_shiftreg
    delay_shiftreg #(.L(L)) u_buf (.clk, .rst_n, .en, .d, .q);
  end

endmodule
