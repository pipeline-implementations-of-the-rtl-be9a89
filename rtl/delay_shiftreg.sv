// delay_shiftreg: delay buffer of L samples built as a chain of L registers.
//
// The plain way to build a delay buffer: every enabled clock edge shifts all L words one
// place. It is large (one flip-flop per stored bit) and every word toggles on every shift,
// which is why the RAM-based buffers exist; it is still the natural choice for short delays.
// Interface: d is taken on each rising clk edge with en high; q shows the d of L enabled
// edges ago (q is the last register, so it changes right after the edge). rst_n clears the
// chain (reset is this design's choice). L must be at least 1.
module delay_shiftreg
  import fft_pkg::*;
#(
  parameter int L = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  cplx_t d,
  output cplx_t q
);

  cplx_t [L-1:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r <= '0;
    else if (en) begin
      r[0] <= d;
      for (int i = 1; i < L; i++) r[i] <= r[i-1];
    end
  end

  assign q = r[L-1];

endmodule
