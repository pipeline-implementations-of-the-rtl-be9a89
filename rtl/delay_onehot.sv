// delay_onehot: delay buffer of L samples in a RAM whose address decoders are replaced by
// single-bit shift registers.
//
// The buffer is the cyclic buffer of delay_dpram (L+1 words, written at one position and
// read at the next), but the positions are not binary addresses: a ring of L+1 flip-flops
// holds a single 1 that selects the word line to write, and the word after it is read.
// Advancing the ring moves the 1 by one place, so only two flip-flops toggle per sample
// and no decoder is needed. The read side is an AND-OR selection by the rotated ring.
// Interface and timing as delay_shiftreg: q shows the d of L enabled edges ago. L >= 1.
// The ring resets to position 0; the stored words are not reset.
module delay_onehot
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

  localparam int DEPTH = L + 1;

  logic  [DEPTH-1:0] wsel, rsel;  // one-hot word lines
  cplx_t [DEPTH-1:0] mem;

  // read the word after the written one: the ring rotated by one place
  assign rsel = {wsel[DEPTH-2:0], wsel[DEPTH-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wsel <= DEPTH'(1);
    else if (en) wsel <= rsel;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++) if (en && wsel[i]) mem[i] <= d;
  end

  always_comb begin
    q = '0;
    for (int i = 0; i < DEPTH; i++) if (rsel[i]) q = q | mem[i];
  end

  // exactly one word line is active outside reset. Using rst_n here as well as in the
  // asynchronous reset draws a lint note (SYNCASYNCNET); it concerns this check only.
  always_ff @(posedge clk) begin
    if (rst_n)
      a_onehot : assert (wsel != 0 && (wsel & (wsel - 1'b1)) == 0)
        else $error("delay_onehot: word-line ring is not one-hot");
  end

endmodule
