// delay_2spram: delay buffer of L samples built from two single-port RAMs.
//
// Samples are written alternately into RAM1 (even count) and RAM2 (odd count), and in each
// cycle the RAM that is not written is read, so each RAM does one access per cycle and a
// single port is enough; two single-port RAMs are cheaper than one dual-port RAM. A counter
// k runs modulo L (2 x L/2 words); its LSB is the write enable that picks the RAM written,
// its upper bits address RAM2 and the upper bits of k+1 address RAM1. With that addressing
// the RAM being read always returns the sample written L-1 counts earlier, and an output
// register after the read multiplexer adds the last cycle of delay. The exact addressing
// and the asynchronous RAM read are this design's choices.
// For odd L a single register precedes a buffer of L-1; L = 1 is a single register.
// Interface and timing as delay_shiftreg: q shows the d of L enabled edges ago. L >= 1.
module delay_2spram
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

  localparam int LE = (L / 2) * 2;  // even part handled by the two RAMs

  cplx_t d_even;  // input of the RAM part

  if (L % 2 == 1) begin : g_pre
    cplx_t r;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) r <= '0;
      else if (en) r <= d;
    end
    assign d_even = r;
  end else begin : g_nopre
    assign d_even = d;
  end

  if (LE == 0) begin : g_reg_only
    assign q = d_even;
  end else begin : g_rams
    localparam int M = LE / 2;  // words per RAM
    localparam int KW = $clog2(LE) > 0 ? $clog2(LE) : 1;
    localparam int AW = $clog2(M) > 0 ? $clog2(M) : 1;

    cplx_t ram1 [M];
    cplx_t ram2 [M];
    logic [KW-1:0] k;
    logic [KW-1:0] k_next;
    logic [AW-1:0] addr1, addr2;
    logic          sel;  // 0: RAM1 written, RAM2 read; 1: the other way round
    cplx_t         rd, q_r;

    assign k_next = (k == KW'(LE - 1)) ? '0 : k + 1'b1;
    assign sel    = k[0];
    assign addr2  = AW'(k >> 1);
    // upper bits of k+1, taken modulo M (k+1 = LE wraps to address 0)
    assign addr1  = (k == KW'(LE - 1)) ? '0 : AW'((k + 1'b1) >> 1);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) k <= '0;
      else if (en) k <= k_next;
    end

    always_ff @(posedge clk) begin
      if (en && !sel) ram1[addr1] <= d_even;
      if (en && sel) ram2[addr2] <= d_even;
    end

    assign rd = sel ? ram1[addr1] : ram2[addr2];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) q_r <= '0;
      else if (en) q_r <= rd;
    end

    assign q = q_r;
  end

endmodule
