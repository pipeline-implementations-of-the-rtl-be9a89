// delay_dpram: delay buffer of L samples kept in a dual-port RAM used as a cyclic buffer.
//
// Instead of moving the data, a pointer register moves: the RAM has L+1 words, the write
// port writes d at the pointer and the read port reads the word after it (pointer + 1,
// modulo L+1), which holds the sample written L enabled edges ago. The pointer is then
// incremented. So L+1 locations store L items and only one word is written per sample.
// The RAM is an array with one write port and one asynchronous read port (this read
// timing is this design's choice; a RAM with registered read data would need the read
// address one step further ahead). Its words are not reset, as in a real RAM; the pointer is.
// Interface and timing as delay_shiftreg: q shows the d of L enabled edges ago. L >= 1.
module delay_dpram
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
  localparam int AW = $clog2(DEPTH);

  cplx_t mem [DEPTH];
  logic [AW-1:0] wr_addr, rd_addr;

  // the "+1" of the pointer loop doubles as the read address
  assign rd_addr = (wr_addr == AW'(DEPTH - 1)) ? '0 : wr_addr + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_addr <= '0;
    else if (en) wr_addr <= rd_addr;
  end

  always_ff @(posedge clk) begin
    if (en) mem[wr_addr] <= d;
  end

  assign q = mem[rd_addr];

endmodule
