// r2mdc_fft: radix-2 multi-path delay commutator (R2MDC) FFT pipeline, decimation in
// frequency, N points (N a power of 2, default 8).
//
// One complex sample enters per enabled clock; blocks of N samples follow each other without
// gaps. Stage 0: the first half of a block goes into an N/2 delay on the upper path while the
// second half goes straight to the lower path, so the first butterfly sees x[n] and x[n+N/2]
// together and computes (x[n]+x[n+N/2])/2 and ((x[n]-x[n+N/2])/2)*W_N^n. Stage s >= 1 uses
// D = N/2^(s+1): the lower path of the previous butterfly is delayed by D, a commutator
// (straight / crisscross, toggling every D samples) regroups the two paths, and the new upper
// path is delayed by D again so that the next butterfly sees samples D apart. Every stage
// thus keeps two paths and uses 2D delay words; the total is 3N/2 - 2 words. The last
// butterfly needs no multiplier. Each butterfly works half of the time (50% utilisation).
//
// Output: two samples at once, during N/2 of every N cycles. The k-th output pair of a block
// (k = 0..N/2-1) is X[bitrev(2k)]/N on out_data[0] and X[bitrev(2k+1)]/N on out_data[1];
// out_bin gives the bin indices. The first pair of a block leaves N-1 enabled cycles after
// the block's first sample entered; the datapath has no registers besides the delays.
// PIPE = 1 adds a register after every butterfly (both outputs). Since no path feeds back,
// this only shifts the data of stage s by s cycles: its commutator and twiddles then use the
// block position cnt - s, and the output flags are delayed to match (latency N-1+log2 N).
// in_valid is a clock enable: while it is low the whole pipeline holds (a stall), and
// out_valid is low. The first sample after reset is sample 0 of a block.
// Follows the 8-point R2MDC structure (commutators, DIF butterflies, 4D/2D/2D/1D/1D delays);
// scaling, word widths, the enable-based stall, the output flags and the placement of the
// optional pipeline registers are this design's own.
module r2mdc_fft
  import fft_pkg::*;
#(
  parameter int          N          = 8,
  parameter delay_impl_e DELAY_IMPL = DL_SHIFTREG,
  parameter bit          PIPE       = 1'b0  // register the outputs of every butterfly
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  cplx_t                     in_data,
  output logic                      out_valid,
  output cplx_t [1:0]               out_data,
  output logic  [1:0][$clog2(N)-1:0] out_bin
);

  localparam int S   = $clog2(N);  // number of radix-2 stages
  localparam int CW  = S;
  localparam int LAT = PIPE ? S : 0;  // pipeline registers on the way to the output

  logic          en;
  logic [CW-1:0] cnt;      // position of the current input sample in its block
  logic          primed;   // a whole block has reached the last stage
  assign en = in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      primed <= 1'b0;
    end else if (en) begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(N - 2)) primed <= 1'b1;
    end
  end

  cplx_t up [S];   // upper butterfly output of each stage
  cplx_t lo [S];   // lower butterfly output of each stage

  // stage outputs: the butterfly outputs, registered when PIPE is set
  for (genvar s = 0; s < S; s++) begin : g_out
    cplx_t uq, lq;
    if (PIPE) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          uq <= '0;
          lq <= '0;
        end else if (en) begin
          uq <= up[s];
          lq <= lo[s];
        end
      end
    end else begin : g_wire
      assign uq = up[s];
      assign lq = lo[s];
    end
  end

  // stage 0: input commutator and N/2 delay on the upper path
  cplx_t x_first_half;
  delay_line #(.L(N / 2), .IMPL(DELAY_IMPL)) u_d0 (
    .clk, .rst_n, .en, .d(in_data), .q(x_first_half)
  );

  if (S == 1) begin : g_s0_last
    bfly2 u_bf0 (.a(x_first_half), .b(in_data), .s(up[0]), .d(lo[0]));
  end else begin : g_s0
    r2_dif_butterfly #(.N(N)) u_bf0 (
      .a(x_first_half), .b(in_data), .k(CW'(int'(cnt) % (N / 2))), .y0(up[0]), .y1(lo[0])
    );
  end

  for (genvar s = 1; s < S; s++) begin : g_stage
    localparam int D  = N >> (s + 1);  // distance of the pairs in this stage
    localparam int DB = $clog2(D);     // counter bit that drives the commutator

    cplx_t lo_d, top, bottom, top_d;
    logic  [CW-1:0] cs;  // block position of the data in this stage (s cycles late if PIPE)
    logic  swap;
    assign cs   = cnt - CW'(PIPE ? s : 0);
    assign swap = cs[DB];

    delay_line #(.L(D), .IMPL(DELAY_IMPL)) u_dlo (
      .clk, .rst_n, .en, .d(g_out[s-1].lq), .q(lo_d)
    );
    commutator2 u_comm (.swap, .a(g_out[s-1].uq), .b(lo_d), .top, .bottom);
    delay_line #(.L(D), .IMPL(DELAY_IMPL)) u_dtop (.clk, .rst_n, .en, .d(top), .q(top_d));

    if (D == 1) begin : g_last
      bfly2 u_bf (.a(top_d), .b(bottom), .s(up[s]), .d(lo[s]));
    end else begin : g_mid
      logic [CW-1:0] k;
      assign k = CW'((int'(cs) % D) << s);
      r2_dif_butterfly #(.N(N)) u_bf (.a(top_d), .b(bottom), .k, .y0(up[s]), .y1(lo[s]));
    end
  end

  // output flags: as without pipeline registers, then delayed by LAT enabled cycles
  logic [CW-1:0] opos;  // index of the output pair within its block
  logic          v0, vout;
  assign v0   = primed && ((cnt + 1'b1) < CW'(N / 2));
  assign opos = cnt + 1'b1 - CW'(LAT);
  if (LAT > 0) begin : g_vdly
    logic [LAT-1:0] vs;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  vs <= '0;
      else if (en) vs <= LAT'({vs, v0});
    end
    assign vout = vs[LAT-1];
  end else begin : g_vnow
    assign vout = v0;
  end
  assign out_valid = en && vout;
  assign out_data  = {g_out[S-1].lq, g_out[S-1].uq};
  assign out_bin[0] = CW'(bit_reverse(2 * int'(opos), S));
  assign out_bin[1] = CW'(bit_reverse(2 * int'(opos) + 1, S));

endmodule
