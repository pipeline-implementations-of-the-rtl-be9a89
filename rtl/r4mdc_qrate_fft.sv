// r4mdc_qrate_fft: R4MDC FFT pipeline with a duplicated input buffer, so that every
// butterfly and multiplier is busy all the time and runs at a quarter of the sample rate.
// N points (a power of 4, at least 16; default 16), decimation in frequency.
//
// Input side, at the sample rate: each block is written into one of two buffer sets; a set
// is four memories of N/4 words, one per quarter of the block. While one set fills, the
// first radix-4 butterfly reads x[n], x[n+N/4], x[n+N/2], x[n+3N/4] of the previous block
// from the other set, one quadruple per four sample periods; after each block the sets swap
// roles. This replaces the (3-j)*N/4 input delays of r4mdc_fft.
// Butterfly side, at a quarter of the sample rate: the stages are those of r4mdc_fft (path p
// delayed by p*L, 4x4 commutator sending path p to lane ((n/L) - p) mod 4, lane j delayed
// by (3-j)*L, radix-4 butterfly, twiddles W_N^(m*(n mod L)*N/(4L)) on outputs 1..3), with
// the quadruple counter n = cnt/4 in place of the sample counter, all advanced once every
// four input samples. Blocks arrive at the butterflies without gaps, so each butterfly and
// each of the three multipliers of a stage computes in every one of its cycles.
//
// The quarter rate is a clock enable in the single clock domain: out_valid is high on every
// fourth enabled cycle and carries four bins, X[digitrev4(4g+j)]/N on out_data[j] (bins on
// out_bin), g = 0..N/4-1 without gaps between blocks. Group 0 of a block leaves 2N-1
// enabled cycles after the block's first sample. in_valid is the enable (stall); the first
// sample after reset is sample 0 of a block. Delay words: 2N of input buffer plus N-4 in the
// later stages (44 for 16 points). The duplicated input buffer follows the ping-pong R2MDC;
// its radix-4 form and the clock-enable realisation of the quarter rate are this design's.
module r4mdc_qrate_fft
  import fft_pkg::*;
#(
  parameter int          N          = 16,
  parameter delay_impl_e DELAY_IMPL = DL_DPRAM,
  parameter bit          USE_R22    = 1'b0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  cplx_t                      in_data,
  output logic                       out_valid,
  output cplx_t [3:0]                out_data,
  output logic  [3:0][$clog2(N)-1:0] out_bin
);

  localparam int CW = $clog2(N);  // input sample counter width
  localparam int S  = CW / 2;     // radix-4 stages
  localparam int QW = CW - 2;     // quarter-rate counter width
  localparam int Q  = N / 4;      // words per buffer memory

  logic          en, en4;
  logic [CW-1:0] cnt;     // input sample position in its block
  logic          wset;    // buffer set being written
  logic          full;    // the other set holds a complete block
  logic          primed;  // the first block has reached the output
  logic [QW-1:0] n;       // quadruple being read: cnt / 4

  assign en  = in_valid;
  assign en4 = en && (cnt[1:0] == 2'd3);  // one quarter-rate cycle per four input samples
  assign n   = cnt[CW-1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      wset   <= 1'b0;
      full   <= 1'b0;
      primed <= 1'b0;
    end else if (en) begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(N - 1)) begin
        wset <= ~wset;
        full <= 1'b1;
      end
      if (en4 && full && n == QW'(Q - 2)) primed <= 1'b1;
    end
  end

  // input buffer: memory {set, quarter}, N/4 words each
  cplx_t         mem [8][Q];
  logic [2:0]    wmem;
  logic [QW-1:0] waddr;
  assign wmem  = {wset, cnt[CW-1:CW-2]};
  assign waddr = cnt[QW-1:0];

  always_ff @(posedge clk) begin
    if (en) mem[wmem][waddr] <= in_data;
  end

  // quarter-rate part: the R4MDC butterflies, commutators, delays and twiddles
  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int L  = N >> (2 * (s + 1));
    localparam int LB = $clog2(L);

    cplx_t [3:0] bx, by;  // butterfly inputs and outputs
    cplx_t [3:0] po;      // the four outputs of this stage (after twiddles)

    if (s == 0) begin : g_in
      // x[n + j*N/4] of the block in the set not being written
      for (genvar j = 0; j < 4; j++) begin : g_lane
        assign bx[j] = mem[{~wset, 2'(j)}][n];
      end
    end else begin : g_comm
      cplx_t [3:0] pd;    // path p delayed by p*L
      cplx_t [3:0] lane;  // commutator outputs
      assign pd[0] = g_stage[s-1].po[0];
      for (genvar p = 1; p < 4; p++) begin : g_pre
        delay_line #(.L(p * L), .IMPL(DELAY_IMPL)) u_pre (
          .clk, .rst_n, .en(en4), .d(g_stage[s-1].po[p]), .q(pd[p])
        );
      end
      logic [1:0] rot;
      assign rot = n[LB+1:LB];
      for (genvar j = 0; j < 4; j++) begin : g_lane
        logic [1:0] src;
        assign src     = rot - 2'(j);
        assign lane[j] = pd[src];
      end
      // lane j delayed by (3-j)*L
      for (genvar j = 0; j < 3; j++) begin : g_post
        delay_line #(.L((3 - j) * L), .IMPL(DELAY_IMPL)) u_post (
          .clk, .rst_n, .en(en4), .d(lane[j]), .q(bx[j])
        );
      end
      assign bx[3] = lane[3];
    end

    if (USE_R22) begin : g_r22
      r22_butterfly u_bf (.x(bx), .y(by));
    end else begin : g_r4
      r4_butterfly u_bf (.x(bx), .y(by));
    end

    assign po[0] = by[0];
    if (L == 1) begin : g_no_twiddle
      for (genvar m = 1; m < 4; m++) begin : g_m
        assign po[m] = by[m];
      end
    end else begin : g_twiddle
      for (genvar m = 1; m < 4; m++) begin : g_m
        logic [CW-1:0] k;
        assign k = CW'(m * (int'(n) % L) * (N / (4 * L)));
        twiddle_mult #(.N(N), .KW(CW)) u_mult (.x(by[m]), .k, .y(po[m]));
      end
    end
  end

  logic [QW-1:0] opos;
  assign opos      = n + 1'b1;
  assign out_valid = en4 && primed;
  assign out_data  = g_stage[S-1].po;
  for (genvar j = 0; j < 4; j++) begin : g_bin
    assign out_bin[j] = CW'(digit_reverse4(4 * int'(opos) + j, S));
  end

endmodule
