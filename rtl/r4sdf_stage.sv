// r4sdf_stage: one element of a radix-4 single-path delay feedback (R4SDF) pipeline.
//
// Three delay lines of L samples each are fed back around a radix-4 butterfly. The element
// goes through four phases of L samples, q = bits [log2(L)+1 : log2(L)] of the sample
// counter cnt:
//   q = 0, 1, 2: the incoming sample enters delay A, A feeds B and B feeds C (through the
//                butterfly's switches), and the sample leaving C - an output of the last
//                butterfly operation - goes on;
//   q = 3:       C, B and A hold x[n], x[n+L], x[n+2L] and the input brings x[n+3L]; the
//                butterfly computes y0..y3, y0 goes on at once and y1, y2, y3 are written
//                into C, B, A, to leave during the next phases 0, 1, 2.
// Outputs leaving in phase q are y_{(q+1) mod 4}; the multiplier after the element scales
// y_m[n] by W_{4L}^{m*n} = W_N^{m*n*N/(4L)} with n = cnt mod L. It works in three phases
// out of four (75% use); the last element (L = 1) needs no multiplier.
// USE_R22 selects the radix-2^2 butterfly instead of the direct radix-4 one (same result).
// Latency 3L enabled cycles; combinational from x to y. The phase schedule and the chaining
// of the three delays through the butterfly are this design's reading of the element.
module r4sdf_stage
  import fft_pkg::*;
#(
  parameter int          N          = 16,
  parameter int          L          = 4,  // a power of 4, N/4 or smaller
  parameter delay_impl_e DELAY_IMPL = DL_2SPRAM,
  parameter bit          USE_R22    = 1'b1,
  parameter int          CW         = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [CW-1:0] cnt,
  input  cplx_t         x,
  output cplx_t         y
);

  localparam int LB = $clog2(L);

  logic [1:0]  q;
  cplx_t       da_q, db_q, dc_q, da_d, db_d, dc_d, y_pre;
  cplx_t [3:0] bx, by;

  assign q = cnt[LB+1:LB];

  delay_line #(.L(L), .IMPL(DELAY_IMPL)) u_da (.clk, .rst_n, .en, .d(da_d), .q(da_q));
  delay_line #(.L(L), .IMPL(DELAY_IMPL)) u_db (.clk, .rst_n, .en, .d(db_d), .q(db_q));
  delay_line #(.L(L), .IMPL(DELAY_IMPL)) u_dc (.clk, .rst_n, .en, .d(dc_d), .q(dc_q));

  assign bx = {x, da_q, db_q, dc_q};  // x[n+3L], x[n+2L], x[n+L], x[n]

  if (USE_R22) begin : g_r22
    r22_butterfly u_bf (.x(bx), .y(by));
  end else begin : g_r4
    r4_butterfly u_bf (.x(bx), .y(by));
  end

  always_comb begin
    if (q == 2'd3) begin
      y_pre = by[0];
      dc_d  = by[1];
      db_d  = by[2];
      da_d  = by[3];
    end else begin
      y_pre = dc_q;
      dc_d  = db_q;
      db_d  = da_q;
      da_d  = x;
    end
  end

  if (L == 1) begin : g_no_twiddle
    assign y = y_pre;
  end else begin : g_twiddle
    logic [1:0]    m;
    logic [CW-1:0] k;
    assign m = q + 2'd1;
    assign k = CW'(int'(m) * (int'(cnt) % L) * (N / (4 * L)));
    twiddle_mult #(.N(N), .KW(CW)) u_mult (.x(y_pre), .k, .y);
  end

endmodule
