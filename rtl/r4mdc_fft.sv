// r4mdc_fft: radix-4 multi-path delay commutator (R4MDC) FFT pipeline, decimation in
// frequency, N points (N a power of 4, default 16).
//
// Stage 0: the input commutator hands quarter j of a block to path j (j = 0..3), delayed by
// (3-j)*N/4 samples (12D, 8D, 4D and none for 16 points), so during the last quarter the
// radix-4 butterfly sees x[n], x[n+N/4], x[n+N/2], x[n+3N/4] together. Its outputs y1..y3 are
// multiplied by W_N^n, W_N^2n, W_N^3n and leave on four paths at once.
// Stage s >= 1 with L = N/4^(s+1): path p is delayed by p*L (1D, 2D, 3D), a 4x4 commutator
// sends path p to lane ((cnt/L) - p) mod 4, and lane j is delayed by (3-j)*L (3D, 2D, 1D), so
// that each butterfly operation again sees four samples L apart of the same sub-transform.
// Twiddles of stage s are W_{4L}^{m*e}, e = cnt mod L; the last stage has none.
// The pipeline runs at the sample rate and every butterfly computes during a quarter of the
// time; the delays total 5N/2 - 4 words (high memory overhead).
//
// Output: four samples at once, during N/4 of every N cycles. Output group g of a block
// (g = 0..N/4-1) carries on out_data[j] bin digitrev4(4g + j), given on out_bin; group 0
// leaves N-1 enabled cycles after the block's first sample entered. in_valid is a clock
// enable (stall); out_valid marks the groups. The first sample after reset is sample 0.
// The commutator schedule is this design's derivation; widths, scaling and flags are its own.
module r4mdc_fft
  import fft_pkg::*;
#(
  parameter int          N          = 16,
  parameter delay_impl_e DELAY_IMPL = DL_ONEHOT,
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

  localparam int CW = $clog2(N);
  localparam int S  = CW / 2;

  logic          en;
  logic [CW-1:0] cnt;
  logic          primed;
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

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int L  = N >> (2 * (s + 1));
    localparam int LB = $clog2(L);

    cplx_t [3:0] lane;    // commutator outputs
    cplx_t [3:0] bx, by;  // butterfly inputs and outputs
    cplx_t [3:0] po;      // the four outputs of this stage (after twiddles)

    if (s == 0) begin : g_in
      // input commutator: quarter j of the block is kept on lane j
      for (genvar j = 0; j < 4; j++) begin : g_lane
        assign lane[j] = in_data;
      end
    end else begin : g_comm
      cplx_t [3:0] pd;  // path p delayed by p*L
      assign pd[0] = g_stage[s-1].po[0];
      for (genvar p = 1; p < 4; p++) begin : g_pre
        delay_line #(.L(p * L), .IMPL(DELAY_IMPL)) u_pre (
          .clk, .rst_n, .en, .d(g_stage[s-1].po[p]), .q(pd[p])
        );
      end
      logic [1:0] rot;
      assign rot = cnt[LB+1:LB];
      for (genvar j = 0; j < 4; j++) begin : g_lane
        logic [1:0] src;
        assign src     = rot - 2'(j);
        assign lane[j] = pd[src];
      end
    end

    // lane j delayed by (3-j)*L
    for (genvar j = 0; j < 3; j++) begin : g_post
      delay_line #(.L((3 - j) * L), .IMPL(DELAY_IMPL)) u_post (
        .clk, .rst_n, .en, .d(lane[j]), .q(bx[j])
      );
    end
    assign bx[3] = lane[3];

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
        assign k = CW'(m * (int'(cnt) % L) * (N / (4 * L)));
        twiddle_mult #(.N(N), .KW(CW)) u_mult (.x(by[m]), .k, .y(po[m]));
      end
    end
  end

  logic [CW-1:0] opos;
  assign opos      = cnt + 1'b1;
  assign out_valid = en && primed && (opos < CW'(N / 4));
  assign out_data  = g_stage[S-1].po;
  for (genvar j = 0; j < 4; j++) begin : g_bin
    assign out_bin[j] = CW'(digit_reverse4(4 * int'(opos) + j, S));
  end

endmodule
