// r2mdc_pingpong_fft: R2MDC FFT pipeline with a duplicated (ping-pong) input buffer, so that
// every butterfly is busy all the time and runs at half the sample rate. N points (a power
// of 2, at least 4; default 8), decimation in frequency.
//
// Input side, at the sample rate: the input commutator writes each block into one of two
// buffer sets; a set is two memories of N/2 words, one for the first half of the block and
// one for the second half (four N/2 buffers in all, 4D each for 8 points). While one set
// fills, the first butterfly reads x[n] and x[n+N/2] of the previous block from the other
// set, one pair per two sample periods; after each block the sets swap roles.
// Butterfly side, at half the sample rate: the first butterfly and the stages after it are
// those of the R2MDC pipeline (lower path delay D, commutator, upper path delay D, with
// D = N/4, ..., 1), all advanced once every two input samples. Since blocks now arrive at
// the butterflies without gaps, each butterfly computes in every one of its cycles (100%
// utilisation, against 50% for the plain R2MDC).
//
// The half rate is realised with a clock enable in the single clock domain: out_valid is
// high on every second enabled cycle and carries a pair X[bitrev(2k)]/N, X[bitrev(2k+1)]/N
// (bins on out_bin), k = 0..N/2-1 without gaps between blocks. The first pair of a block
// leaves 2N-1 enabled cycles after the block's first sample. in_valid is the enable (stall).
// PIPE = 1 adds a register after every butterfly, clocked at the half rate; stage s then
// uses the pair index n - s and the latency grows by 2*log2 N samples (log2 N half-rate cycles).
// The first sample after reset is sample 0 of a block. The buffer organisation follows the
// ping-pong R2MDC; the clock-enable realisation of the half rate is this design's choice.
module r2mdc_pingpong_fft
  import fft_pkg::*;
#(
  parameter int          N          = 8,
  parameter delay_impl_e DELAY_IMPL = DL_SHIFTREG,
  parameter bit          PIPE       = 1'b0  // register the outputs of every butterfly
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  cplx_t                      in_data,
  output logic                       out_valid,
  output cplx_t [1:0]                out_data,
  output logic  [1:0][$clog2(N)-1:0] out_bin
);

  localparam int S  = $clog2(N);
  localparam int CW = S;       // input sample counter width
  localparam int HW = S - 1;   // half-rate pair counter width
  localparam int LAT = PIPE ? S : 0;  // pipeline registers on the way to the output

  logic          en, en2;
  logic [CW-1:0] cnt;        // input sample position in its block
  logic          wset;       // buffer set being written
  logic          full;       // the other set holds a complete block
  logic          primed;     // the first block has reached the output
  logic [HW-1:0] n;          // pair being read: cnt / 2

  assign en  = in_valid;
  assign en2 = en && cnt[0];  // one half-rate cycle per two input samples
  assign n   = cnt[CW-1:1];

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
      if (en2 && full && n == HW'(N / 2 - 2)) primed <= 1'b1;
    end
  end

  // four input buffers: [set][half]
  cplx_t buf00 [N/2];
  cplx_t buf01 [N/2];
  cplx_t buf10 [N/2];
  cplx_t buf11 [N/2];
  logic [HW-1:0] waddr;
  logic          whalf;
  assign waddr = cnt[HW-1:0];
  assign whalf = cnt[CW-1];

  always_ff @(posedge clk) begin
    if (en) begin
      case ({wset, whalf})
        2'b00:   buf00[waddr] <= in_data;
        2'b01:   buf01[waddr] <= in_data;
        2'b10:   buf10[waddr] <= in_data;
        default: buf11[waddr] <= in_data;
      endcase
    end
  end

  cplx_t xa, xb;  // x[n] and x[n+N/2] of the block being transformed
  assign xa = wset ? buf00[n] : buf10[n];
  assign xb = wset ? buf01[n] : buf11[n];

  // half-rate part: the R2MDC butterflies, commutators and delays
  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int D = N >> (s + 1);
    cplx_t up, lo;  // butterfly outputs of this stage
    cplx_t uq, lq;  // stage outputs: up and lo, registered when PIPE is set
    cplx_t a, b;    // butterfly inputs
    logic [HW-1:0] ns;  // pair index of the data in this stage (s half-rate cycles late if PIPE)
    assign ns = n - HW'(PIPE ? s : 0);
    if (PIPE) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          uq <= '0;
          lq <= '0;
        end else if (en2) begin
          uq <= up;
          lq <= lo;
        end
      end
    end else begin : g_wire
      assign uq = up;
      assign lq = lo;
    end
    if (s == 0) begin : g_first
      assign a = xa;
      assign b = xb;
    end else begin : g_next
      localparam int DB = $clog2(D);
      cplx_t lo_d, top;
      logic  swap;
      assign swap = ns[DB];
      delay_line #(.L(D), .IMPL(DELAY_IMPL)) u_dlo (
        .clk, .rst_n, .en(en2), .d(g_stage[s-1].lq), .q(lo_d)
      );
      commutator2 u_comm (.swap, .a(g_stage[s-1].uq), .b(lo_d), .top, .bottom(b));
      delay_line #(.L(D), .IMPL(DELAY_IMPL)) u_dtop (.clk, .rst_n, .en(en2), .d(top), .q(a));
    end
    if (D == 1) begin : g_last
      bfly2 u_bf (.a, .b, .s(up), .d(lo));
    end else begin : g_mid
      logic [CW-1:0] k;
      assign k = CW'((int'(ns) % D) << s);
      r2_dif_butterfly #(.N(N)) u_bf (.a, .b, .k, .y0(up), .y1(lo));
    end
  end

  // output flags: as without pipeline registers, then delayed by LAT half-rate cycles
  logic [HW-1:0] opos;
  logic          vout;
  assign opos = n + 1'b1 - HW'(LAT);
  if (LAT > 0) begin : g_vdly
    logic [LAT-1:0] vs;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)   vs <= '0;
      else if (en2) vs <= LAT'({vs, primed});
    end
    assign vout = vs[LAT-1];
  end else begin : g_vnow
    assign vout = primed;
  end
  assign out_valid  = en2 && vout;
  assign out_data   = {g_stage[S-1].lq, g_stage[S-1].uq};
  assign out_bin[0] = CW'(bit_reverse(2 * int'(opos), S));
  assign out_bin[1] = CW'(bit_reverse(2 * int'(opos) + 1, S));

endmodule
