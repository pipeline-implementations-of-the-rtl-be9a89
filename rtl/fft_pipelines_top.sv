// fft_pipelines_top: the FFT pipeline structures side by side, each with its own ports.
//
// The four streaming FFT pipelines are independent designs sharing only the clock and
// reset; each also shows one way of building its delay buffers:
//   r2mdc : radix-2 multi-path delay commutator, 8 points, delays as shift registers;
//   r2mpp : the same with a ping-pong input buffer, butterflies at half the sample rate;
//   r2sdf : radix-2 single-path delay feedback, 8 points, delays in dual-port RAM
//           cyclic buffers;
//   r4sdf : radix-4 single-path delay feedback, 16 points, radix-2^2 butterflies, delays
//           in pairs of single-port RAMs;
//   r4mdc : radix-4 multi-path delay commutator, 16 points, direct radix-4 butterflies,
//           delays in one-hot addressed RAMs;
//   r4mqr : the same with a duplicated input buffer, butterflies and multipliers busy all
//           the time at a quarter of the sample rate, delays in dual-port RAM.
// Next to them stand the ping-pong input buffer with bit-reversed read-out that a block
// (decimation-in-time) FFT needs, and a stand-alone radix-2 decimation-in-time butterfly.
// Each pipeline takes one complex sample per clock while its in_valid is high (low stalls
// it) and reports its results with out_valid and the frequency-bin number(s) out_bin; see
// each module for its output order and timing. The choice of delay buffer and butterfly per
// pipeline is this design's; any pipeline accepts any of them through its parameters.
module fft_pipelines_top
  import fft_pkg::*;
#(
  parameter int N2 = 8,   // points of the radix-2 pipelines and of the input buffer
  parameter int N4 = 16   // points of the radix-4 pipelines
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // R2MDC
  input  logic                        r2mdc_in_valid,
  input  cplx_t                       r2mdc_in_data,
  output logic                        r2mdc_out_valid,
  output cplx_t [1:0]                 r2mdc_out_data,
  output logic  [1:0][$clog2(N2)-1:0] r2mdc_out_bin,
  // R2MDC with ping-pong input buffer
  input  logic                        r2mpp_in_valid,
  input  cplx_t                       r2mpp_in_data,
  output logic                        r2mpp_out_valid,
  output cplx_t [1:0]                 r2mpp_out_data,
  output logic  [1:0][$clog2(N2)-1:0] r2mpp_out_bin,
  // R2SDF
  input  logic                        r2sdf_in_valid,
  input  cplx_t                       r2sdf_in_data,
  output logic                        r2sdf_out_valid,
  output cplx_t                       r2sdf_out_data,
  output logic  [$clog2(N2)-1:0]      r2sdf_out_bin,
  // R4SDF
  input  logic                        r4sdf_in_valid,
  input  cplx_t                       r4sdf_in_data,
  output logic                        r4sdf_out_valid,
  output cplx_t                       r4sdf_out_data,
  output logic  [$clog2(N4)-1:0]      r4sdf_out_bin,
  // R4MDC
  input  logic                        r4mdc_in_valid,
  input  cplx_t                       r4mdc_in_data,
  output logic                        r4mdc_out_valid,
  output cplx_t [3:0]                 r4mdc_out_data,
  output logic  [3:0][$clog2(N4)-1:0] r4mdc_out_bin,
  // R4MDC at a quarter of the sample rate
  input  logic                        r4mqr_in_valid,
  input  cplx_t                       r4mqr_in_data,
  output logic                        r4mqr_out_valid,
  output cplx_t [3:0]                 r4mqr_out_data,
  output logic  [3:0][$clog2(N4)-1:0] r4mqr_out_bin,
  // ping-pong bit-reversal input buffer
  input  logic                        buf_in_valid,
  input  cplx_t                       buf_in_data,
  output logic                        buf_out_valid,
  output cplx_t                       buf_out_data,
  output logic  [$clog2(N2)-1:0]      buf_out_index,
  output logic                        buf_out_bank,
  // radix-2 DIT butterfly (combinational)
  input  cplx_t                       dit_a,
  input  cplx_t                       dit_b,
  input  logic  [$clog2(N2)-1:0]      dit_k,
  output cplx_t                       dit_y0,
  output cplx_t                       dit_y1
);

  r2mdc_fft #(.N(N2), .DELAY_IMPL(DL_SHIFTREG)) u_r2mdc (
    .clk, .rst_n,
    .in_valid(r2mdc_in_valid), .in_data(r2mdc_in_data),
    .out_valid(r2mdc_out_valid), .out_data(r2mdc_out_data), .out_bin(r2mdc_out_bin)
  );

  r2mdc_pingpong_fft #(.N(N2), .DELAY_IMPL(DL_SHIFTREG)) u_r2mpp (
    .clk, .rst_n,
    .in_valid(r2mpp_in_valid), .in_data(r2mpp_in_data),
    .out_valid(r2mpp_out_valid), .out_data(r2mpp_out_data), .out_bin(r2mpp_out_bin)
  );

  r2sdf_fft #(.N(N2), .DELAY_IMPL(DL_DPRAM)) u_r2sdf (
    .clk, .rst_n,
    .in_valid(r2sdf_in_valid), .in_data(r2sdf_in_data),
    .out_valid(r2sdf_out_valid), .out_data(r2sdf_out_data), .out_bin(r2sdf_out_bin)
  );

  r4sdf_fft #(.N(N4), .DELAY_IMPL(DL_2SPRAM), .USE_R22(1'b1)) u_r4sdf (
    .clk, .rst_n,
    .in_valid(r4sdf_in_valid), .in_data(r4sdf_in_data),
    .out_valid(r4sdf_out_valid), .out_data(r4sdf_out_data), .out_bin(r4sdf_out_bin)
  );

  r4mdc_fft #(.N(N4), .DELAY_IMPL(DL_ONEHOT), .USE_R22(1'b0)) u_r4mdc (
    .clk, .rst_n,
    .in_valid(r4mdc_in_valid), .in_data(r4mdc_in_data),
    .out_valid(r4mdc_out_valid), .out_data(r4mdc_out_data), .out_bin(r4mdc_out_bin)
  );

  r4mdc_qrate_fft #(.N(N4), .DELAY_IMPL(DL_DPRAM), .USE_R22(1'b0)) u_r4mqr (
    .clk, .rst_n,
    .in_valid(r4mqr_in_valid), .in_data(r4mqr_in_data),
    .out_valid(r4mqr_out_valid), .out_data(r4mqr_out_data), .out_bin(r4mqr_out_bin)
  );

  pingpong_bitrev_buffer #(.N(N2)) u_buf (
    .clk, .rst_n,
    .in_valid(buf_in_valid), .in_data(buf_in_data),
    .out_valid(buf_out_valid), .out_data(buf_out_data), .out_index(buf_out_index),
    .out_bank(buf_out_bank)
  );

  r2_dit_butterfly #(.N(N2)) u_dit (.a(dit_a), .b(dit_b), .k(dit_k), .y0(dit_y0), .y1(dit_y1));

endmodule
