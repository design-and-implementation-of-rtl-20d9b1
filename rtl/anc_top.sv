// anc_top: the adaptive noise canceller implementations and the unfolding
// example, side by side.
//
// The same direct-form module with no error delay is the plain LMS
// canceller (lms_*), the starting point the delayed forms are derived from.
// All four cancellers take the reference noise x = n0(n) and the primary
// input d = s(n) + n1(n) and return the cleaned speech e(n) = d(n) - y(n);
// the three delayed ones compute the same 4-tap delayed LMS (m = 5) and
// differ only in how the work is laid out in time:
//   dlms_*  dlms_filter            direct form, delays lumped on the error
//                                  path, 1 sample/clock, 1 cycle latency
//   pipe_*  pipelined_dlms_filter  delays retimed into pipeline stages,
//                                  1 sample/clock, 3 cycles latency
//   unf_*   unfolded_dlms_filter   unfolded by 2, 2 samples/clock,
//                                  2 cycles latency
// The loop y(n) = x(n) + a*y(n-9) that illustrates unfolding is included in
// its original (iir_*) and 2-unfolded (iiru_*) forms.
//
// Each unit has its own ports so that they can be driven, compared or
// synthesised independently; the interfaces and timing of each are
// described in its own module. One clock and one active-low synchronous
// reset are shared.
module anc_top
  import anc_pkg::*;
#(
  parameter int TAPS     = 4,
  parameter int DELAY_M  = 5,
  parameter int MU_SHIFT = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // plain LMS (no error delay), direct form
  input  logic               lms_valid,
  input  sample_t            lms_x,
  input  sample_t            lms_d,
  output logic               lms_out_valid,
  output sample_t            lms_e,
  output sample_t            lms_y,
  output coef_t              lms_w [TAPS],
  // direct-form DLMS
  input  logic               dlms_valid,
  input  sample_t            dlms_x,
  input  sample_t            dlms_d,
  output logic               dlms_out_valid,
  output sample_t            dlms_e,
  output sample_t            dlms_y,
  output coef_t              dlms_w [TAPS],
  // pipelined (retimed) DLMS
  input  logic               pipe_valid,
  input  sample_t            pipe_x,
  input  sample_t            pipe_d,
  output logic               pipe_out_valid,
  output sample_t            pipe_e,
  output sample_t            pipe_y,
  output coef_t              pipe_w [TAPS],
  // unfolded DLMS, two samples per clock
  input  logic               unf_valid,
  input  sample_t            unf_x [2],
  input  sample_t            unf_d [2],
  output logic               unf_out_valid,
  output sample_t            unf_e [2],
  output sample_t            unf_y [2],
  output coef_t              unf_w [TAPS],
  // unfolding example: original loop
  input  logic               iir_valid,
  input  logic signed [15:0] iir_a,
  input  logic signed [15:0] iir_x,
  output logic signed [15:0] iir_y,
  // unfolding example: loop unfolded by 2
  input  logic               iiru_valid,
  input  logic signed [15:0] iiru_a,
  input  logic signed [15:0] iiru_x [2],
  output logic signed [15:0] iiru_y [2]
);

  dlms_filter #(.TAPS(TAPS), .DELAY_M(0), .MU_SHIFT(MU_SHIFT)) u_lms (
    .clk, .rst_n, .in_valid(lms_valid), .x_in(lms_x), .d_in(lms_d),
    .out_valid(lms_out_valid), .e_out(lms_e), .y_out(lms_y), .w_out(lms_w));

  dlms_filter #(.TAPS(TAPS), .DELAY_M(DELAY_M), .MU_SHIFT(MU_SHIFT)) u_dlms (
    .clk, .rst_n, .in_valid(dlms_valid), .x_in(dlms_x), .d_in(dlms_d),
    .out_valid(dlms_out_valid), .e_out(dlms_e), .y_out(dlms_y), .w_out(dlms_w));

  pipelined_dlms_filter #(.TAPS(TAPS), .MU_SHIFT(MU_SHIFT)) u_pipe (
    .clk, .rst_n, .in_valid(pipe_valid), .x_in(pipe_x), .d_in(pipe_d),
    .out_valid(pipe_out_valid), .e_out(pipe_e), .y_out(pipe_y), .w_out(pipe_w));

  unfolded_dlms_filter #(.TAPS(TAPS), .MU_SHIFT(MU_SHIFT)) u_unf (
    .clk, .rst_n, .in_valid(unf_valid), .x_in(unf_x), .d_in(unf_d),
    .out_valid(unf_out_valid), .e_out(unf_e), .y_out(unf_y), .w_out(unf_w));

  iir9_filter #(.W(16), .DELAY(9)) u_iir (
    .clk, .rst_n, .in_valid(iir_valid), .a(iir_a), .x_in(iir_x), .y_out(iir_y));

  iir9_unfold2 #(.W(16)) u_iiru (
    .clk, .rst_n, .in_valid(iiru_valid), .a(iiru_a), .x_in(iiru_x), .y_out(iiru_y));

endmodule
