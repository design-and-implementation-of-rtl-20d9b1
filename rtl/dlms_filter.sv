// dlms_filter: direct-form delayed-LMS adaptive noise canceller.
//
// The reference input x is the noise n0(n); the primary input d is the noisy
// speech s(n) + n1(n). For every accepted sample the filter forms
//   y(n) = w(n)^T u(n),     u(n) = [x(n), x(n-1), ..., x(n-TAPS+1)]
//   e(n) = d(n) - y(n)      (the cleaned speech)
//   w(n+1) = w(n) + 2*mu * e(n-m) * u(n-m)
// The m = DELAY_M delays sit in the error feedback path (and, to match, in
// the path of u), as in the delayed-LMS structure; DELAY_M = 0 gives the
// plain LMS update w(n+1) = w(n) + 2*mu*e(n)*u(n). The filter output, the
// subtraction and the update of the weights all happen in the clock cycle
// that accepts a sample, so the critical path is a multiplier, the tap adder
// chain, the subtractor and, when DELAY_M = 0, a second multiplier and the
// weight adder.
//
// TAPS = 4 and DELAY_M = 5 are the 4-tap configuration of the source design.
// The fixed-point formats, the power-of-two step size and the registered
// outputs are this design's choices (see anc_pkg).
//
// Interface: one sample per clock at most. A sample (x_in, d_in) is taken on
// a rising edge with in_valid high; all state advances only then. e_out and
// y_out for that sample are valid, with out_valid high, in the next cycle.
// w_out shows the current weights. rst_n is an active-low synchronous reset
// that clears weights, sample history and outputs.
module dlms_filter
  import anc_pkg::*;
#(
  parameter int TAPS     = 4,
  parameter int DELAY_M  = 5,
  parameter int MU_SHIFT = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x_in,
  input  sample_t d_in,
  output logic    out_valid,
  output sample_t e_out,
  output sample_t y_out,
  output coef_t   w_out [TAPS]
);

  localparam int HIST = TAPS + DELAY_M - 1;  // past x samples kept

  coef_t   w      [TAPS];
  sample_t x_hist [HIST];                    // x_hist[i] = x(n-1-i)
  sample_t u      [TAPS];                    // u(n)
  sample_t u_m    [TAPS];                    // u(n-m)
  sample_t e_now, e_m;
  acc_t    sum;

  // Tap vectors for the filter and for the delayed update.
  always_comb begin
    for (int k = 0; k < TAPS; k++) begin
      u[k]   = (k == 0) ? x_in : x_hist[k-1];
      u_m[k] = (DELAY_M + k == 0) ? x_in : x_hist[DELAY_M + k - 1];
    end
  end

  // F part: filter output and error.
  always_comb begin
    sum = '0;
    for (int k = 0; k < TAPS; k++) sum += acc_t'(tap_product(w[k], u[k]));
    e_now = error_of(d_in, sum);
  end

  // z^-m on the error path.
  if (DELAY_M == 0) begin : g_lms
    assign e_m = e_now;
  end else begin : g_dlms
    sample_t e_dly [DELAY_M];                // e_dly[i] = e(n-1-i)
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < DELAY_M; i++) e_dly[i] <= '0;
      end else if (in_valid) begin
        e_dly[0] <= e_now;
        for (int i = 1; i < DELAY_M; i++) e_dly[i] <= e_dly[i-1];
      end
    end
    assign e_m = e_dly[DELAY_M-1];
  end

  // Weight update, sample history and outputs.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) w[k] <= '0;
      for (int i = 0; i < HIST; i++) x_hist[i] <= '0;
      out_valid <= 1'b0;
      e_out     <= '0;
      y_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < TAPS; k++)
          w[k] <= w[k] + weight_delta(e_m, u_m[k], MU_SHIFT);
        x_hist[0] <= x_in;
        for (int i = 1; i < HIST; i++) x_hist[i] <= x_hist[i-1];
        e_out <= e_now;
        y_out <= output_of(sum);
      end
    end
  end

  assign w_out = w;

  // A result is only ever produced by the edge that accepts a sample.
  a_out_follows_in : assert property (
    @(posedge clk) disable iff (!rst_n) out_valid |-> $past(in_valid))
    else $error("out_valid without an accepted sample");

endmodule
