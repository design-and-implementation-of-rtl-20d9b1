// pipelined_dlms_filter: retimed, pipelined delayed-LMS noise canceller.
//
// It computes exactly what dlms_filter computes with DELAY_M = 5,
//   y(n) = w(n)^T u(n),  e(n) = d(n) - y(n),
//   w(n+1) = w(n) + 2*mu * e(n-5) * u(n-5),
// but the five delays of the error loop are no longer lumped in front of the
// weight update. They are moved (cutset retiming) into the two halves of the
// structure, so that no path holds more than one multiplier or one short
// adder tree:
//
//   F block (filtering), error path delay D1 = 4:
//     stage 1  tap products w*u                      -> p_r
//     stage 2  sums of the lower and upper half taps -> hs_r
//     stage 3  y = sum, e = d - y (saturated)        -> e_r, y_r
//   WUD block (weight update):
//     stage 4  2*mu*e*u for every tap                -> q_r
//     weight accumulators w_acc += q_r
//   D2 = 1: the F block multiplies by a registered copy w_f of the
//     accumulators, i.e. by w(n - D2).
//   D1 + D2 = 5 = m, the delay of the 4-tap DLMS.
//
// The split into F and WUD blocks, the D1/D2 delays and m = 5 follow the
// source design's 4-tap retimed structure; where exactly each pipeline
// register sits (the two-level adder tree in particular) is this design's
// choice. TAPS must be even.
//
// Interface: at most one sample per clock, taken with in_valid high. Every
// register advances only on an accepted sample, so the delays are sample
// delays and the result does not depend on gaps in the input. e(n) and y(n)
// come out (out_valid high) in the cycle after sample n+2 is taken: with
// one sample per clock that is the third cycle after x(n) was taken. The last
// two results leave the pipeline only when further samples arrive. w_out
// shows the weights the F block is using. rst_n is active low, synchronous.
module pipelined_dlms_filter
  import anc_pkg::*;
#(
  parameter int TAPS     = 4,
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

  localparam int HALF = TAPS / 2;

  if (TAPS % 2 != 0 || TAPS < 2) begin : g_taps_check
    $error("pipelined_dlms_filter: TAPS must be even and at least 2");
  end
  localparam int HIST = TAPS + 2;          // x(n-1) ... x(n-TAPS-2)

  sample_t x_hist [HIST];                  // x_hist[i] = x(n-1-i)
  sample_t u      [TAPS];                  // u(n), into the F block
  sample_t u_e    [TAPS];                  // u(n-3), beside e(n-3) in stage 4
  coef_t   w_f    [TAPS];                  // D2 copy used by the F block
  coef_t   w_acc  [TAPS];                  // weight accumulators
  prod_t   p_r    [TAPS];                  // stage 1
  acc_t    hs_r   [2];                     // stage 2
  sample_t d1_r, d2_r;                     // d aligned with stages 1, 2
  sample_t e_r, y_r;                       // stage 3
  coef_t   q_r    [TAPS];                  // stage 4
  acc_t    hs_next [2];
  acc_t    y_sum;
  logic [1:0] fill;                        // accepted samples, saturating at 2

  always_comb begin
    for (int k = 0; k < TAPS; k++) begin
      u[k]   = (k == 0) ? x_in : x_hist[k-1];
      u_e[k] = x_hist[k+2];
    end
    hs_next[0] = '0;
    hs_next[1] = '0;
    for (int k = 0; k < HALF; k++) begin
      hs_next[0] += acc_t'(p_r[k]);
      hs_next[1] += acc_t'(p_r[k+HALF]);
    end
    y_sum = hs_r[0] + hs_r[1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < HIST; i++) x_hist[i] <= '0;
      for (int k = 0; k < TAPS; k++) begin
        w_f[k]   <= '0;
        w_acc[k] <= '0;
        p_r[k]   <= '0;
        q_r[k]   <= '0;
      end
      hs_r[0]   <= '0;
      hs_r[1]   <= '0;
      d1_r      <= '0;
      d2_r      <= '0;
      e_r       <= '0;
      y_r       <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (fill == 2'd2);
      if (in_valid) begin
        if (fill != 2'd2) fill <= fill + 2'd1;
        x_hist[0] <= x_in;
        for (int i = 1; i < HIST; i++) x_hist[i] <= x_hist[i-1];
        // F block
        for (int k = 0; k < TAPS; k++) p_r[k] <= tap_product(w_f[k], u[k]);
        d1_r    <= d_in;
        hs_r    <= hs_next;
        d2_r    <= d1_r;
        e_r     <= error_of(d2_r, y_sum);
        y_r     <= output_of(y_sum);
        // WUD block
        for (int k = 0; k < TAPS; k++) begin
          q_r[k]   <= weight_delta(e_r, u_e[k], MU_SHIFT);
          w_acc[k] <= w_acc[k] + q_r[k];
          w_f[k]   <= w_acc[k];
        end
      end
    end
  end

  assign e_out = e_r;
  assign y_out = y_r;
  assign w_out = w_f;

  // A result is only ever produced by the edge that accepts a sample.
  a_out_follows_in : assert property (
    @(posedge clk) disable iff (!rst_n) out_valid |-> $past(in_valid))
    else $error("out_valid without an accepted sample");

endmodule
