// unfolded_dlms_filter: delayed-LMS noise canceller unfolded by J = 2.
//
// Unfolding turns a circuit that handles one sample per clock into one that
// handles J samples per clock: every operation is copied J times, and an
// edge with w delays from U to V becomes, for copy i, an edge from U_i to
// V_((i+w) mod J) carrying floor((i+w)/J) delays. Applied with J = 2 to the
// 4-tap DLMS (m = 5, w(n+1) = w(n) + 2*mu*e(n-5)*u(n-5)), the loop delay of
// five samples splits into 3 delays on the path from the odd copy and 2 on
// the path from the even copy, since, for block k holding samples 2k, 2k+1,
//   w(2k+1) = w(2k)   + D(2k-5),   D(2k-5) = D(2(k-3)+1)  odd,  3 blocks back
//   w(2k+2) = w(2k+1) + D(2k-4),   D(2k-4) = D(2(k-2))    even, 2 blocks back
// where D(j) = 2*mu*e(j)*u(j). The design keeps two weight registers,
// We = w(2k) and Wo = w(2k+1), each advanced by two increments per clock:
//   We <= We + D(2k-5) + D(2k-4),   Wo <= Wo + D(2k-4) + D(2k-3).
// The available delays are spent as pipeline registers: each lane registers
// its tap products (stage 1) and its error (stage 2); the increments are
// formed from the registered errors in stage 3, and the odd increment is
// held one more block for We.
//
// The result is sample for sample identical to dlms_filter with DELAY_M = 5
// at twice the samples per clock. Unfolding by 2 of the 4-tap DLMS is the
// source design's; the two-register form of the weights and the placement
// of the pipeline registers are this design's own.
//
// Interface: a block of two samples per clock, taken with in_valid high;
// index 0 is the earlier sample (2k), index 1 the later (2k+1). All state
// advances only on accepted blocks. The results of block k are on e_out and
// y_out (out_valid high) in the cycle after block k+1 is taken, which with
// one block per clock is the second cycle after block k was presented.
// w_out shows w(2k), the weights the even lane is using. rst_n is active
// low and synchronous.
module unfolded_dlms_filter
  import anc_pkg::*;
#(
  parameter int TAPS     = 4,
  parameter int MU_SHIFT = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x_in  [2],
  input  sample_t d_in  [2],
  output logic    out_valid,
  output sample_t e_out [2],
  output sample_t y_out [2],
  output coef_t   w_out [TAPS]
);

  localparam int HIST = TAPS + 3;          // x(2k-1) ... x(2k-TAPS-3)

  sample_t hist  [HIST];                   // hist[i] = x(2k-1-i)
  sample_t u_ev  [TAPS];                   // u(2k)
  sample_t u_od  [TAPS];                   // u(2k+1)
  coef_t   w_ev  [TAPS];                   // w(2k)
  coef_t   w_od  [TAPS];                   // w(2k+1)
  prod_t   p_ev  [TAPS];                   // stage 1, even lane
  prod_t   p_od  [TAPS];                   // stage 1, odd lane
  sample_t d_ev_r, d_od_r;
  sample_t e_ev_r, e_od_r, y_ev_r, y_od_r; // stage 2
  coef_t   dl_ev   [TAPS];                 // D(2k-4)
  coef_t   dl_od   [TAPS];                 // D(2k-3)
  coef_t   dl_od_r [TAPS];                 // D(2k-5)
  acc_t    sum_ev, sum_od;
  logic    fill;

  always_comb begin
    for (int k = 0; k < TAPS; k++) begin
      // x(2k-j) = hist[j-1] for j >= 1
      u_ev[k] = (k == 0) ? x_in[0] : hist[k-1];
      u_od[k] = (k == 0) ? x_in[1] : (k == 1) ? x_in[0] : hist[k-2];
      // increments from the registered errors e(2k-4), e(2k-3)
      dl_ev[k] = weight_delta(e_ev_r, hist[k+3], MU_SHIFT);
      dl_od[k] = weight_delta(e_od_r, hist[k+2], MU_SHIFT);
    end
    sum_ev = '0;
    sum_od = '0;
    for (int k = 0; k < TAPS; k++) begin
      sum_ev += acc_t'(p_ev[k]);
      sum_od += acc_t'(p_od[k]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < HIST; i++) hist[i] <= '0;
      for (int k = 0; k < TAPS; k++) begin
        w_ev[k]    <= '0;
        w_od[k]    <= '0;
        p_ev[k]    <= '0;
        p_od[k]    <= '0;
        dl_od_r[k] <= '0;
      end
      d_ev_r    <= '0;
      d_od_r    <= '0;
      e_ev_r    <= '0;
      e_od_r    <= '0;
      y_ev_r    <= '0;
      y_od_r    <= '0;
      fill      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && fill;
      if (in_valid) begin
        fill    <= 1'b1;
        hist[0] <= x_in[1];
        hist[1] <= x_in[0];
        for (int i = 2; i < HIST; i++) hist[i] <= hist[i-2];
        // stage 1
        for (int k = 0; k < TAPS; k++) begin
          p_ev[k] <= tap_product(w_ev[k], u_ev[k]);
          p_od[k] <= tap_product(w_od[k], u_od[k]);
        end
        d_ev_r <= d_in[0];
        d_od_r <= d_in[1];
        // stage 2
        e_ev_r <= error_of(d_ev_r, sum_ev);
        e_od_r <= error_of(d_od_r, sum_od);
        y_ev_r <= output_of(sum_ev);
        y_od_r <= output_of(sum_od);
        // stage 3: weight update of both lanes
        for (int k = 0; k < TAPS; k++) begin
          w_ev[k]    <= w_ev[k] + dl_od_r[k] + dl_ev[k];
          w_od[k]    <= w_od[k] + dl_ev[k] + dl_od[k];
          dl_od_r[k] <= dl_od[k];
        end
      end
    end
  end

  assign e_out[0] = e_ev_r;
  assign e_out[1] = e_od_r;
  assign y_out[0] = y_ev_r;
  assign y_out[1] = y_od_r;
  assign w_out    = w_ev;

  // A result is only ever produced by the edge that accepts a sample.
  a_out_follows_in : assert property (
    @(posedge clk) disable iff (!rst_n) out_valid |-> $past(in_valid))
    else $error("out_valid without an accepted sample");

endmodule
