// dlms_filter_tb: self-checking test of the direct-form (delayed) LMS filter.
//
// Two instances run side by side on the same noisy-speech scene: the
// delayed LMS with m = 5 (default parameters) and the plain LMS (m = 0).
// Samples arrive with random gaps (in_valid low). Every output e, y and the
// final weights are compared bit for bit with the integer model lms_ref; the
// one-cycle output latency is checked; and after adaptation the residual
// noise in e must be far below the noise in d.
module dlms_filter_tb;
  import anc_pkg::*;
  import anc_ref_pkg::*;

  localparam int N_SAMPLES = 12000;
  localparam int MU        = 4;

  logic    clk;
  logic    rst_n;
  logic    in_valid;
  sample_t x_in, d_in;
  logic    ov_d, ov_l;
  sample_t e_d, y_d, e_l, y_l;
  coef_t   w_d [4];
  coef_t   w_l [4];

  int checks = 0, failures = 0;
  int s [], n0 [], d [];

  initial clk = 1'b0;
  always #5 clk = ~clk;

  dlms_filter dut_dlms (
    .clk, .rst_n, .in_valid, .x_in, .d_in,
    .out_valid(ov_d), .e_out(e_d), .y_out(y_d), .w_out(w_d));

  dlms_filter #(.TAPS(4), .DELAY_M(0), .MU_SHIFT(MU)) dut_lms (
    .clk, .rst_n, .in_valid, .x_in, .d_in,
    .out_valid(ov_l), .e_out(e_l), .y_out(y_l), .w_out(w_l));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (4 * N_SAMPLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lms_ref ref_d, ref_l;
    int ee, yy, el, yl;
    real noise_in, noise_out;
    ref_d = new(4, 5, MU);
    ref_l = new(4, 0, MU);
    make_scene(N_SAMPLES, 8192, s, n0, d);
    noise_in = 0; noise_out = 0;
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0; d_in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < N_SAMPLES; i++) begin
      // random gaps between samples
      while ($urandom_range(4) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
        #1;
        check(!ov_d && !ov_l, "out_valid without a sample");
      end
      in_valid <= 1'b1;
      x_in <= sample_t'(n0[i]);
      d_in <= sample_t'(d[i]);
      @(posedge clk);
      in_valid <= 1'b0;
      ref_d.step(n0[i], d[i], ee, yy);
      ref_l.step(n0[i], d[i], el, yl);
      #1;
      check(ov_d && ov_l, "out_valid one cycle after the sample");
      check(int'(e_d) == ee && int'(y_d) == yy,
            $sformatf("DLMS sample %0d: e=%0d/%0d y=%0d/%0d", i, e_d, ee, y_d, yy));
      check(int'(e_l) == el && int'(y_l) == yl,
            $sformatf("LMS sample %0d: e=%0d/%0d y=%0d/%0d", i, e_l, el, y_l, yl));
      if (i >= N_SAMPLES / 2) begin
        noise_in  += real'((d[i] - s[i]) * (d[i] - s[i]));
        noise_out += real'((int'(e_d) - s[i]) * (int'(e_d) - s[i]));
      end
    end
    for (int k = 0; k < 4; k++) begin
      check(longint'(w_d[k]) == ref_d.w[k], $sformatf("DLMS weight %0d", k));
      check(longint'(w_l[k]) == ref_l.w[k], $sformatf("LMS weight %0d", k));
    end
    // converged weights near the path 0.6 -0.3 0.2 0.1 (Q2.22)
    for (int k = 0; k < 4; k++) begin
      automatic int target = H_PATH[k] <<< 7;
      check((int'(w_d[k]) - target) < 42000 && (target - int'(w_d[k])) < 42000,
            $sformatf("DLMS weight %0d = %0d, path %0d", k, w_d[k], target));
    end
    $display("noise power in d %.1f, left in e %.1f (%.1f dB reduction)",
             noise_in, noise_out, 10.0 * $log10(noise_in / (noise_out + 1.0)));
    check(noise_out * 100.0 < noise_in, "noise reduced by more than 20 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
