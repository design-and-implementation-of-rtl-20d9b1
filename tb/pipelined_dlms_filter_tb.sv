// pipelined_dlms_filter_tb: self-checking test of the retimed DLMS filter.
//
// The noisy-speech scene is fed first with random gaps between samples, then
// at one sample per clock. Each result is compared bit for bit with the
// integer delayed-LMS model (m = 5), so the retiming must not change the
// arithmetic. The timing is checked too: result n appears in the cycle after
// sample n+2 is taken, which with back-to-back samples is 3 cycles after
// sample n. The final weights and the achieved noise reduction are checked.
module pipelined_dlms_filter_tb;
  import anc_pkg::*;
  import anc_ref_pkg::*;

  localparam int N_SAMPLES = 12000;
  localparam int MU        = 4;

  logic    clk;
  logic    rst_n;
  logic    in_valid;
  sample_t x_in, d_in;
  logic    out_valid;
  sample_t e_out, y_out;
  coef_t   w_out [4];

  int checks = 0, failures = 0;
  int s [], n0 [], d [];
  int exp_e [], exp_y [];
  int acc_cycle [];
  int cycle;
  int n_out;
  int n_lat3;
  real noise_in, noise_out;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  pipelined_dlms_filter dut (.*);

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

  // Output monitor: results must come in sample order with the right values.
  initial begin
    cycle = 0; n_out = 0; n_lat3 = 0; noise_in = 0; noise_out = 0;
  end

  always begin
    @(posedge clk);
    #1;
    if (rst_n && out_valid) begin
      if (n_out + 2 >= N_SAMPLES) begin
        check(0, "more results than samples allow");
      end else begin
        check(int'(e_out) == exp_e[n_out] && int'(y_out) == exp_y[n_out],
              $sformatf("sample %0d: e=%0d/%0d y=%0d/%0d",
                        n_out, e_out, exp_e[n_out], y_out, exp_y[n_out]));
        // result n is out in the cycle after sample n+2 was taken
        check(cycle == acc_cycle[n_out + 2] + 1,
              $sformatf("sample %0d out at cycle %0d", n_out, cycle));
        if (cycle - acc_cycle[n_out] == 3) n_lat3++;
        if (n_out >= N_SAMPLES / 2) begin
          noise_in  += real'((d[n_out] - s[n_out]) * (d[n_out] - s[n_out]));
          noise_out += real'((int'(e_out) - s[n_out]) * (int'(e_out) - s[n_out]));
        end
      end
      n_out++;
    end
  end

  initial begin
    lms_ref rm;
    int ee, yy;
    rm = new(4, 5, MU);
    make_scene(N_SAMPLES, 8192, s, n0, d);
    exp_e = new[N_SAMPLES];
    exp_y = new[N_SAMPLES];
    acc_cycle = new[N_SAMPLES];
    for (int i = 0; i < N_SAMPLES; i++) begin
      rm.step(n0[i], d[i], ee, yy);
      exp_e[i] = ee;
      exp_y[i] = yy;
    end
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0; d_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int i = 0; i < N_SAMPLES; i++) begin
      if (i < N_SAMPLES / 4) begin
        while ($urandom_range(3) == 0) begin
          in_valid = 1'b0;
          @(posedge clk);
          #1;
        end
      end
      in_valid = 1'b1;
      x_in = sample_t'(n0[i]);
      d_in = sample_t'(d[i]);
      acc_cycle[i] = cycle;
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    check(n_out == N_SAMPLES - 2, $sformatf("%0d results for %0d samples", n_out, N_SAMPLES));
    check(n_lat3 > N_SAMPLES / 2, $sformatf("%0d results with 3-cycle latency", n_lat3));
    // w_out holds w(N), the weights the model ends with
    foreach (w_out[k])
      check(longint'(w_out[k]) == rm.w[k], $sformatf("weight %0d", k));
    $display("noise power in d %.1f, left in e %.1f (%.1f dB reduction)",
             noise_in, noise_out, 10.0 * $log10(noise_in / (noise_out + 1.0)));
    check(noise_out * 100.0 < noise_in, "noise reduced by more than 20 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
