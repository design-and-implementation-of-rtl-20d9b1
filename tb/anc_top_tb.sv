// anc_top_tb: end-to-end test of anc_top at its default parameters.
//
// One noisy-speech recording of N_SAMPLES samples (about the length of the
// speech clip the canceller is meant for) is cleaned by all three DLMS
// implementations at once:
//   - the direct form and the pipelined form get one sample per clock, with
//     random gaps in the first part of the run,
//   - the unfolded form gets two samples per clock.
// Every result of each is compared with the integer delayed-LMS model and
// the results of the three are thereby identical. The plain LMS instance
// (no error delay) gets the same stream as the direct form and is compared
// with the model at m = 0. A few loud clicks in the
// primary input drive the error into saturation. The unfolding example is
// run alongside: the original loop and the 2-unfolded loop get the same
// input and must give the same outputs.
// The test counts how often each mechanism happened (input gaps, error
// saturation, 3-cycle pipeline latency, 2-cycle unfolded latency, the
// delayed weight update, saturation in the example loop) and fails if one
// never did. It ends by checking the weights and the noise reduction.
module anc_top_tb;
  import anc_pkg::*;
  import anc_ref_pkg::*;

  localparam int N_SAMPLES = 270000;
  localparam int N_BLOCKS  = N_SAMPLES / 2;
  localparam int MU        = 4;     // anc_top's default step size
  localparam int N_IIR     = 4000;  // samples through the unfolding example

  logic    clk;
  logic    rst_n;
  logic    lms_valid, lms_out_valid;
  sample_t lms_x, lms_d, lms_e, lms_y;
  coef_t   lms_w [4];
  logic    dlms_valid, pipe_valid, unf_valid;
  sample_t dlms_x, dlms_d, pipe_x, pipe_d;
  sample_t unf_x [2];
  sample_t unf_d [2];
  logic    dlms_out_valid, pipe_out_valid, unf_out_valid;
  sample_t dlms_e, dlms_y, pipe_e, pipe_y;
  sample_t unf_e [2];
  sample_t unf_y [2];
  coef_t   dlms_w [4];
  coef_t   pipe_w [4];
  coef_t   unf_w  [4];
  logic               iir_valid, iiru_valid;
  logic signed [15:0] iir_a, iiru_a, iir_x, iir_y;
  logic signed [15:0] iiru_x [2];
  logic signed [15:0] iiru_y [2];

  int checks, failures;
  int s [], n0 [], d [];
  int exp_e [], exp_y [];
  int exp_e0 [], exp_y0 [];
  int cycle;
  int n_dlms, n_pipe, n_unf;
  int gaps, sat_e, lat_pipe3, lat_unf2, w_moves, iir_sat;
  int acc_dlms [], acc_pipe [], acc_unf [];
  bit near_click [];
  real noise_in, noise_out;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  anc_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (3 * N_SAMPLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0; cycle = 0;
    n_dlms = 0; n_pipe = 0; n_unf = 0;
    gaps = 0; sat_e = 0; lat_pipe3 = 0; lat_unf2 = 0; w_moves = 0; iir_sat = 0;
    noise_in = 0; noise_out = 0;
  end

  // ---------------------------------------------------------------- monitors
  always begin
    @(posedge clk);
    #1;
    if (rst_n && dlms_out_valid) begin
      if (n_dlms < N_SAMPLES) begin
        check(dlms_e == sample_t'(exp_e[n_dlms]) && dlms_y == sample_t'(exp_y[n_dlms]),
              $sformatf("dlms sample %0d", n_dlms));
        check(cycle == acc_dlms[n_dlms] + 1, $sformatf("dlms latency, sample %0d", n_dlms));
        if (dlms_e == 16'sh7fff || dlms_e == -16'sh8000) sat_e++;
        if (n_dlms >= N_SAMPLES / 2 && !near_click[n_dlms]) begin
          noise_in  += real'((d[n_dlms] - s[n_dlms]) * (d[n_dlms] - s[n_dlms]));
          noise_out += real'((int'(dlms_e) - s[n_dlms]) * (int'(dlms_e) - s[n_dlms]));
        end
      end else check(0, "extra dlms result");
      n_dlms++;
    end
    if (rst_n) check(lms_out_valid == dlms_out_valid, "LMS and DLMS valid together");
    if (rst_n && lms_out_valid && n_dlms > 0 && n_dlms <= N_SAMPLES)
      check(lms_e == sample_t'(exp_e0[n_dlms-1]) && lms_y == sample_t'(exp_y0[n_dlms-1]),
            $sformatf("lms sample %0d", n_dlms - 1));
    if (rst_n && pipe_out_valid) begin
      if (n_pipe + 2 < N_SAMPLES) begin
        check(pipe_e == sample_t'(exp_e[n_pipe]) && pipe_y == sample_t'(exp_y[n_pipe]),
              $sformatf("pipelined sample %0d", n_pipe));
        check(cycle == acc_pipe[n_pipe + 2] + 1, $sformatf("pipelined timing, sample %0d", n_pipe));
        if (cycle - acc_pipe[n_pipe] == 3) lat_pipe3++;
      end else check(0, "extra pipelined result");
      n_pipe++;
    end
    if (rst_n && unf_out_valid) begin
      if (n_unf + 1 < N_BLOCKS) begin
        for (int j = 0; j < 2; j++)
          check(unf_e[j] == sample_t'(exp_e[2*n_unf+j]) && unf_y[j] == sample_t'(exp_y[2*n_unf+j]),
                $sformatf("unfolded sample %0d", 2*n_unf+j));
        check(cycle == acc_unf[n_unf + 1] + 1, $sformatf("unfolded timing, block %0d", n_unf));
        if (cycle - acc_unf[n_unf] == 2) lat_unf2++;
      end else check(0, "extra unfolded result");
      n_unf++;
    end
  end

  // weights of the direct form move only on the delayed error
  always begin
    coef_t w_prev [4];
    @(posedge clk);
    w_prev = dlms_w;
    #1;
    if (rst_n && dlms_w != w_prev) w_moves++;
  end

  // ----------------------------------------------------------------- drivers
  task automatic drive_dlms();
    for (int i = 0; i < N_SAMPLES; i++) begin
      if (i < N_SAMPLES / 20)
        while ($urandom_range(3) == 0) begin
          dlms_valid = 1'b0; lms_valid = 1'b0; gaps++;
          @(posedge clk);
          #1;
        end
      dlms_valid = 1'b1;
      dlms_x = sample_t'(n0[i]);
      dlms_d = sample_t'(d[i]);
      lms_valid = 1'b1;
      lms_x = sample_t'(n0[i]);
      lms_d = sample_t'(d[i]);
      acc_dlms[i] = cycle;
      @(posedge clk);
      #1;
    end
    dlms_valid = 1'b0;
    lms_valid = 1'b0;
  endtask

  task automatic drive_pipe();
    for (int i = 0; i < N_SAMPLES; i++) begin
      if (i < N_SAMPLES / 20)
        while ($urandom_range(3) == 0) begin
          pipe_valid = 1'b0; gaps++;
          @(posedge clk);
          #1;
        end
      pipe_valid = 1'b1;
      pipe_x = sample_t'(n0[i]);
      pipe_d = sample_t'(d[i]);
      acc_pipe[i] = cycle;
      @(posedge clk);
      #1;
    end
    pipe_valid = 1'b0;
  endtask

  task automatic drive_unf();
    for (int k = 0; k < N_BLOCKS; k++) begin
      if (k < N_BLOCKS / 20)
        while ($urandom_range(3) == 0) begin
          unf_valid = 1'b0; gaps++;
          @(posedge clk);
          #1;
        end
      unf_valid = 1'b1;
      for (int j = 0; j < 2; j++) begin
        unf_x[j] = sample_t'(n0[2*k+j]);
        unf_d[j] = sample_t'(d[2*k+j]);
      end
      acc_unf[k] = cycle;
      @(posedge clk);
      #1;
    end
    unf_valid = 1'b0;
  endtask

  // The two forms of the example loop get the same input sequence: the
  // original one sample per clock, the unfolded one block every other clock.
  task automatic drive_iir();
    int xs [];
    int y_odd;
    xs = new[N_IIR];
    for (int n = 0; n < N_IIR; n++)
      xs[n] = (n % 400 < 15) ? int'($urandom_range(60000)) - 30000
                             : int'($urandom_range(4000)) - 2000;
    iir_a  = 16'sd29491;                     // 0.9
    iiru_a = 16'sd29491;
    y_odd  = 0;
    for (int n = 0; n < N_IIR; n++) begin
      iir_valid = 1'b1;
      iir_x = 16'(xs[n]);
      iiru_valid = (n % 2 == 0);
      if (n % 2 == 0) begin
        iiru_x[0] = 16'(xs[n]);
        iiru_x[1] = 16'(xs[n+1]);
      end
      #1;
      if (iir_y == 16'sh7fff || iir_y == -16'sh8000) iir_sat++;
      if (n % 2 == 0) begin
        check(iiru_y[0] == iir_y, $sformatf("unfolded loop, sample %0d", n));
        y_odd = int'(iiru_y[1]);
      end else begin
        check(y_odd == int'(iir_y), $sformatf("unfolded loop, sample %0d", n));
      end
      @(posedge clk);
      #1;
    end
    iir_valid = 1'b0;
    iiru_valid = 1'b0;
  endtask

  // ------------------------------------------------------------------- main
  initial begin
    lms_ref rm, rm0;
    int ee, yy;
    rm = new(4, 5, MU);
    rm0 = new(4, 0, MU);
    make_scene(N_SAMPLES, 8192, s, n0, d);
    // loud clicks on the primary microphone
    near_click = new[N_SAMPLES];
    for (int i = 20000; i < N_SAMPLES; i += 40000) begin
      for (int j = 0; j < 16; j++) d[i+j] = (j % 2 == 0) ? 32000 : -32000;
      // the noise reduction is measured away from the clicks
      for (int j = 0; j < 4000 && i + j < N_SAMPLES; j++) near_click[i+j] = 1'b1;
    end
    exp_e = new[N_SAMPLES];
    exp_y = new[N_SAMPLES];
    exp_e0 = new[N_SAMPLES];
    exp_y0 = new[N_SAMPLES];
    acc_dlms = new[N_SAMPLES];
    acc_pipe = new[N_SAMPLES];
    acc_unf  = new[N_BLOCKS];
    for (int i = 0; i < N_SAMPLES; i++) begin
      rm.step(n0[i], d[i], ee, yy);
      exp_e[i] = ee;
      exp_y[i] = yy;
      rm0.step(n0[i], d[i], ee, yy);
      exp_e0[i] = ee;
      exp_y0[i] = yy;
    end
    rst_n = 1'b0;
    dlms_valid = 1'b0; pipe_valid = 1'b0; unf_valid = 1'b0; lms_valid = 1'b0;
    lms_x = '0; lms_d = '0;
    iir_valid = 1'b0; iiru_valid = 1'b0;
    dlms_x = '0; dlms_d = '0; pipe_x = '0; pipe_d = '0;
    unf_x = '{default: '0};
    unf_d = '{default: '0};
    iir_a = '0; iiru_a = '0; iir_x = '0;
    iiru_x = '{default: '0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    fork
      drive_dlms();
      drive_pipe();
      drive_unf();
      drive_iir();
    join
    repeat (5) @(posedge clk);
    #1;

    check(n_dlms == N_SAMPLES, $sformatf("%0d direct-form results", n_dlms));
    check(n_pipe == N_SAMPLES - 2, $sformatf("%0d pipelined results", n_pipe));
    check(n_unf == N_BLOCKS - 1, $sformatf("%0d unfolded results", n_unf));
    for (int k = 0; k < 4; k++) begin
      check(longint'(dlms_w[k]) == rm.w[k], $sformatf("direct-form weight %0d", k));
      check(longint'(lms_w[k]) == rm0.w[k], $sformatf("LMS weight %0d", k));
      check(longint'(pipe_w[k]) == rm.w[k], $sformatf("pipelined weight %0d", k));
      check(longint'(unf_w[k])  == rm.w[k], $sformatf("unfolded weight %0d", k));
    end
    $display("noise power in d %.1f, left in e %.1f (%.1f dB reduction)",
             noise_in, noise_out, 10.0 * $log10(noise_in / (noise_out + 1.0)));
    check(noise_out * 100.0 < noise_in, "noise reduced by more than 20 dB");
    $display("mechanisms: input gaps %0d, saturated errors %0d, pipelined 3-cycle results %0d,",
             gaps, sat_e, lat_pipe3);
    $display("            unfolded 2-cycle blocks %0d, weight updates %0d, loop saturations %0d",
             lat_unf2, w_moves, iir_sat);
    check(gaps > 0, "input gaps happened");
    check(sat_e > 0, "error saturation happened");
    check(lat_pipe3 > 0, "pipelined 3-cycle latency seen");
    check(lat_unf2 > 0, "unfolded 2-cycle latency seen");
    check(w_moves > 0, "delayed weight update happened");
    check(iir_sat > 0, "loop saturation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
