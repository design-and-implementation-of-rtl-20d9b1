// unfolded_dlms_filter_tb: self-checking test of the 2-unfolded DLMS filter.
//
// The noisy-speech scene is fed two samples per block, first with random
// gaps between blocks, then one block per clock. Both results of every block
// are compared bit for bit with the integer delayed-LMS model (m = 5) run one
// sample at a time, so unfolding must not change the arithmetic. The timing
// is checked too: block k's results appear in the cycle after block k+1 is
// taken, 2 cycles after block k with back-to-back blocks. The final weights
// and the noise reduction are checked.
module unfolded_dlms_filter_tb;
  import anc_pkg::*;
  import anc_ref_pkg::*;

  localparam int N_SAMPLES = 12000;
  localparam int N_BLOCKS  = N_SAMPLES / 2;
  localparam int MU        = 4;

  logic    clk;
  logic    rst_n;
  logic    in_valid;
  sample_t x_in [2];
  sample_t d_in [2];
  logic    out_valid;
  sample_t e_out [2];
  sample_t y_out [2];
  coef_t   w_out [4];

  int checks = 0, failures = 0;
  int s [], n0 [], d [];
  int exp_e [], exp_y [];
  int acc_cycle [];
  int cycle;
  int n_out;
  int n_lat2;
  real noise_in, noise_out;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  unfolded_dlms_filter dut (.*);

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
    cycle = 0; n_out = 0; n_lat2 = 0; noise_in = 0; noise_out = 0;
  end

  always begin
    @(posedge clk);
    #1;
    if (rst_n && out_valid) begin
      if (n_out + 1 >= N_BLOCKS) begin
        check(0, "more results than blocks allow");
      end else begin
        for (int j = 0; j < 2; j++) begin
          automatic int i = 2 * n_out + j;
          check(int'(e_out[j]) == exp_e[i] && int'(y_out[j]) == exp_y[i],
                $sformatf("sample %0d: e=%0d/%0d y=%0d/%0d",
                          i, e_out[j], exp_e[i], y_out[j], exp_y[i]));
          if (i >= N_SAMPLES / 2) begin
            noise_in  += real'((d[i] - s[i]) * (d[i] - s[i]));
            noise_out += real'((int'(e_out[j]) - s[i]) * (int'(e_out[j]) - s[i]));
          end
        end
        // block k is out in the cycle after block k+1 was taken
        check(cycle == acc_cycle[n_out + 1] + 1,
              $sformatf("block %0d out at cycle %0d", n_out, cycle));
        if (cycle - acc_cycle[n_out] == 2) n_lat2++;
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
    acc_cycle = new[N_BLOCKS];
    for (int i = 0; i < N_SAMPLES; i++) begin
      rm.step(n0[i], d[i], ee, yy);
      exp_e[i] = ee;
      exp_y[i] = yy;
    end
    rst_n = 1'b0; in_valid = 1'b0;
    x_in = '{default: '0};
    d_in = '{default: '0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int i = 0; i < N_BLOCKS; i++) begin
      if (i < N_BLOCKS / 4) begin
        while ($urandom_range(3) == 0) begin
          in_valid = 1'b0;
          @(posedge clk);
          #1;
        end
      end
      in_valid = 1'b1;
      x_in[0] = sample_t'(n0[2*i]);
      x_in[1] = sample_t'(n0[2*i+1]);
      d_in[0] = sample_t'(d[2*i]);
      d_in[1] = sample_t'(d[2*i+1]);
      acc_cycle[i] = cycle;
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    check(n_out == N_BLOCKS - 1, $sformatf("%0d results for %0d blocks", n_out, N_BLOCKS));
    check(n_lat2 > N_BLOCKS / 2, $sformatf("%0d blocks with 2-cycle latency", n_lat2));
    // w_out holds w(2k) for the next block k = N_BLOCKS: the model's final w
    foreach (w_out[k])
      check(longint'(w_out[k]) == rm.w[k], $sformatf("weight %0d", k));
    $display("noise power in d %.1f, left in e %.1f (%.1f dB reduction)",
             noise_in, noise_out, 10.0 * $log10(noise_in / (noise_out + 1.0)));
    check(noise_out * 100.0 < noise_in, "noise reduced by more than 20 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
