// iir9_unfold2_tb: checks the 2-unfolded loop against the one-sample-per-
// clock recursion y(n) = x(n) + a*y(n-9), written as an integer model. Each
// block carries samples 2k and 2k+1; both outputs of every block are
// compared, with random gaps between blocks and saturating inputs.
module iir9_unfold2_tb;

  localparam int N = 3000;   // blocks per coefficient

  logic               clk;
  logic               rst_n;
  logic               in_valid;
  logic signed [15:0] a;
  logic signed [15:0] x_in  [2];
  logic signed [15:0] y_out [2];

  int checks = 0, failures = 0;
  int n_sat = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  iir9_unfold2 dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int clip(int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  initial begin : watchdog
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ys [$];
    static int av [4] = '{29491, -26214, 16384, 32767};
    rst_n = 1'b0; in_valid = 1'b0; a = '0; x_in = '{default: '0};
    for (int t = 0; t < 4; t++) begin
      rst_n = 1'b0;
      ys.delete();
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      a = 16'(av[t]);
      for (int k = 0; k < N; k++) begin
        int yv [2];
        while ($urandom_range(3) == 0) begin
          in_valid = 1'b0;
          x_in[0] = 16'($urandom);
          x_in[1] = 16'($urandom);
          @(posedge clk);
          #1;
        end
        for (int j = 0; j < 2; j++) begin
          int n, xv, yd;
          n  = 2 * k + j;
          xv = (n % 500 < 20) ? int'($urandom_range(60000)) - 30000
                              : int'($urandom_range(4000)) - 2000;
          yd = (n >= 9) ? ys[n-9] : 0;
          yv[j] = xv + ((av[t] * yd) >>> 15);
          if (yv[j] != clip(yv[j])) n_sat++;
          yv[j] = clip(yv[j]);
          ys.push_back(yv[j]);
          x_in[j] = 16'(xv);
        end
        in_valid = 1'b1;
        #1;
        for (int j = 0; j < 2; j++)
          check(int'(y_out[j]) == yv[j],
                $sformatf("a=%0d n=%0d y=%0d exp %0d", av[t], 2*k+j, y_out[j], yv[j]));
        @(posedge clk);
        #1;
      end
      in_valid = 1'b0;
    end
    check(n_sat > 0, "saturation exercised");
    $display("saturated sums: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
