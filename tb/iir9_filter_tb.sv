// iir9_filter_tb: checks y(n) = x(n) + a*y(n-9) sample by sample against an
// integer model, for several coefficients a, with random gaps between
// samples and inputs large enough to drive the sum into saturation.
module iir9_filter_tb;

  localparam int N = 3000;

  logic               clk;
  logic               rst_n;
  logic               in_valid;
  logic signed [15:0] a, x_in, y_out;

  int checks = 0, failures = 0;
  int n_sat = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  iir9_filter dut (.*);

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
    rst_n = 1'b0; in_valid = 1'b0; a = '0; x_in = '0;
    for (int t = 0; t < 4; t++) begin
      rst_n = 1'b0;
      ys.delete();
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      a = 16'(av[t]);
      for (int n = 0; n < N; n++) begin
        int xv, yv, yd;
        while ($urandom_range(3) == 0) begin
          in_valid = 1'b0;
          x_in = 16'($urandom);
          @(posedge clk);
          #1;
        end
        xv = (n % 500 < 20) ? int'($urandom_range(60000)) - 30000
                            : int'($urandom_range(4000)) - 2000;
        yd = (n >= 9) ? ys[n-9] : 0;
        yv = xv + ((av[t] * yd) >>> 15);
        if (yv != clip(yv)) n_sat++;
        yv = clip(yv);
        ys.push_back(yv);
        in_valid = 1'b1;
        x_in = 16'(xv);
        #1;
        check(int'(y_out) == yv, $sformatf("a=%0d n=%0d y=%0d exp %0d", av[t], n, y_out, yv));
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
