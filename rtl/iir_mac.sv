// iir_mac: the adder and multiplier node of the recursive loop
// y = x + a * y_old, used by iir9_filter and by both lanes of iir9_unfold2.
// Combinational. Q1.15 operands; the product is truncated to Q1.15 and the
// sum saturated to W bits.
module iir_mac #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] y_old,
  output logic signed [W-1:0] y
);

  localparam logic signed [W+1:0] MAXV = (W+2)'((1 <<< (W - 1)) - 1);
  localparam logic signed [W+1:0] MINV = -(W+2)'(1 <<< (W - 1));

  logic signed [2*W-1:0] prod;
  logic signed [W+1:0]   sum;

  always_comb begin
    prod = (2*W)'(a) * (2*W)'(y_old);
    sum  = (W+2)'(x) + (W+2)'(prod >>> (W - 1));
    if (sum > MAXV)      y = MAXV[W-1:0];
    else if (sum < MINV) y = MINV[W-1:0];
    else                 y = sum[W-1:0];
  end

endmodule
