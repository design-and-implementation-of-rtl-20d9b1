// iir9_filter: first-order recursive loop y(n) = x(n) + a * y(n-9).
//
// This is the small loop the source design uses to show unfolding: one
// adder, one multiplier by the coefficient a and nine delays in the loop.
// iir9_filter is the original, one sample per clock; iir9_unfold2 is the
// same loop unfolded by two.
//
// Arithmetic (this design's choice): x, y and a are 16-bit Q1.15; the
// product a*y is truncated to Q1.15 (arithmetic shift) and the sum is
// saturated to the 16-bit range.
//
// Interface: y_out is the adder output for the x_in present in the same
// cycle (combinational, as in the loop drawing). With in_valid high the
// rising edge pushes y(n) into the nine-stage delay line. rst_n is active
// low and synchronous and clears the delay line.
module iir9_filter #(
  parameter int W     = 16,
  parameter int DELAY = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] x_in,
  output logic signed [W-1:0] y_out
);

  logic signed [W-1:0] dl [DELAY];           // dl[i] = y(n-1-i)

  iir_mac #(.W(W)) u_mac (.x(x_in), .a(a), .y_old(dl[DELAY-1]), .y(y_out));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DELAY; i++) dl[i] <= '0;
    end else if (in_valid) begin
      dl[0] <= y_out;
      for (int i = 1; i < DELAY; i++) dl[i] <= dl[i-1];
    end
  end

endmodule
