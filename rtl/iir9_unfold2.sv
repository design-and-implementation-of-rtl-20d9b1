// iir9_unfold2: the loop y(n) = x(n) + a * y(n-9) unfolded by two.
//
// Two copies of the adder/multiplier node handle the even sample 2k and the
// odd sample 2k+1 of each block. The loop edge of nine delays becomes two
// cross edges:
//   y(2k)   = x(2k)   + a * y(2k-9),  y(2k-9) = y(2(k-5)+1): from the odd
//             lane through 5 block delays
//   y(2k+1) = x(2k+1) + a * y(2k-8),  y(2k-8) = y(2(k-4)):   from the even
//             lane through 4 block delays
// so the nine delays are shared out as 5D + 4D, and the circuit produces
// two outputs per clock with the same node delay as the original. The
// structure is the source design's unfolding example; the word formats are
// this design's (see iir_mac).
//
// Interface: x_in[0] = x(2k), x_in[1] = x(2k+1); y_out[0..1] are the node
// outputs for the block present in the same cycle (combinational). With
// in_valid high the rising edge advances both delay lines. rst_n is active
// low and synchronous.
module iir9_unfold2 #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] x_in  [2],
  output logic signed [W-1:0] y_out [2]
);

  localparam int D_ODD_TO_EVEN = 5;
  localparam int D_EVEN_TO_ODD = 4;

  logic signed [W-1:0] dl_o [D_ODD_TO_EVEN];  // y(2k+1) delayed
  logic signed [W-1:0] dl_e [D_EVEN_TO_ODD];  // y(2k) delayed

  iir_mac #(.W(W)) u_even (.x(x_in[0]), .a(a), .y_old(dl_o[D_ODD_TO_EVEN-1]), .y(y_out[0]));
  iir_mac #(.W(W)) u_odd  (.x(x_in[1]), .a(a), .y_old(dl_e[D_EVEN_TO_ODD-1]), .y(y_out[1]));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < D_ODD_TO_EVEN; i++) dl_o[i] <= '0;
      for (int i = 0; i < D_EVEN_TO_ODD; i++) dl_e[i] <= '0;
    end else if (in_valid) begin
      dl_o[0] <= y_out[1];
      for (int i = 1; i < D_ODD_TO_EVEN; i++) dl_o[i] <= dl_o[i-1];
      dl_e[0] <= y_out[0];
      for (int i = 1; i < D_EVEN_TO_ODD; i++) dl_e[i] <= dl_e[i-1];
    end
  end

endmodule
