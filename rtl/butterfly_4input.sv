// Second DIT stage of one 4-point half of the 8-point FFT: two butterflies,
// lines (0,2) with twiddle W8^0 and lines (1,3) with W8^2, as in the flow graph.
// Outputs y[0..3] are the (scaled) 4-point DFT of the stage-1 inputs.
// Arrays carry signed DW-bit real and imaginary parts. Combinational.
module butterfly_4input #(
  parameter int unsigned DW = fft_pkg::DATA_W,
  parameter int unsigned TW = fft_pkg::TWID_W
) (
  input  logic signed [DW-1:0] x_re [4],
  input  logic signed [DW-1:0] x_im [4],
  input  logic                 inverse,
  output logic signed [DW-1:0] y_re [4],
  output logic signed [DW-1:0] y_im [4]
);
  for (genvar i = 0; i < 2; i++) begin : g_bf
    butterfly8 #(.DW(DW), .TW(TW), .K(2 * i)) u_bf (
      .a0_re(x_re[i]),   .a0_im(x_im[i]),
      .a1_re(x_re[i+2]), .a1_im(x_im[i+2]),
      .inverse(inverse),
      .b0_re(y_re[i]),   .b0_im(y_im[i]),
      .b1_re(y_re[i+2]), .b1_im(y_im[i+2]));
  end
endmodule
