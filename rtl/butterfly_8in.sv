// Third (last) DIT stage of the 8-point FFT: four butterflies pairing lines i and i+4
// with twiddle W8^i, i = 0..3. Outputs are X(0)..X(7) in natural order.
// Arrays carry signed DW-bit real and imaginary parts. Combinational.
module butterfly_8in #(
  parameter int unsigned DW = fft_pkg::DATA_W,
  parameter int unsigned TW = fft_pkg::TWID_W
) (
  input  logic signed [DW-1:0] x_re [8],
  input  logic signed [DW-1:0] x_im [8],
  input  logic                 inverse,
  output logic signed [DW-1:0] y_re [8],
  output logic signed [DW-1:0] y_im [8]
);
  for (genvar i = 0; i < 4; i++) begin : g_bf
    butterfly8 #(.DW(DW), .TW(TW), .K(i)) u_bf (
      .a0_re(x_re[i]),   .a0_im(x_im[i]),
      .a1_re(x_re[i+4]), .a1_im(x_im[i+4]),
      .inverse(inverse),
      .b0_re(y_re[i]),   .b0_im(y_im[i]),
      .b1_re(y_re[i+4]), .b1_im(y_im[i+4]));
  end
endmodule
