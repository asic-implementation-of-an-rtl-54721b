// 8-point radix-2 decimation-in-time FFT / inverse FFT in reversible arithmetic.
//
// Structure: the inputs are taken in bit-reversed order (x0, x4, x2, x6, x1, x5, x3, x7)
// by four 2-input butterflies (twiddle W8^0), whose outputs feed two 4-input butterfly
// groups (W8^0, W8^2) and then one 8-input group (W8^0..W8^3); X(0)..X(7) come out in
// natural order. Every adder, subtractor and multiplier inside is built from reversible
// gates (Feynman, Toffoli, Peres, Fredkin) through the RH/RF adder/subtractor cells.
// Interface: f_re[n] / y_re[k] are the 8-bit sample and bin buses (pins f0..f7 and
// y0..y7); f_im / y_im add the imaginary parts. inverse = 0 gives
// y = DFT(f) / 8, inverse = 1 gives y = IDFT(f) with its 1/N (conjugate twiddles); each
// butterfly halves and saturates its outputs. Purely combinational: outputs settle after
// the ripple delay of three butterfly stages; there is no clock.
// Stage structure, bit-reversed input order and twiddles follow the document; the
// imaginary ports, the inverse pin and the scaling are this design's choices.
module FFT_8bit #(
  parameter int unsigned DW = fft_pkg::DATA_W,
  parameter int unsigned TW = fft_pkg::TWID_W
) (
  input  logic signed [DW-1:0] f_re [8],
  input  logic signed [DW-1:0] f_im [8],
  input  logic                 inverse,
  output logic signed [DW-1:0] y_re [8],
  output logic signed [DW-1:0] y_im [8]
);
  import fft_pkg::bitrev;

  // stage 1: butterflies on (x(bitrev(2m)), x(bitrev(2m+1))), i.e. (x0,x4) (x2,x6) ...
  logic signed [DW-1:0] s1_re [8], s1_im [8];
  for (genvar m = 0; m < 4; m++) begin : g_st1
    localparam int unsigned I0 = bitrev(2 * m);
    localparam int unsigned I1 = bitrev(2 * m + 1);
    butterfly8 #(.DW(DW), .TW(TW), .K(0)) u_bf (
      .a0_re(f_re[I0]), .a0_im(f_im[I0]),
      .a1_re(f_re[I1]), .a1_im(f_im[I1]),
      .inverse(inverse),
      .b0_re(s1_re[2*m]),   .b0_im(s1_im[2*m]),
      .b1_re(s1_re[2*m+1]), .b1_im(s1_im[2*m+1]));
  end

  // stage 2: two 4-input groups on lines 0..3 and 4..7
  logic signed [DW-1:0] s2_re [8], s2_im [8];
  for (genvar g = 0; g < 2; g++) begin : g_st2
    logic signed [DW-1:0] xr [4], xi [4], yr [4], yi [4];
    for (genvar i = 0; i < 4; i++) begin : g_wire
      assign xr[i] = s1_re[4*g+i];
      assign xi[i] = s1_im[4*g+i];
      assign s2_re[4*g+i] = yr[i];
      assign s2_im[4*g+i] = yi[i];
    end
    butterfly_4input #(.DW(DW), .TW(TW)) u_grp (
      .x_re(xr), .x_im(xi), .inverse(inverse), .y_re(yr), .y_im(yi));
  end

  // stage 3: one 8-input group
  butterfly_8in #(.DW(DW), .TW(TW)) u_st3 (
    .x_re(s2_re), .x_im(s2_im), .inverse(inverse), .y_re(y_re), .y_im(y_im));
endmodule
