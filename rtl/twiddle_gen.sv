// Twiddle factor generator for the 8-point FFT: W8^k = cos(2*pi*k/8) - j*sin(2*pi*k/8).
//
// Outputs the real and imaginary parts of W8^k for k = 0..3 as signed TW-bit words with
// TW-2 fraction bits (ONE = 2^(TW-2) stands for 1.0). The values are the document's
// 1, 0.707 - 0.707j, -j and -0.707 - 0.707j; 0.707 is rounded to the nearest step
// (45/64 for TW = 8). In inverse mode the conjugate W8^-k is produced, which turns the
// butterflies into an inverse FFT. A constant table stands in for the sine-wave generator
// with error-compensation table the document proposes: for N = 8 only these four values
// occur. Combinational.
module twiddle_gen #(
  parameter int unsigned TW = fft_pkg::TWID_W
) (
  input  logic [1:0]           k,
  input  logic                 inverse,
  output logic signed [TW-1:0] w_re,
  output logic signed [TW-1:0] w_im
);
  localparam logic signed [TW-1:0] ONE = TW'(1 << (TW - 2));
  localparam logic signed [TW-1:0] C45 = TW'((fft_pkg::COS45_PM * (1 << (TW - 2)) + 500) / 1000);

  logic signed [TW-1:0] im_fwd;

  always_comb begin
    unique case (k)
      2'd0:    begin w_re = ONE;  im_fwd = '0;   end
      2'd1:    begin w_re = C45;  im_fwd = -C45; end
      2'd2:    begin w_re = '0;   im_fwd = -ONE; end
      default: begin w_re = -C45; im_fwd = -C45; end
    endcase
    w_im = inverse ? -im_fwd : im_fwd;
  end
endmodule
