// Radix-2 decimation-in-time butterfly in reversible arithmetic (the 2-input butterfly
// of the 8-point FFT):
//   t  = W8^K * A1                  (complex product, truncated to data scale)
//   B0 = sat((A0 + t) >>> 1)
//   B1 = sat((A0 - t) >>> 1)
// The twiddle comes from twiddle_gen (conjugated when inverse = 1). The complex product
// takes four signed reversible multipliers; its real part is formed by a reversible
// subtractor (re*re - im*im) and its imaginary part by a reversible adder. After dropping
// the TW-2 twiddle fraction bits (floor), reversible adders and subtractors form A0 + t
// and A0 - t. Each output is halved and saturated to DW bits, so three stages scale the
// forward transform by 1/8 and make the inverse transform the exact 1/N IDFT.
// Multiply-then-add order, the adder/subtractor/multiplier/twiddle blocks and the W8^K
// twiddles follow the document; halving, saturation and truncation are this design's.
// Ports are signed DW-bit real/imaginary parts. Combinational, no clock.
module butterfly8 #(
  parameter int unsigned DW = fft_pkg::DATA_W,
  parameter int unsigned TW = fft_pkg::TWID_W,
  parameter int unsigned K  = 0               // twiddle exponent: W8^K, 0..3
) (
  input  logic signed [DW-1:0] a0_re,
  input  logic signed [DW-1:0] a0_im,
  input  logic signed [DW-1:0] a1_re,
  input  logic signed [DW-1:0] a1_im,
  input  logic                 inverse,
  output logic signed [DW-1:0] b0_re,
  output logic signed [DW-1:0] b0_im,
  output logic signed [DW-1:0] b1_re,
  output logic signed [DW-1:0] b1_im
);
  localparam int unsigned MW   = (DW > TW) ? DW : TW;  // multiplier operand width
  localparam int unsigned PW   = 2 * MW + 1;           // product sum width
  localparam int unsigned FRAC = TW - 2;               // twiddle fraction bits
  localparam int unsigned TWW  = PW - FRAC;            // width of t
  localparam int unsigned SW   = TWW + 1;              // width of A0 +/- t

  // ---------------- twiddle ----------------
  logic signed [TW-1:0] w_re, w_im;
  twiddle_gen #(.TW(TW)) u_tw (.k(2'(K)), .inverse(inverse), .w_re(w_re), .w_im(w_im));

  // ---------------- complex product A1 * W ----------------
  logic signed [MW-1:0]   xr, xi, wr, wi;
  logic signed [2*MW-1:0] m_rr, m_ii, m_ri, m_ir;
  logic signed [PW-1:0]   p_re, p_im;

  assign xr = MW'(a1_re);
  assign xi = MW'(a1_im);
  assign wr = MW'(w_re);
  assign wi = MW'(w_im);

  rev_smult #(.W(MW)) u_m_rr (.a(xr), .b(wr), .p(m_rr));
  rev_smult #(.W(MW)) u_m_ii (.a(xi), .b(wi), .p(m_ii));
  rev_smult #(.W(MW)) u_m_ri (.a(xr), .b(wi), .p(m_ri));
  rev_smult #(.W(MW)) u_m_ir (.a(xi), .b(wr), .p(m_ir));

  rev_addsub #(.W(PW)) u_pre (.a(PW'(m_rr)), .b(PW'(m_ii)), .sub(1'b1), .y(p_re), .co());
  rev_addsub #(.W(PW)) u_pim (.a(PW'(m_ri)), .b(PW'(m_ir)), .sub(1'b0), .y(p_im), .co());

  // ---------------- A0 +/- t ----------------
  logic signed [SW-1:0] t_re, t_im, a0r, a0i;
  logic signed [SW-1:0] s0_re, s0_im, s1_re, s1_im;

  assign t_re = SW'(p_re >>> FRAC);
  assign t_im = SW'(p_im >>> FRAC);
  assign a0r  = SW'(a0_re);
  assign a0i  = SW'(a0_im);

  rev_addsub #(.W(SW)) u_add_re (.a(a0r), .b(t_re), .sub(1'b0), .y(s0_re), .co());
  rev_addsub #(.W(SW)) u_add_im (.a(a0i), .b(t_im), .sub(1'b0), .y(s0_im), .co());
  rev_addsub #(.W(SW)) u_sub_re (.a(a0r), .b(t_re), .sub(1'b1), .y(s1_re), .co());
  rev_addsub #(.W(SW)) u_sub_im (.a(a0i), .b(t_im), .sub(1'b1), .y(s1_im), .co());

  // ---------------- halve and saturate ----------------
  function automatic logic signed [DW-1:0] half_sat(input logic signed [SW-1:0] v);
    logic signed [SW-1:0] h;
    h = v >>> 1;
    if (h > SW'(2 ** (DW - 1) - 1))   return {1'b0, {(DW-1){1'b1}}};
    else if (h < -SW'(2 ** (DW - 1))) return {1'b1, {(DW-1){1'b0}}};
    else                              return DW'(h);
  endfunction

  assign b0_re = half_sat(s0_re);
  assign b0_im = half_sat(s0_im);
  assign b1_re = half_sat(s1_re);
  assign b1_im = half_sat(s1_im);
endmodule
