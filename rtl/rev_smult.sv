// Signed W x W multiplier around the unsigned reversible array multiplier: p = a * b.
//
// Each operand's magnitude is formed by a reversible adder/subtractor as 0 + x or 0 - x,
// selected by its sign bit (the magnitude of -2^(W-1) is 2^(W-1), which fits W unsigned
// bits). The unsigned reversible array multiplier multiplies the magnitudes, and a
// 2W-bit reversible adder/subtractor gives 0 + |a||b| or 0 - |a||b| by the sign of the
// product. This sign-magnitude wrapping is this design's choice; the document's
// multiplier itself is unsigned. Combinational.
module rev_smult #(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);
  logic [W-1:0]   mag_a, mag_b;
  logic [2*W-1:0] mag_p;
  logic           neg;

  rev_addsub #(.W(W)) u_abs_a (.a('0), .b(a), .sub(a[W-1]), .y(mag_a), .co());
  rev_addsub #(.W(W)) u_abs_b (.a('0), .b(b), .sub(b[W-1]), .y(mag_b), .co());

  rev_mult #(.N(W)) u_mult (.a(mag_a), .b(mag_b), .p(mag_p));

  assign neg = a[W-1] ^ b[W-1];
  rev_addsub #(.W(2*W)) u_sign (.a('0), .b(mag_p), .sub(neg), .y(p), .co());
endmodule
