// RH(A/S): reversible half adder / half subtractor in one 3x3 cell.
//
// Inputs X, Y and an enable line that is tied to 1; outputs
//   sd   = X ^ Y         (sum of X+Y, difference of X-Y)
//   bout = (X & Y) ^ Y   (borrow of X-Y, i.e. ~X & Y)
//   cout = X & Y         (carry of X+Y)
// so the one cell gives the half-adder and half-subtractor truth tables together.
// The output equations are the document's; the gate cascade that realises them is this
// design's: NOT on the enable line, a Toffoli gate adding X&Y onto it, a Feynman gate
// X ^= Y and a Feynman gate Y ^= (enable line). The mapping is a bijection on the three
// lines; with en = 0 the carry and borrow come out inverted. Combinational, no clock.
module rh_as (
  input  logic x,
  input  logic y,
  input  logic en,
  output logic sd,
  output logic bout,
  output logic cout
);
  logic anc;          // enable line after the NOT gate
  logic tx, ty, tz;   // lines after the Toffoli gate
  logic fx;           // X line after X ^= Y (Y line passes unchanged)
  logic fy_c;         // copy of the control of the last Feynman gate

  assign anc = ~en;
  toffoli_gate u_tof (.a(x), .b(y), .c(anc), .p(tx), .q(ty), .r(tz));
  feynman_gate u_fx  (.a(ty), .b(tx), .p(), .q(fx));
  feynman_gate u_fy  (.a(tz), .b(ty), .p(fy_c), .q(bout));

  assign sd   = fx;
  assign cout = fy_c;
endmodule
