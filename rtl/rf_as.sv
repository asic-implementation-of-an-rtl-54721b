// RF(A/S): reversible full adder / full subtractor built from two RH(A/S) cells.
//
// The first RH cell takes Input1 (x) and Input2 (y); the second takes the first cell's
// sum and Input3 (cin, the carry-in when adding or the borrow-in when subtracting).
//   sd   = x ^ y ^ cin                       (sum and difference are the same bit)
//   cout = carry of x + y + cin  = c1 | c2
//   bout = borrow of x - y - cin = b1 | b2
// c1 and c2 are never 1 together (c1 = 1 forces the first sum to 0), and likewise b1 and
// b2, so each OR is done by a Feynman gate (XOR), which keeps the cell reversible.
// Two-RH structure and truth tables follow the document; the XOR merge is this
// design's. The en input is the RH cells' constant-1 ancilla. Combinational.
module rf_as (
  input  logic x,
  input  logic y,
  input  logic cin,
  input  logic en,
  output logic sd,
  output logic cout,
  output logic bout
);
  logic s1, b1, c1;
  logic b2, c2;

  rh_as u_rh1 (.x(x),  .y(y),   .en(en), .sd(s1), .bout(b1), .cout(c1));
  rh_as u_rh2 (.x(s1), .y(cin), .en(en), .sd(sd), .bout(b2), .cout(c2));

  feynman_gate u_cor (.a(c1), .b(c2), .p(), .q(cout));
  feynman_gate u_bor (.a(b1), .b(b2), .p(), .q(bout));
endmodule
