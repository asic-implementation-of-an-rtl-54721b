// Peres gate, 3x3 reversible: (a, b, c) -> (p, q, r) = (a, a ^ b, (a & b) ^ c).
// With c tied to 0 the third output is the reversible AND used for partial products;
// the first output passes a on so that it can feed the next gate. Combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
