// Toffoli (controlled-controlled-NOT) gate, 3x3 reversible:
// (a, b, c) -> (p, q, r) = (a, b, c ^ (a & b)). Combinational.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = c ^ (a & b);
endmodule
