// Fredkin (controlled-swap) gate, 3x3 reversible: (c, a, b) -> (p, q, r) with p = c and
// q, r equal to a, b when c = 0 and swapped when c = 1. The q output is a reversible
// 2:1 multiplexer (q = c ? b : a). Combinational.
module fredkin_gate (
  input  logic c,
  input  logic a,
  input  logic b,
  output logic p,
  output logic q,
  output logic r
);
  assign p = c;
  assign q = c ? b : a;
  assign r = c ? a : b;
endmodule
