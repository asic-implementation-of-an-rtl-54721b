// Feynman (controlled-NOT) gate, the 2x2 reversible gate: (a, b) -> (p, q) = (a, a ^ b).
// With b tied to 0 it copies a, which is how reversible circuits fan a signal out.
// Purely combinational, no timing.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
