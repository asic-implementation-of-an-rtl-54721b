// W-bit reversible adder/subtractor: y = a + b (sub = 0) or y = a - b (sub = 1), modulo 2^W.
//
// A ripple chain of RF(A/S) cells. Every cell produces both the full-adder carry and the
// full-subtractor borrow; a Fredkin gate per bit, controlled by sub, passes one of them
// to the next cell (the Fredkin gate is the reversible multiplexer). The chain starts
// with 0, so subtraction is direct (borrow chain), not two's complement. co is the carry
// out of the top bit when adding and the borrow out when subtracting.
// Using the reversible cells is the document's; the ripple word structure is this
// design's. Combinational; delay grows linearly with W.
module rev_addsub #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y,
  output logic         co
);
  logic [W:0] chain;   // carry or borrow into each bit
  assign chain[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic c_i, b_i;
    rf_as u_rf (.x(a[i]), .y(b[i]), .cin(chain[i]), .en(1'b1),
                .sd(y[i]), .cout(c_i), .bout(b_i));
    fredkin_gate u_mux (.c(sub), .a(c_i), .b(b_i), .p(), .q(chain[i+1]), .r());
  end

  assign co = chain[W];
endmodule
