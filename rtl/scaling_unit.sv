// Scaling unit: returns a row of butterfly results to the 14-bit word format and
// updates the block exponent. It finds the smallest right shift s (0 .. W-PART_W) after
// which every real and imaginary part of the row fits PART_W signed bits, shifts all
// words by s (arithmetic, floor) and outputs exponent = in_exp + s. If that exceeds the
// 3-bit exponent range it is held at the maximum and exp_ovf is raised. Combinational.
module scaling_unit #(
  parameter int unsigned LANES = bfp_pkg::BANKS,
  parameter int unsigned W     = bfp_pkg::PART_W + 2,
  parameter int unsigned EXP_W = bfp_pkg::EXP_W
) (
  input  logic signed [W-1:0] in_re    [LANES],
  input  logic signed [W-1:0] in_im    [LANES],
  input  logic [EXP_W-1:0]    in_exp,
  output bfp_pkg::cword_t     out_data [LANES],
  output logic [EXP_W-1:0]    out_exp,
  output logic                exp_ovf
);
  localparam int unsigned P  = bfp_pkg::PART_W;
  localparam int unsigned MS = W - P;           // largest shift needed

  function automatic logic fits(input logic signed [W-1:0] v, input int unsigned s);
    logic signed [W-1:0] t;
    t = v >>> s;
    return (t <= W'(2 ** (P - 1) - 1)) && (t >= -W'(2 ** (P - 1)));
  endfunction

  int unsigned s;
  logic [EXP_W:0] e;

  always_comb begin
    s = MS;
    for (int c = MS; c >= 0; c--) begin
      logic ok;
      ok = 1'b1;
      for (int l = 0; l < LANES; l++)
        if (!fits(in_re[l], c) || !fits(in_im[l], c)) ok = 1'b0;
      if (ok) s = c;
    end
    for (int l = 0; l < LANES; l++) begin
      out_data[l].re = P'(in_re[l] >>> s);
      out_data[l].im = P'(in_im[l] >>> s);
    end
    e       = (EXP_W+1)'(in_exp) + (EXP_W+1)'(s);
    exp_ovf = e[EXP_W];
    out_exp = exp_ovf ? '1 : e[EXP_W-1:0];
  end
endmodule
