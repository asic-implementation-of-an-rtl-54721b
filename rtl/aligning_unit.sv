// Aligning unit: brings a row of words to the common block exponent before the butterfly.
// The row's own exponent (row_exp) and the exponents of all rows of the block
// (blk_exps, read in parallel from the BFP memory) are compared; the largest is the
// common exponent, and every word of the row is shifted right (arithmetic, floor) by
// (common - row_exp). The common exponent is passed on with the row. Combinational.
module aligning_unit #(
  parameter int unsigned LANES = bfp_pkg::BANKS,
  parameter int unsigned W     = bfp_pkg::PART_W + 1,
  parameter int unsigned ROWS  = bfp_pkg::ROWS,
  parameter int unsigned EXP_W = bfp_pkg::EXP_W
) (
  input  logic signed [W-1:0] in_re    [LANES],
  input  logic signed [W-1:0] in_im    [LANES],
  input  logic [EXP_W-1:0]    row_exp,
  input  logic [EXP_W-1:0]    blk_exps [ROWS],
  output logic signed [W-1:0] out_re   [LANES],
  output logic signed [W-1:0] out_im   [LANES],
  output logic [EXP_W-1:0]    out_exp
);
  logic [EXP_W-1:0] shift;

  always_comb begin
    out_exp = row_exp;
    for (int r = 0; r < ROWS; r++)
      if (blk_exps[r] > out_exp) out_exp = blk_exps[r];
    shift = out_exp - row_exp;
    for (int l = 0; l < LANES; l++) begin
      out_re[l] = in_re[l] >>> shift;
      out_im[l] = in_im[l] >>> shift;
    end
  end
endmodule
