// CORDIC unit of the processing element: one rotation-mode CORDIC per lane multiplies
// each of the LANES complex words of a row by its own twiddle factor W_N^k (N = 2^AW),
// the twiddle multiplication of the decimation-in-time butterfly. A lane with k = 0
// passes its word through the CORDIC as well (rotation by zero, within about one LSB).
// Outputs have one integer bit more than the 14-bit parts. Combinational.
module cordic_unit #(
  parameter int unsigned LANES = bfp_pkg::BANKS,
  parameter int unsigned AW    = bfp_pkg::ANG_W
) (
  input  bfp_pkg::cword_t                    in_data [LANES],
  input  logic [AW-1:0]                      tw_idx  [LANES],
  output logic signed [bfp_pkg::PART_W:0]    out_re  [LANES],
  output logic signed [bfp_pkg::PART_W:0]    out_im  [LANES]
);
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    cordic_rotator #(.DW(bfp_pkg::PART_W), .AW(AW)) u_rot (
      .x_in(in_data[l].re), .y_in(in_data[l].im), .k(tw_idx[l]),
      .x_out(out_re[l]), .y_out(out_im[l]));
  end
endmodule
