// Butterfly unit of the processing element, in reversible arithmetic: the row's LANES
// words form LANES/2 radix-2 butterflies pairing lane i with lane i + LANES/2.
//   out[i]           = in[i] + in[i + LANES/2]
//   out[i + LANES/2] = in[i] - in[i + LANES/2]
// The twiddle product has already been applied by the CORDIC unit. Each sum and
// difference is a reversible ripple adder/subtractor one bit wider than the input, so
// nothing overflows; the scaling unit brings the width back. Combinational.
module pe_butterfly_unit #(
  parameter int unsigned LANES = bfp_pkg::BANKS,
  parameter int unsigned W     = bfp_pkg::PART_W + 1
) (
  input  logic signed [W-1:0] in_re  [LANES],
  input  logic signed [W-1:0] in_im  [LANES],
  output logic signed [W:0]   out_re [LANES],
  output logic signed [W:0]   out_im [LANES]
);
  localparam int unsigned H = LANES / 2;

  for (genvar i = 0; i < H; i++) begin : g_bf
    logic signed [W:0] ar, ai, br, bi;
    assign ar = (W+1)'(in_re[i]);
    assign ai = (W+1)'(in_im[i]);
    assign br = (W+1)'(in_re[i+H]);
    assign bi = (W+1)'(in_im[i+H]);
    rev_addsub #(.W(W+1)) u_add_re (.a(ar), .b(br), .sub(1'b0), .y(out_re[i]),   .co());
    rev_addsub #(.W(W+1)) u_add_im (.a(ai), .b(bi), .sub(1'b0), .y(out_im[i]),   .co());
    rev_addsub #(.W(W+1)) u_sub_re (.a(ar), .b(br), .sub(1'b1), .y(out_re[i+H]), .co());
    rev_addsub #(.W(W+1)) u_sub_im (.a(ai), .b(bi), .sub(1'b1), .y(out_im[i+H]), .co());
  end
endmodule
