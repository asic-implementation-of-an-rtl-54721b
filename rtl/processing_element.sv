// Processing element of the BFP FFT processor: CORDIC unit -> aligning unit -> butterfly
// unit -> scaling unit, in the order of the architecture, with one output register.
//
// A row of LANES complex words enters with its row exponent, the block's exponent
// vector and one twiddle index per lane. The CORDIC unit rotates every word by its
// twiddle, the aligning unit shifts the row to the block's largest exponent, the
// butterfly unit forms the LANES/2 sums and differences (lane i with lane i+LANES/2),
// and the scaling unit returns the row to 14-bit parts with its new exponent. Latency:
// out_valid/out_data/out_exp follow in_valid by one clock. Reset (active-low,
// synchronous) clears out_valid. The register stage is this design's choice.
module processing_element #(
  parameter int unsigned LANES = bfp_pkg::BANKS,
  parameter int unsigned ROWS  = bfp_pkg::ROWS,
  parameter int unsigned AW    = bfp_pkg::ANG_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  bfp_pkg::cword_t              in_data  [LANES],
  input  logic [bfp_pkg::EXP_W-1:0]    row_exp,
  input  logic [bfp_pkg::EXP_W-1:0]    blk_exps [ROWS],
  input  logic [AW-1:0]                tw_idx   [LANES],
  output logic                         out_valid,
  output bfp_pkg::cword_t              out_data [LANES],
  output logic [bfp_pkg::EXP_W-1:0]    out_exp,
  output logic                         exp_ovf
);
  localparam int unsigned P = bfp_pkg::PART_W;

  logic signed [P:0]   c_re [LANES], c_im [LANES];
  logic signed [P:0]   a_re [LANES], a_im [LANES];
  logic signed [P+1:0] b_re [LANES], b_im [LANES];
  logic [bfp_pkg::EXP_W-1:0] a_exp, s_exp;
  bfp_pkg::cword_t     s_data [LANES];
  logic                s_ovf;

  cordic_unit #(.LANES(LANES), .AW(AW)) u_cordic (
    .in_data(in_data), .tw_idx(tw_idx), .out_re(c_re), .out_im(c_im));

  aligning_unit #(.LANES(LANES), .W(P + 1), .ROWS(ROWS)) u_align (
    .in_re(c_re), .in_im(c_im), .row_exp(row_exp), .blk_exps(blk_exps),
    .out_re(a_re), .out_im(a_im), .out_exp(a_exp));

  pe_butterfly_unit #(.LANES(LANES), .W(P + 1)) u_bf (
    .in_re(a_re), .in_im(a_im), .out_re(b_re), .out_im(b_im));

  scaling_unit #(.LANES(LANES), .W(P + 2)) u_scale (
    .in_re(b_re), .in_im(b_im), .in_exp(a_exp),
    .out_data(s_data), .out_exp(s_exp), .exp_ovf(s_ovf));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
    end
    if (in_valid) begin
      out_data <= s_data;
      out_exp  <= s_exp;
      exp_ovf  <= s_ovf;
    end
  end
endmodule
