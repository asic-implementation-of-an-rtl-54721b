// Top level: the two FFT designs of the reversible radix-2 butterfly (R2B) FFT, side by
// side, each with its own ports.
//   * FFT_8bit: the 8-point combinational DIT FFT / inverse FFT whose adders,
//     subtractors and multipliers are built from reversible gates (ports fft_*).
//   * fft_processor_5g: the memory-based block-floating-point FFT processor datapath for
//     OFDM (two 16-bank data memory groups, BFP exponent memory, processing element with
//     CORDIC, aligning, reversible butterfly and scaling units). Its sequencing
//     controller is not included; the controller's signals are ports (proc_*).
// See the two modules for interfaces and timing. Defaults are the designs' own sizes.
module r2b_fft_top (
  // 8-point FFT
  input  logic signed [fft_pkg::DATA_W-1:0] fft_f_re [8],
  input  logic signed [fft_pkg::DATA_W-1:0] fft_f_im [8],
  input  logic                              fft_inverse,
  output logic signed [fft_pkg::DATA_W-1:0] fft_y_re [8],
  output logic signed [fft_pkg::DATA_W-1:0] fft_y_im [8],
  // BFP FFT processor
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              proc_swap,
  input  logic                              proc_io_en,
  input  logic                              proc_io_we,
  input  logic [bfp_pkg::ROW_AW-1:0]        proc_io_addr,
  input  bfp_pkg::cword_t                   proc_io_wdata [bfp_pkg::BANKS],
  input  logic [bfp_pkg::EXP_W-1:0]         proc_io_wexp,
  output bfp_pkg::cword_t                   proc_io_rdata [bfp_pkg::BANKS],
  output logic [bfp_pkg::EXP_W-1:0]         proc_io_exps  [bfp_pkg::ROWS],
  input  logic                              proc_pe_rd,
  input  logic [bfp_pkg::ROW_AW-1:0]        proc_pe_addr,
  input  logic [bfp_pkg::ANG_W-1:0]         proc_tw_idx   [bfp_pkg::BANKS],
  output logic                              proc_pe_wb,
  output logic                              proc_exp_ovf
);
  FFT_8bit u_fft8 (
    .f_re(fft_f_re), .f_im(fft_f_im), .inverse(fft_inverse), .y_re(fft_y_re), .y_im(fft_y_im));

  fft_processor_5g u_proc (
    .clk(clk), .rst_n(rst_n), .swap(proc_swap),
    .io_en(proc_io_en), .io_we(proc_io_we), .io_addr(proc_io_addr), .io_wdata(proc_io_wdata),
    .io_wexp(proc_io_wexp), .io_rdata(proc_io_rdata), .io_exps(proc_io_exps),
    .pe_rd(proc_pe_rd), .pe_addr(proc_pe_addr), .tw_idx(proc_tw_idx),
    .pe_wb(proc_pe_wb), .exp_ovf(proc_exp_ovf));
endmodule
