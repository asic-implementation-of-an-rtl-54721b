// Datapath of the block-floating-point FFT processor for OFDM: data memory (two groups
// of 16 single-port banks, 28-bit words), BFP exponent memory and the processing
// element (CORDIC, aligning, butterfly and scaling units), wired as in the architecture.
//
// The sequencing controller is not part of this module; its decisions arrive as ports.
// I/O side: io_* write incoming rows (with their exponent) into and read finished rows
// out of the group facing the outside; swap exchanges the groups. PE side, per row:
//   cycle t    pe_rd = 1, pe_addr = r      row r is read from the PE-side group
//   cycle t+1  tw_idx must hold the row's   the row and its exponent enter the PE
//              twiddle indices
//   cycle t+2  -                            the result is written back in place to row r
//                                           together with its new exponent
// The PE-side banks are single-port, so pe_rd must be low in a write-back cycle
// (checked by an assertion). Reset (active-low, synchronous) clears exponents and the
// pipeline's valid flags.
module fft_processor_5g #(
  parameter int unsigned BANKS = bfp_pkg::BANKS,
  parameter int unsigned ROWS  = bfp_pkg::ROWS,
  parameter int unsigned AW    = bfp_pkg::ANG_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       swap,
  // I/O side
  input  logic                       io_en,
  input  logic                       io_we,
  input  logic [$clog2(ROWS)-1:0]    io_addr,
  input  bfp_pkg::cword_t            io_wdata [BANKS],
  input  logic [bfp_pkg::EXP_W-1:0]  io_wexp,
  output bfp_pkg::cword_t            io_rdata [BANKS],
  output logic [bfp_pkg::EXP_W-1:0]  io_exps  [ROWS],
  // controller side of the processing element
  input  logic                       pe_rd,
  input  logic [$clog2(ROWS)-1:0]    pe_addr,
  input  logic [AW-1:0]              tw_idx   [BANKS],
  output logic                       pe_wb,
  output logic                       exp_ovf
);
  localparam int unsigned RAW = $clog2(ROWS);

  bfp_pkg::cword_t           pe_rdata [BANKS];
  bfp_pkg::cword_t           pe_out   [BANKS];
  logic [bfp_pkg::EXP_W-1:0] pe_exps  [ROWS];
  logic [bfp_pkg::EXP_W-1:0] pe_oexp;
  logic                      rd_q, pe_ovf;
  logic [RAW-1:0]            addr_q, addr_qq;
  logic                      mem_en, mem_we;
  logic [RAW-1:0]            mem_addr;

  // PE-side port of the data memory: write-back has the port, otherwise the read
  assign mem_en   = pe_rd | pe_wb;
  assign mem_we   = pe_wb;
  assign mem_addr = pe_wb ? addr_qq : pe_addr;

  data_memory #(.BANKS(BANKS), .ROWS(ROWS)) u_dmem (
    .clk(clk), .swap(swap),
    .io_en(io_en), .io_we(io_we), .io_addr(io_addr), .io_wdata(io_wdata), .io_rdata(io_rdata),
    .pe_en(mem_en), .pe_we(mem_we), .pe_addr(mem_addr), .pe_wdata(pe_out), .pe_rdata(pe_rdata));

  bfp_memory #(.ROWS(ROWS)) u_bfp (
    .clk(clk), .rst_n(rst_n), .swap(swap),
    .io_we(io_en & io_we), .io_addr(io_addr), .io_wexp(io_wexp), .io_exps(io_exps),
    .pe_we(pe_wb), .pe_addr(addr_qq), .pe_wexp(pe_oexp), .pe_exps(pe_exps));

  always_ff @(posedge clk) begin
    if (!rst_n) rd_q <= 1'b0;
    else        rd_q <= pe_rd & ~pe_wb;
    addr_q  <= pe_addr;
    addr_qq <= addr_q;
  end

  processing_element #(.LANES(BANKS), .ROWS(ROWS), .AW(AW)) u_pe (
    .clk(clk), .rst_n(rst_n), .in_valid(rd_q), .in_data(pe_rdata),
    .row_exp(pe_exps[addr_q]), .blk_exps(pe_exps), .tw_idx(tw_idx),
    .out_valid(pe_wb), .out_data(pe_out), .out_exp(pe_oexp), .exp_ovf(pe_ovf));

  assign exp_ovf = pe_wb & pe_ovf;

  // single-port rule: no PE read may be issued in a write-back cycle
  a_single_port : assert property (@(posedge clk) disable iff (!rst_n) !(pe_rd && pe_wb))
    else $error("PE read issued during write-back");
endmodule
