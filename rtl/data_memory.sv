// Data memory of the BFP FFT processor: two groups of 16 single-port banks (256 complex
// 28-bit words each) behind two crossbars. While one group is filled from the input
// and emptied to the output (I/O side), the other serves the processing element (PE
// side); swap exchanges the roles (swap = 0: group 1 on the I/O side, group 2 on the PE
// side). Each side moves one row of 16 words per cycle; reads return data one clock
// later, through the crossbar setting of the read cycle. The two-group, 16-bank,
// single-port organisation and the crossbars follow the architecture; the row-wide
// access and the swap timing are this design's choices.
module data_memory #(
  parameter int unsigned BANKS = bfp_pkg::BANKS,
  parameter int unsigned ROWS  = bfp_pkg::ROWS
) (
  input  logic                    clk,
  input  logic                    swap,
  // I/O side
  input  logic                    io_en,
  input  logic                    io_we,
  input  logic [$clog2(ROWS)-1:0] io_addr,
  input  bfp_pkg::cword_t         io_wdata [BANKS],
  output bfp_pkg::cword_t         io_rdata [BANKS],
  // processing-element side
  input  logic                    pe_en,
  input  logic                    pe_we,
  input  logic [$clog2(ROWS)-1:0] pe_addr,
  input  bfp_pkg::cword_t         pe_wdata [BANKS],
  output bfp_pkg::cword_t         pe_rdata [BANKS]
);
  logic                    g_en   [2];
  logic                    g_we   [2];
  logic [$clog2(ROWS)-1:0] g_addr [2];
  bfp_pkg::cword_t         g_wdata [2][BANKS];
  bfp_pkg::cword_t         g_rdata [2][BANKS];
  logic                    swap_q;

  // write-side crossbar: group g is on the I/O side when g == swap
  always_comb begin
    for (int g = 0; g < 2; g++) begin
      if (g[0] == swap) begin
        g_en[g] = io_en; g_we[g] = io_we; g_addr[g] = io_addr; g_wdata[g] = io_wdata;
      end else begin
        g_en[g] = pe_en; g_we[g] = pe_we; g_addr[g] = pe_addr; g_wdata[g] = pe_wdata;
      end
    end
  end

  for (genvar g = 0; g < 2; g++) begin : g_grp
    sp_ram_group #(.BANKS(BANKS), .ROWS(ROWS)) u_grp (
      .clk(clk), .en(g_en[g]), .we(g_we[g]), .addr(g_addr[g]),
      .wdata(g_wdata[g]), .rdata(g_rdata[g]));
  end

  // read-side crossbar follows the setting of the cycle that issued the read
  always_ff @(posedge clk) swap_q <= swap;

  assign io_rdata = swap_q ? g_rdata[1] : g_rdata[0];
  assign pe_rdata = swap_q ? g_rdata[0] : g_rdata[1];
endmodule
