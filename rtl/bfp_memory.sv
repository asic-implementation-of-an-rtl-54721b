// BFP memory: the block exponents of the data memory, two groups of ROWS 3-bit
// exponents (one per row of 16 words) that swap roles together with the data groups.
// The PE side reads the whole exponent vector of its group at once (16 x 3 bits) and
// writes back one exponent (1 x 3 bits) for the row it stores. The I/O side writes the
// exponent of each incoming row and reads the exponents of the outgoing group. Reads
// are combinational; writes take effect at the clock edge. Reset clears all exponents
// (active-low, synchronous). Sizes follow the architecture; one exponent per row is
// this design's reading.
module bfp_memory #(
  parameter int unsigned ROWS  = bfp_pkg::ROWS,
  parameter int unsigned EXP_W = bfp_pkg::EXP_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    swap,
  // I/O side
  input  logic                    io_we,
  input  logic [$clog2(ROWS)-1:0] io_addr,
  input  logic [EXP_W-1:0]        io_wexp,
  output logic [EXP_W-1:0]        io_exps [ROWS],
  // processing-element side
  input  logic                    pe_we,
  input  logic [$clog2(ROWS)-1:0] pe_addr,
  input  logic [EXP_W-1:0]        pe_wexp,
  output logic [EXP_W-1:0]        pe_exps [ROWS]
);
  logic [EXP_W-1:0] grp [2][ROWS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int g = 0; g < 2; g++)
        for (int r = 0; r < ROWS; r++) grp[g][r] <= '0;
    end else begin
      if (io_we) grp[swap ? 1 : 0][io_addr] <= io_wexp;
      if (pe_we) grp[swap ? 0 : 1][pe_addr] <= pe_wexp;
    end
  end

  assign io_exps = swap ? grp[1] : grp[0];
  assign pe_exps = swap ? grp[0] : grp[1];
endmodule
