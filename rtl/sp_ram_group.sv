// One memory group: BANKS single-port banks of ROWS words each, addressed together so
// that one access moves a whole row of BANKS complex words. Each bank is a plain array
// with one port: a cycle with en = 1 either writes the row (we = 1) or reads it
// (we = 0); read data appear one clock after the read. No reset (memory contents).
module sp_ram_group #(
  parameter int unsigned BANKS = bfp_pkg::BANKS,
  parameter int unsigned ROWS  = bfp_pkg::ROWS
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic                    we,
  input  logic [$clog2(ROWS)-1:0] addr,
  input  bfp_pkg::cword_t         wdata [BANKS],
  output bfp_pkg::cword_t         rdata [BANKS]
);
  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    bfp_pkg::cword_t mem [ROWS];
    always_ff @(posedge clk) begin
      if (en) begin
        if (we) mem[addr] <= wdata[b];
        else    rdata[b]  <= mem[addr];
      end
    end
  end
endmodule
