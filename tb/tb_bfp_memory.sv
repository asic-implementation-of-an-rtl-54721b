// Self-checking testbench for bfp_memory: reset clears all exponents; the I/O side and
// the PE side write different groups in the same cycle; after a swap each side sees the
// other group; reads are compared with a shadow copy every cycle.
module tb_bfp_memory;
  import bfp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, swap, io_we, pe_we;
  logic [ROW_AW-1:0] io_addr, pe_addr;
  logic [EXP_W-1:0] io_wexp, pe_wexp, io_exps [ROWS], pe_exps [ROWS];
  int shadow [2][ROWS];
  int checks = 0, failures = 0;

  bfp_memory dut (.clk(clk), .rst_n(rst_n), .swap(swap),
    .io_we(io_we), .io_addr(io_addr), .io_wexp(io_wexp), .io_exps(io_exps),
    .pe_we(pe_we), .pe_addr(pe_addr), .pe_wexp(pe_wexp), .pe_exps(pe_exps));

  task automatic compare();
    for (int r = 0; r < ROWS; r++) begin
      checks++;
      if (io_exps[r] != shadow[swap][r] || pe_exps[r] != shadow[!swap][r]) begin
        failures++;
        if (failures < 10) $display("FAIL row %0d swap %0b io %0d pe %0d", r, swap, io_exps[r], pe_exps[r]);
      end
    end
  endtask

  initial begin
    rst_n = 0; swap = 0; io_we = 0; pe_we = 0; io_addr = '0; pe_addr = '0; io_wexp = '0; pe_wexp = '0;
    foreach (shadow[g, r]) shadow[g][r] = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    compare();
    for (int it = 0; it < 400; it++) begin
      io_we = 1'($urandom); pe_we = 1'($urandom);
      io_addr = ROW_AW'($urandom); pe_addr = ROW_AW'($urandom);
      io_wexp = EXP_W'($urandom); pe_wexp = EXP_W'($urandom);
      if (it % 50 == 49) swap = !swap;
      @(negedge clk);
      if (io_we) shadow[swap][io_addr] = io_wexp;
      if (pe_we) shadow[!swap][pe_addr] = pe_wexp;
      compare();
    end
    // reset clears everything again
    rst_n = 0; io_we = 0; pe_we = 0;
    @(negedge clk);
    foreach (shadow[g, r]) shadow[g][r] = 0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
