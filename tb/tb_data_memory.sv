// Self-checking testbench for data_memory: fills group 1 through the I/O side while the
// PE side fills group 2, swaps, and reads both back through the other sides; then
// rewrites rows through the PE side and reads them out through the I/O side after a
// second swap. Checks every word against a shadow copy and the one-cycle read latency.
module tb_data_memory;
  import bfp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic swap, io_en, io_we, pe_en, pe_we;
  logic [ROW_AW-1:0] io_addr, pe_addr;
  cword_t io_wdata [BANKS], io_rdata [BANKS], pe_wdata [BANKS], pe_rdata [BANKS];
  cword_t shadow [2][ROWS][BANKS];
  int checks = 0, failures = 0, swaps = 0;

  data_memory dut (.clk(clk), .swap(swap),
    .io_en(io_en), .io_we(io_we), .io_addr(io_addr), .io_wdata(io_wdata), .io_rdata(io_rdata),
    .pe_en(pe_en), .pe_we(pe_we), .pe_addr(pe_addr), .pe_wdata(pe_wdata), .pe_rdata(pe_rdata));

  function automatic cword_t rnd_word();
    cword_t w;
    w.re = PART_W'($urandom);
    w.im = PART_W'($urandom);
    return w;
  endfunction

  task automatic check_row(input cword_t got [BANKS], input int g, input int r, input string side);
    for (int b = 0; b < BANKS; b++) begin
      checks++;
      if (got[b] != shadow[g][r][b]) begin
        failures++;
        if (failures < 10) $display("FAIL %s group %0d row %0d bank %0d", side, g, r, b);
      end
    end
  endtask

  initial begin
    swap = 0; io_en = 0; io_we = 0; pe_en = 0; pe_we = 0; io_addr = '0; pe_addr = '0;
    foreach (io_wdata[b]) begin io_wdata[b] = '0; pe_wdata[b] = '0; end
    @(negedge clk);
    // both sides write at once: I/O -> group 0, PE -> group 1
    for (int r = 0; r < ROWS; r++) begin
      io_en = 1; io_we = 1; io_addr = ROW_AW'(r);
      pe_en = 1; pe_we = 1; pe_addr = ROW_AW'(r);
      for (int b = 0; b < BANKS; b++) begin
        io_wdata[b] = rnd_word(); pe_wdata[b] = rnd_word();
        shadow[0][r][b] = io_wdata[b]; shadow[1][r][b] = pe_wdata[b];
      end
      @(negedge clk);
    end
    // swap and read both groups back through the opposite sides
    swap = 1; swaps++; io_we = 0; pe_we = 0;
    for (int r = 0; r < ROWS; r++) begin
      io_addr = ROW_AW'(r); pe_addr = ROW_AW'(ROWS - 1 - r);
      @(negedge clk);
      check_row(io_rdata, 1, r, "io");
      check_row(pe_rdata, 0, ROWS - 1 - r, "pe");
    end
    // PE side (now group 0) overwrites even rows; I/O side idle
    io_en = 0; pe_we = 1;
    for (int r = 0; r < ROWS; r += 2) begin
      pe_addr = ROW_AW'(r);
      for (int b = 0; b < BANKS; b++) begin pe_wdata[b] = rnd_word(); shadow[0][r][b] = pe_wdata[b]; end
      @(negedge clk);
    end
    // swap back: group 0 faces the I/O side again
    pe_en = 0; pe_we = 0; io_en = 1; swap = 0; swaps++;
    for (int r = 0; r < ROWS; r++) begin
      io_addr = ROW_AW'(r);
      @(negedge clk);
      check_row(io_rdata, 0, r, "io");
    end
    // a read issued just before a swap returns the group it was issued to
    io_en = 1; pe_en = 1; pe_we = 0; io_addr = ROW_AW'(3); pe_addr = ROW_AW'(5);
    @(negedge clk);
    swap = 1; swaps++; io_en = 0; pe_en = 0;
    #1;
    check_row(io_rdata, 0, 3, "io before swap");
    check_row(pe_rdata, 1, 5, "pe before swap");
    @(negedge clk);
    swap = 0; swaps++;
    // read data stay put while the port is idle
    io_en = 0; io_addr = '0;
    @(negedge clk);
    check_row(io_rdata, 0, 3, "io hold");
    checks++; if (swaps < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
