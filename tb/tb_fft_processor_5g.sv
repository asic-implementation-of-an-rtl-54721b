// Self-checking testbench for fft_processor_5g, standing in for the missing controller.
//
// Two blocks of 16 rows (256 complex words each) go through the ping-pong memory:
// block 0 is loaded, then processed by the PE while block 1 is loaded into the other
// group; after the next swap block 1 is processed while block 0 is read out, and finally
// block 1 is read out. The PE handles one row every three cycles (read, twiddle, write
// back in place). Every row read out is compared with the real-valued model of
// bfp_ref_pkg using the exponents stored in the BFP memory. Mechanisms counted (each must
// occur): group swaps, write-backs, alignment, scaling, exponent overflow and I/O
// traffic overlapping PE processing.
module tb_fft_processor_5g;
  import bfp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, swap, io_en, io_we, pe_rd, pe_wb, exp_ovf;
  logic [ROW_AW-1:0] io_addr, pe_addr;
  cword_t io_wdata [BANKS], io_rdata [BANKS];
  logic [EXP_W-1:0] io_wexp, io_exps [ROWS];
  logic [ANG_W-1:0] tw_idx [BANKS];
  int checks = 0, failures = 0;
  int n_swap = 0, n_wb = 0, n_align = 0, n_scale = 0, n_ovf = 0, n_overlap = 0;

  // two blocks of 16 rows: inputs, exponents, expected results and reference exponent
  int  blk_re [2][ROWS][BANKS], blk_im [2][ROWS][BANKS], blk_k [2][ROWS][BANKS];
  int  blk_exp [2][ROWS];
  real exp_re [2][ROWS][BANKS], exp_im [2][ROWS][BANKS];
  int  exp_ecom [2][ROWS];
  bit  ovf_row [2][ROWS];   // exponent saturated: the stored row is clipped, not compared

  task automatic make_block(input int b, input bit with_top_exp);
    for (int r = 0; r < ROWS; r++) begin
      blk_exp[b][r] = (with_top_exp && r == ROWS - 1) ? 7 : $urandom_range(0, 2);
      for (int l = 0; l < BANKS; l++) begin
        blk_re[b][r][l] = $urandom_range(0, 16382) - 8191;
        blk_im[b][r][l] = $urandom_range(0, 16382) - 8191;
        blk_k[b][r][l]  = (l < BANKS / 2) ? 0 : $urandom_range(0, 255);
      end
    end
  endtask

  // one I/O-side cycle writing row r of block b (call at a negative edge)
  task automatic io_write_row(input int b, input int r);
    io_en = 1; io_we = 1; io_addr = ROW_AW'(r); io_wexp = EXP_W'(blk_exp[b][r]);
    for (int l = 0; l < BANKS; l++) begin
      io_wdata[l].re = PART_W'(blk_re[b][r][l]);
      io_wdata[l].im = PART_W'(blk_im[b][r][l]);
    end
  endtask

  // check row r of block b as read out on the I/O side (data valid now)
  task automatic io_check_row(input int b, input int r);
    int dr[16], di[16], errs;
    for (int l = 0; l < BANKS; l++) begin dr[l] = io_rdata[l].re; di[l] = io_rdata[l].im; end
    if (ovf_row[b][r]) return;
    checks++;
    errs = bfp_ref_pkg::row_errors(dr, di, io_exps[r], exp_ecom[b][r], exp_re[b][r], exp_im[b][r]);
    if (errs != 0) begin
      failures++;
      if (failures < 10) $display("FAIL block %0d row %0d: %0d parts off (exp %0d)", b, r, errs, io_exps[r]);
    end
  endtask

  // PE pass over the PE-side group holding block b, one row every three cycles;
  // the I/O side meanwhile runs io_job: 0 idle, 1 load block ob, 2 read out block ob.
  task automatic pe_pass(input int b, input int io_job, input int ob);
    int shadow_exp [ROWS];
    int io_row = 0, io_pending = -1;
    for (int r = 0; r < ROWS; r++) shadow_exp[r] = blk_exp[b][r];
    for (int r = 0; r < ROWS; r++) begin
      int e_com;
      for (int c = 0; c < 3; c++) begin
        // I/O side job, one row per cycle
        io_en = 0; io_we = 0;
        if (io_job == 1 && io_row < ROWS) begin io_write_row(ob, io_row); io_row++; n_overlap++; end
        if (io_job == 2 && io_row < ROWS) begin io_en = 1; io_we = 0; io_addr = ROW_AW'(io_row); io_pending = io_row; io_row++; n_overlap++; end
        else io_pending = -1;
        // PE side: read in cycle 0, twiddles in cycle 1, write-back in cycle 2
        pe_rd = (c == 0);
        pe_addr = (c == 0) ? ROW_AW'(r) : ROW_AW'($urandom);   // don't-care while not reading
        if (c == 1) begin
          for (int l = 0; l < BANKS; l++) tw_idx[l] = ANG_W'(blk_k[b][r][l]);
          e_com = 0;
          for (int q = 0; q < ROWS; q++) if (shadow_exp[q] > e_com) e_com = shadow_exp[q];
          exp_ecom[b][r] = e_com;
          begin
            int xr[16], xi[16], kk[16];
            real br[16], bi[16];
            for (int l = 0; l < BANKS; l++) begin xr[l] = blk_re[b][r][l]; xi[l] = blk_im[b][r][l]; kk[l] = blk_k[b][r][l]; end
            bfp_ref_pkg::pe_ref(xr, xi, kk, blk_exp[b][r], e_com, br, bi);
            for (int l = 0; l < BANKS; l++) begin exp_re[b][r][l] = br[l]; exp_im[b][r][l] = bi[l]; end
          end
          if (e_com != blk_exp[b][r]) n_align++;
        end
        if (c == 2) begin
          checks++;
          if (!pe_wb) begin failures++; $display("FAIL no write-back for row %0d", r); end
          else n_wb++;
          ovf_row[b][r] = exp_ovf;
          if (exp_ovf) n_ovf++;
        end
        @(negedge clk);
        if (io_pending >= 0) io_check_row(ob, io_pending);
      end
      // the exponent now stored for row r takes part in later alignments
      shadow_exp[r] = int'(dut.pe_exps[r]);
    end
    io_en = 0; io_we = 0; pe_rd = 0;
  endtask

  task automatic record_exps(input int b);
    for (int r = 0; r < ROWS; r++) if (io_exps[r] > exp_ecom[b][r]) n_scale++;
  endtask

  task automatic run_processor();
    rst_n = 0; swap = 0; io_en = 0; io_we = 0; pe_rd = 0; io_addr = '0; pe_addr = '0; io_wexp = '0;
    foreach (io_wdata[l]) io_wdata[l] = '0;
    foreach (tw_idx[l]) tw_idx[l] = '0;
    make_block(0, 0);
    make_block(1, 1);
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    // phase 1: load block 0 into group 1 (I/O side while swap = 0)
    for (int r = 0; r < ROWS; r++) begin io_write_row(0, r); @(negedge clk); end
    io_en = 0; io_we = 0;
    // phase 2: swap; PE processes block 0 while the I/O side loads block 1
    swap = 1; n_swap++;
    pe_pass(0, 1, 1);
    // phase 3: swap; PE processes block 1 while the I/O side reads block 0 out
    swap = 0; n_swap++;
    @(negedge clk);
    record_exps(0);
    pe_pass(1, 2, 0);
    // phase 4: swap; read block 1 out
    swap = 1; n_swap++;
    @(negedge clk);
    record_exps(1);
    for (int r = 0; r < ROWS; r++) begin
      io_en = 1; io_we = 0; io_addr = ROW_AW'(r);
      @(negedge clk);
      io_check_row(1, r);
    end
    io_en = 0;
    $display("processor: swaps=%0d write_backs=%0d aligned_rows=%0d scaled_rows=%0d exponent_overflows=%0d overlapped_io=%0d",
             n_swap, n_wb, n_align, n_scale, n_ovf, n_overlap);
    checks++; if (n_swap == 0)    begin failures++; $display("FAIL no swap"); end
    checks++; if (n_wb == 0)      begin failures++; $display("FAIL no write-back"); end
    checks++; if (n_align == 0)   begin failures++; $display("FAIL no alignment"); end
    checks++; if (n_scale == 0)   begin failures++; $display("FAIL no scaling"); end
    checks++; if (n_ovf == 0)     begin failures++; $display("FAIL no exponent overflow"); end
    checks++; if (n_overlap == 0) begin failures++; $display("FAIL no overlapped I/O"); end
  endtask

  fft_processor_5g dut (.clk(clk), .rst_n(rst_n), .swap(swap),
    .io_en(io_en), .io_we(io_we), .io_addr(io_addr), .io_wdata(io_wdata), .io_wexp(io_wexp),
    .io_rdata(io_rdata), .io_exps(io_exps),
    .pe_rd(pe_rd), .pe_addr(pe_addr), .tw_idx(tw_idx), .pe_wb(pe_wb), .exp_ovf(exp_ovf));

  initial begin
    run_processor();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
