// End-to-end testbench of r2b_fft_top at its default parameters, covering both designs.
//
// 8-point FFT: directed blocks (impulse, constant, tone on bin 1), forward/inverse round
// trips, full-range random blocks in both directions and a block that saturates, each
// output compared bit-exactly with the integer flow-graph model of fft_ref_pkg and with a
// floating-point DFT. BFP processor: two 256-word blocks through the ping-pong memories
// and the processing element, with this testbench acting as the sequencing controller;
// every row read out is compared with the real-valued model of bfp_ref_pkg. Mechanisms
// counted, each must occur: forward and inverse transforms, butterfly saturation, round
// trips, non-trivial twiddles, group swaps, write-backs, alignment, scaling, exponent
// overflow and I/O traffic overlapping PE processing.
module tb_r2b_fft_top;
  import bfp_pkg::*;
  import fft_ref_pkg::*;
  localparam int DW = 8, TW = 8;
  logic signed [DW-1:0] f_re [8], f_im [8], y_re [8], y_im [8];
  logic inverse;
  int n_fwd = 0, n_inv = 0, n_sat = 0, n_round = 0, n_twiddle = 0;
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
      shadow_exp[r] = int'(dut.u_proc.pe_exps[r]);
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

  r2b_fft_top dut (
    .fft_f_re(f_re), .fft_f_im(f_im), .fft_inverse(inverse), .fft_y_re(y_re), .fft_y_im(y_im),
    .clk(clk), .rst_n(rst_n), .proc_swap(swap),
    .proc_io_en(io_en), .proc_io_we(io_we), .proc_io_addr(io_addr), .proc_io_wdata(io_wdata),
    .proc_io_wexp(io_wexp), .proc_io_rdata(io_rdata), .proc_io_exps(io_exps),
    .proc_pe_rd(pe_rd), .proc_pe_addr(pe_addr), .proc_tw_idx(tw_idx),
    .proc_pe_wb(pe_wb), .proc_exp_ovf(exp_ovf));

  task automatic apply(input int xr[8], input int xi[8], input bit inv, input bit floatcheck);
    int er[8], ei[8];
    real fr[8], fi[8];
    int sat_before;
    for (int n = 0; n < 8; n++) begin f_re[n] = DW'(xr[n]); f_im[n] = DW'(xi[n]); end
    inverse = inv;
    #10;
    sat_before = sat_count;
    fft8_ref(xr, xi, inv, DW, TW, er, ei);
    if (inv) n_inv++; else n_fwd++;
    if (sat_count != sat_before) n_sat++;
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (y_re[k] != er[k] || y_im[k] != ei[k]) begin
        failures++;
        if (failures < 10) $display("FAIL inv=%0b X(%0d) got (%0d,%0d) exp (%0d,%0d)",
                                    inv, k, y_re[k], y_im[k], er[k], ei[k]);
      end
    end
    // truncation in three stages and the 45/64 twiddle stay within a few LSB
    if (floatcheck && sat_count == sat_before) begin
      dft8_real(xr, xi, inv, fr, fi);
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (rabs(real'(y_re[k]) - fr[k]) > 3.0 || rabs(real'(y_im[k]) - fi[k]) > 3.0) begin
          failures++;
          if (failures < 10) $display("FAIL float inv=%0b X(%0d) got (%0d,%0d) exp (%f,%f)",
                                      inv, k, y_re[k], y_im[k], fr[k], fi[k]);
        end
      end
    end
  endtask

  task automatic run_fft8();
    int xr[8], xi[8], zr[8], zi[8];
    sat_count = 0;
    twiddle_count = 0;

    // impulse of 64 at n = 0: every bin is 64/8 = 8
    xr = '{64, 0, 0, 0, 0, 0, 0, 0}; xi = '{default: 0};
    apply(xr, xi, 1'b0, 1'b1);
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (y_re[k] != 8 || y_im[k] != 0) begin failures++; $display("FAIL impulse bin %0d", k); end
    end

    // constant 40: X(0) = 40, all other bins 0
    xr = '{default: 40}; xi = '{default: 0};
    apply(xr, xi, 1'b0, 1'b1);
    checks++;
    if (y_re[0] != 40 || y_im[0] != 0) begin failures++; $display("FAIL constant X(0)"); end
    for (int k = 1; k < 8; k++) begin
      checks++;
      if (y_re[k] != 0 || y_im[k] != 0) begin failures++; $display("FAIL constant bin %0d", k); end
    end

    // complex tone exp(j*2*pi*n/8) * 80: energy in bin 1
    for (int n = 0; n < 8; n++) begin
      xr[n] = rnd(80.0 * $cos(2.0 * PI * n / 8.0));
      xi[n] = rnd(80.0 * $sin(2.0 * PI * n / 8.0));
    end
    apply(xr, xi, 1'b0, 1'b1);
    checks++;
    if (y_re[1] < 75 || rabs(real'(y_im[1])) > 3) begin failures++; $display("FAIL tone bin 1 = (%0d,%0d)", y_re[1], y_im[1]); end

    // round trips: forward then inverse returns x/8 (within a few LSB)
    repeat (50) begin
      for (int n = 0; n < 8; n++) begin xr[n] = int'($urandom_range(0, 200)) - 100; xi[n] = int'($urandom_range(0, 200)) - 100; end
      apply(xr, xi, 1'b0, 1'b1);
      for (int n = 0; n < 8; n++) begin zr[n] = y_re[n]; zi[n] = y_im[n]; end
      apply(zr, zi, 1'b1, 1'b1);
      n_round++;
      for (int n = 0; n < 8; n++) begin
        checks++;
        if (rabs(real'(y_re[n]) - real'(xr[n]) / 8.0) > 3.0 || rabs(real'(y_im[n]) - real'(xi[n]) / 8.0) > 3.0) begin
          failures++;
          $display("FAIL round trip n=%0d got (%0d,%0d) from (%0d,%0d)", n, y_re[n], y_im[n], xr[n], xi[n]);
        end
      end
    end

    // full-range random blocks in both directions (saturation happens here)
    repeat (1000) begin
      for (int n = 0; n < 8; n++) begin xr[n] = int'($signed(DW'($urandom))); xi[n] = int'($signed(DW'($urandom))); end
      apply(xr, xi, 1'($urandom), 1'b1);
    end

    // a block that drives the W8^1 butterfly of the last stage past full scale:
    // stage-2 line 1 is near -128 and line 5 near -128-128j
    xr = '{-128, -128, 0, 127, 127, 127, 0, -128};
    xi = '{0, -128, -128, -128, 0, 127, 127, 127};
    apply(xr, xi, 1'b0, 1'b0);

    n_twiddle = twiddle_count;
    $display("forward=%0d inverse=%0d saturating=%0d round_trips=%0d twiddled=%0d",
             n_fwd, n_inv, n_sat, n_round, n_twiddle);
    checks++; if (n_fwd == 0)     begin failures++; $display("FAIL no forward transform"); end
    checks++; if (n_inv == 0)     begin failures++; $display("FAIL no inverse transform"); end
    checks++; if (n_sat == 0)     begin failures++; $display("FAIL no saturation"); end
    checks++; if (n_round == 0)   begin failures++; $display("FAIL no round trip"); end
    checks++; if (n_twiddle == 0) begin failures++; $display("FAIL twiddles never exercised"); end
  endtask

  initial begin
    foreach (f_re[n]) begin f_re[n] = '0; f_im[n] = '0; end
    inverse = 1'b0;
    run_processor();
    run_fft8();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
