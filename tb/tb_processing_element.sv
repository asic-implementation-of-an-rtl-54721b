// Self-checking testbench for processing_element: random rows with random twiddle
// indices, row exponents and group exponent vectors, one row per cycle. Each result
// (one clock later) is compared with the real-valued model of bfp_ref_pkg: rotation,
// alignment to the largest exponent, butterfly, then scaled by the reported exponent.
// Counts alignment shifts, scaling shifts and exponent overflows; each must occur.
module tb_processing_element;
  import bfp_pkg::*;
  import bfp_ref_pkg::pe_ref, bfp_ref_pkg::row_errors;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, out_valid, exp_ovf;
  cword_t in_data [BANKS], out_data [BANKS];
  logic [EXP_W-1:0] row_exp, blk_exps [ROWS], out_exp;
  logic [ANG_W-1:0] tw_idx [BANKS];
  int checks = 0, failures = 0, n_align = 0, n_scale = 0, n_ovf = 0, n_rows = 0;

  processing_element dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .row_exp(row_exp), .blk_exps(blk_exps), .tw_idx(tw_idx),
    .out_valid(out_valid), .out_data(out_data), .out_exp(out_exp), .exp_ovf(exp_ovf));

  initial begin
    int xr[16], xi[16], k[16], dr[16], di[16];
    real br[16], bi[16];
    int e_row, e_com, errs;
    rst_n = 0; in_valid = 0; row_exp = '0;
    foreach (in_data[l]) begin in_data[l] = '0; tw_idx[l] = '0; end
    foreach (blk_exps[r]) blk_exps[r] = '0;
    @(negedge clk); @(negedge clk);
    checks++; if (out_valid) begin failures++; $display("FAIL out_valid during reset"); end
    rst_n = 1;
    for (int it = 0; it < 1500; it++) begin
      int amp;
      amp = (it % 3 == 0) ? 2000 : 8191;
      for (int l = 0; l < BANKS; l++) begin
        xr[l] = $urandom_range(0, 2 * amp) - amp; xi[l] = $urandom_range(0, 2 * amp) - amp;
        k[l] = (l < 8) ? 0 : $urandom_range(0, 255);
        in_data[l].re = PART_W'(xr[l]); in_data[l].im = PART_W'(xi[l]);
        tw_idx[l] = ANG_W'(k[l]);
      end
      e_row = (it % 8 == 0) ? 7 : $urandom_range(0, 3);
      e_com = e_row;
      for (int r = 0; r < ROWS; r++) begin
        blk_exps[r] = EXP_W'((it % 4 == 0) ? e_row : $urandom_range(0, 7));
        if (blk_exps[r] > e_com) e_com = blk_exps[r];
      end
      row_exp = EXP_W'(e_row);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL no out_valid one clock after in_valid"); end
      pe_ref(xr, xi, k, e_row, e_com, br, bi);
      for (int l = 0; l < BANKS; l++) begin dr[l] = out_data[l].re; di[l] = out_data[l].im; end
      if (exp_ovf) n_ovf++;
      else begin
        checks++;
        errs = row_errors(dr, di, out_exp, e_com, br, bi);
        if (errs != 0) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d: %0d parts off (e_row %0d e_com %0d e_out %0d)", it, errs, e_row, e_com, out_exp);
        end
      end
      if (e_com != e_row) n_align++;
      if (out_exp > e_com) n_scale++;
      n_rows++;
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid without in_valid"); end
    end
    $display("rows=%0d aligned=%0d scaled=%0d exponent_overflows=%0d", n_rows, n_align, n_scale, n_ovf);
    checks++; if (n_align == 0) begin failures++; $display("FAIL no alignment"); end
    checks++; if (n_scale == 0) begin failures++; $display("FAIL no scaling"); end
    checks++; if (n_ovf == 0)   begin failures++; $display("FAIL no exponent overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
