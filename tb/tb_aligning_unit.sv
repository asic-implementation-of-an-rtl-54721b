// Self-checking testbench for aligning_unit: random rows, row exponents and group
// exponent vectors; the common exponent must be the largest of all, and each part the
// input divided by 2^(common - row_exp), rounded down.
module tb_aligning_unit;
  import bfp_pkg::*;
  localparam int W = PART_W + 1;
  logic signed [W-1:0] in_re [BANKS], in_im [BANKS], out_re [BANKS], out_im [BANKS];
  logic [EXP_W-1:0] row_exp, blk_exps [ROWS], out_exp;
  int checks = 0, failures = 0, shifted = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  aligning_unit dut (.in_re(in_re), .in_im(in_im), .row_exp(row_exp), .blk_exps(blk_exps),
                     .out_re(out_re), .out_im(out_im), .out_exp(out_exp));

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int mx, sh;
      for (int l = 0; l < BANKS; l++) begin in_re[l] = W'($urandom); in_im[l] = W'($urandom); end
      row_exp = EXP_W'($urandom);
      mx = row_exp;
      for (int r = 0; r < ROWS; r++) begin
        blk_exps[r] = (it % 3 == 0) ? row_exp : EXP_W'($urandom_range(0, 1 + it % 7));
        if (blk_exps[r] > mx) mx = blk_exps[r];
      end
      #10;
      sh = mx - row_exp;
      if (sh > 0) shifted++;
      checks++;
      if (out_exp != mx) begin failures++; $display("FAIL exponent got %0d exp %0d", out_exp, mx); end
      for (int l = 0; l < BANKS; l++) begin
        int er, ei;
        er = int'(in_re[l]);
        ei = int'(in_im[l]);
        er = (er >= 0) ? er / (1 << sh) : -((-er + (1 << sh) - 1) / (1 << sh));
        ei = (ei >= 0) ? ei / (1 << sh) : -((-ei + (1 << sh) - 1) / (1 << sh));
        checks++;
        if (out_re[l] != er || out_im[l] != ei) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d shift %0d got (%0d,%0d) exp (%0d,%0d)", l, sh, out_re[l], out_im[l], er, ei);
        end
      end
    end
    checks++;
    if (shifted == 0) begin failures++; $display("FAIL no alignment shift exercised"); end
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
