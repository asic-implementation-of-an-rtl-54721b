// Self-checking testbench for scaling_unit: rows whose largest part needs a shift of
// 0, 1 or 2 to fit 14 bits, with random input exponents. Checks the chosen shift (the
// smallest that fits), the shifted parts, the new exponent and its overflow flag; every
// shift amount and the overflow must occur.
module tb_scaling_unit;
  import bfp_pkg::*;
  localparam int W = PART_W + 2;
  logic signed [W-1:0] in_re [BANKS], in_im [BANKS];
  logic [EXP_W-1:0] in_exp, out_exp;
  cword_t out_data [BANKS];
  logic exp_ovf;
  int checks = 0, failures = 0;
  int seen_shift [3] = '{0, 0, 0};
  int seen_ovf = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  scaling_unit dut (.in_re(in_re), .in_im(in_im), .in_exp(in_exp),
                    .out_data(out_data), .out_exp(out_exp), .exp_ovf(exp_ovf));

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int lim, s, e;
      lim = (it % 3 == 0) ? 8191 : (it % 3 == 1) ? 16383 : 32767;
      for (int l = 0; l < BANKS; l++) begin
        in_re[l] = W'($urandom_range(0, 2 * lim) - lim);
        in_im[l] = W'($urandom_range(0, 2 * lim) - lim);
      end
      in_exp = EXP_W'($urandom);
      #10;
      // smallest s with every part inside [-8192, 8191] after floor division by 2^s
      s = 2;
      for (int c = 2; c >= 0; c--) begin
        bit ok;
        ok = 1;
        for (int l = 0; l < BANKS; l++)
          if ((int'(in_re[l]) >>> c) > 8191 || (int'(in_re[l]) >>> c) < -8192 ||
              (int'(in_im[l]) >>> c) > 8191 || (int'(in_im[l]) >>> c) < -8192) ok = 0;
        if (ok) s = c;
      end
      seen_shift[s]++;
      e = int'(in_exp) + s;
      if (e > 7) seen_ovf++;
      checks++;
      if (out_exp != ((e > 7) ? 7 : e) || exp_ovf != (e > 7)) begin
        failures++; $display("FAIL exponent in %0d shift %0d got %0d ovf %0b", in_exp, s, out_exp, exp_ovf);
      end
      for (int l = 0; l < BANKS; l++) begin
        checks++;
        if (out_data[l].re != (int'(in_re[l]) >>> s) || out_data[l].im != (int'(in_im[l]) >>> s)) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d shift %0d", l, s);
        end
      end
    end
    $display("shifts 0/1/2: %0d/%0d/%0d, exponent overflows %0d", seen_shift[0], seen_shift[1], seen_shift[2], seen_ovf);
    for (int c = 0; c < 3; c++) begin checks++; if (seen_shift[c] == 0) begin failures++; $display("FAIL shift %0d never seen", c); end end
    checks++; if (seen_ovf == 0) begin failures++; $display("FAIL exponent overflow never seen"); end
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
