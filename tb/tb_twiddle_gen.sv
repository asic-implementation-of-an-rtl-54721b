// Self-checking testbench for twiddle_gen: W8^k for k = 0..3 in both directions,
// compared with cos/sin of 2*pi*k/8 rounded to the twiddle format.
module tb_twiddle_gen;
  import fft_ref_pkg::*;
  localparam int TW = 8;
  logic [1:0] k;
  logic inverse;
  logic signed [TW-1:0] w_re, w_im;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  twiddle_gen dut (.k(k), .inverse(inverse), .w_re(w_re), .w_im(w_im));

  initial begin
    for (int inv = 0; inv < 2; inv++)
      for (int i = 0; i < 4; i++) begin
        int er, ei;
        k = 2'(i); inverse = inv[0];
        #10;
        twiddle_ref(i, inv[0], TW, er, ei);
        checks++;
        if (int'(w_re) != er || int'(w_im) != ei) begin
          failures++;
          $display("FAIL k=%0d inv=%0d got (%0d,%0d) exp (%0d,%0d)", i, inv, w_re, w_im, er, ei);
        end
      end
    // 0.707 at TW = 8 is 45/64
    k = 2'd1; inverse = 1'b0; #10;
    checks++;
    if (w_re != 45 || w_im != -45) begin failures++; $display("FAIL W8^1 value"); end
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
