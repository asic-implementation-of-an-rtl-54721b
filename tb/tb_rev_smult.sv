// Self-checking testbench for rev_smult at its default size: all signed 8-bit operand
// pairs (including -128 * -128) compared with the integer product.
module tb_rev_smult;
  localparam int W = 8;
  logic signed [W-1:0] a, b;
  logic signed [2*W-1:0] p;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  rev_smult dut (.a(a), .b(b), .p(p));

  initial begin
    for (int i = -(1 << (W-1)); i < (1 << (W-1)); i++)
      for (int j = -(1 << (W-1)); j < (1 << (W-1)); j++) begin
        a = W'(i); b = W'(j);
        #1;
        checks++;
        if (int'(p) !== i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
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
