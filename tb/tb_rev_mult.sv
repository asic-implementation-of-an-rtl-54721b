// Self-checking testbench for rev_mult at its default size: all 8-bit x 8-bit unsigned
// operand pairs compared with the integer product.
module tb_rev_mult;
  localparam int N = 8;
  logic [N-1:0] a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  rev_mult dut (.a(a), .b(b), .p(p));

  initial begin
    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i); b = N'(j);
        #1;
        checks++;
        if (p !== (2*N)'(i * j)) begin
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
