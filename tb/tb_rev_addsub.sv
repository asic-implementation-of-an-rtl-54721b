// Self-checking testbench for rev_addsub at its default width: every pair of 8-bit
// operands in both modes, compared with integer a + b and a - b (result and carry/borrow).
module tb_rev_addsub;
  localparam int W = 8;
  logic [W-1:0] a, b, y;
  logic sub, co;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  rev_addsub dut (.a(a), .b(b), .sub(sub), .y(y), .co(co));

  initial begin
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < (1 << W); i++)
        for (int j = 0; j < (1 << W); j++) begin
          int r;
          a = W'(i); b = W'(j); sub = m[0];
          #1;
          r = m ? i - j : i + j;
          checks++;
          if (y !== W'(r) || co !== (m ? (r < 0) : (r >= (1 << W)))) begin
            failures++;
            if (failures < 10) $display("FAIL sub=%0d a=%0d b=%0d y=%0d co=%0b", m, i, j, y, co);
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
