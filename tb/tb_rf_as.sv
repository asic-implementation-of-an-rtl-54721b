// Self-checking testbench for rf_as: all combinations of Input1, Input2, Input3 with
// en = 1, compared with x + y + cin (sum, carry) and x - y - cin (difference, borrow).
module tb_rf_as;
  logic x, y, cin, sd, cout, bout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  rf_as dut (.x(x), .y(y), .cin(cin), .en(1'b1), .sd(sd), .cout(cout), .bout(bout));

  initial begin
    for (int i = 0; i < 8; i++) begin
      int s, d;
      {x, y, cin} = 3'(i);
      #10;
      s = int'(x) + int'(y) + int'(cin);
      d = int'(x) - int'(y) - int'(cin);
      checks++;
      if (sd !== s[0]) begin failures++; $display("FAIL sd %0d", i); end
      checks++;
      if (cout !== (s >= 2)) begin failures++; $display("FAIL cout %0d", i); end
      checks++;
      if (bout !== (d < 0)) begin failures++; $display("FAIL bout %0d", i); end
      checks++;
      if (sd !== d[0]) begin failures++; $display("FAIL diff %0d", i); end
    end
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
