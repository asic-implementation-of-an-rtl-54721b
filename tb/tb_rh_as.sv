// Self-checking testbench for rh_as: all eight (X, Y, en) combinations.
// With en = 1 the outputs are compared with the half-adder and half-subtractor truth
// tables (written out below); with en = 0 the carry and borrow must come out inverted.
// The mapping over all eight inputs must be one-to-one (the cell is reversible).
module tb_rh_as;
  logic x, y, en, sd, bout, cout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  rh_as dut (.x(x), .y(y), .en(en), .sd(sd), .bout(bout), .cout(cout));

  // {x, y} -> {sum, carry, difference, borrow}
  logic [3:0] table_ha_hs [4] = '{4'b0000, 4'b1011, 4'b1010, 4'b0100};

  initial begin
    bit seen [8];
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < 8; i++) begin
      logic [3:0] t;
      {en, x, y} = 3'(i);
      #10;
      t = table_ha_hs[{x, y}];
      checks++;
      if (sd !== t[3] || sd !== t[1]) begin failures++; $display("FAIL sd x=%0b y=%0b", x, y); end
      checks++;
      if (cout !== (t[2] ^ ~en)) begin failures++; $display("FAIL cout x=%0b y=%0b en=%0b", x, y, en); end
      checks++;
      if (bout !== (t[0] ^ ~en)) begin failures++; $display("FAIL bout x=%0b y=%0b en=%0b", x, y, en); end
      checks++;
      if (seen[{sd, bout, cout}]) begin failures++; $display("FAIL not one-to-one at %0d", i); end
      seen[{sd, bout, cout}] = 1;
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
