// Self-checking testbench for pe_butterfly_unit: random full-range rows; lane i must be
// in[i] + in[i+8] and lane i+8 must be in[i] - in[i+8], exactly.
module tb_pe_butterfly_unit;
  import bfp_pkg::*;
  localparam int W = PART_W + 1;
  logic signed [W-1:0] in_re [BANKS], in_im [BANKS];
  logic signed [W:0] out_re [BANKS], out_im [BANKS];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  pe_butterfly_unit dut (.in_re(in_re), .in_im(in_im), .out_re(out_re), .out_im(out_im));

  initial begin
    for (int it = 0; it < 3000; it++) begin
      for (int l = 0; l < BANKS; l++) begin in_re[l] = W'($urandom); in_im[l] = W'($urandom); end
      if (it == 0) for (int l = 0; l < BANKS; l++) begin in_re[l] = {1'b1, {(W-1){1'b0}}}; in_im[l] = {1'b0, {(W-1){1'b1}}}; end
      #10;
      for (int i = 0; i < BANKS / 2; i++) begin
        checks++;
        if (out_re[i] != in_re[i] + in_re[i+8] || out_im[i] != in_im[i] + in_im[i+8] ||
            out_re[i+8] != in_re[i] - in_re[i+8] || out_im[i+8] != in_im[i] - in_im[i+8]) begin
          failures++;
          if (failures < 10) $display("FAIL pair %0d", i);
        end
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
