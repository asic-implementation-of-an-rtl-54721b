// Self-checking testbench for butterfly_8in: random complex inputs in both directions; each
// output compared with the integer butterfly model applied to the line pairs and
// twiddles of this stage of the 8-point DIT flow graph.
module tb_butterfly_8in;
  import fft_ref_pkg::*;
  localparam int DW = 8, TW = 8, L = 8;
  logic signed [DW-1:0] xr [L], xi [L], yr [L], yi [L];
  logic inverse;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  butterfly_8in dut (.x_re(xr), .x_im(xi), .inverse(inverse), .y_re(yr), .y_im(yi));

  initial begin
    repeat (4000) begin
      int er [L], ei [L];
      for (int n = 0; n < L; n++) begin xr[n] = DW'($urandom); xi[n] = DW'($urandom); end
      inverse = 1'($urandom);
      #10;
      // lines j and j + L/2 with twiddle W8^(j * 8/L)
      for (int j = 0; j < L / 2; j++)
        bf_ref(xr[j], xi[j], xr[j+L/2], xi[j+L/2], j * (8 / L), inverse, DW, TW,
               er[j], ei[j], er[j+L/2], ei[j+L/2]);
      for (int n = 0; n < L; n++) begin
        checks++;
        if (yr[n] != er[n] || yi[n] != ei[n]) begin
          failures++;
          if (failures < 10) $display("FAIL line %0d inv=%0b got (%0d,%0d) exp (%0d,%0d)",
                                      n, inverse, yr[n], yi[n], er[n], ei[n]);
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
