// Self-checking testbench for butterfly8: one instance per twiddle exponent K = 0..3,
// driven with corner values and random complex inputs in both directions, every output
// compared with the integer butterfly model of fft_ref_pkg. Counts saturations seen.
module tb_butterfly8;
  import fft_ref_pkg::*;
  localparam int DW = 8, TW = 8;
  logic signed [DW-1:0] a0r, a0i, a1r, a1i;
  logic inverse;
  logic signed [DW-1:0] b0r [4], b0i [4], b1r [4], b1i [4];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  for (genvar k = 0; k < 4; k++) begin : g_dut
    butterfly8 #(.K(k)) dut (.a0_re(a0r), .a0_im(a0i), .a1_re(a1r), .a1_im(a1i), .inverse(inverse),
                             .b0_re(b0r[k]), .b0_im(b0i[k]), .b1_re(b1r[k]), .b1_im(b1i[k]));
  end

  task automatic check_all();
    for (int k = 0; k < 4; k++) begin
      int e0r, e0i, e1r, e1i;
      bf_ref(a0r, a0i, a1r, a1i, k, inverse, DW, TW, e0r, e0i, e1r, e1i);
      checks++;
      if (b0r[k] != e0r || b0i[k] != e0i || b1r[k] != e1r || b1i[k] != e1i) begin
        failures++;
        if (failures < 10)
          $display("FAIL K=%0d inv=%0b a0=(%0d,%0d) a1=(%0d,%0d) got (%0d,%0d) (%0d,%0d) exp (%0d,%0d) (%0d,%0d)",
                   k, inverse, a0r, a0i, a1r, a1i, b0r[k], b0i[k], b1r[k], b1i[k], e0r, e0i, e1r, e1i);
      end
    end
  endtask

  initial begin
    int corners[5] = '{-128, -1, 0, 1, 127};
    sat_count = 0;
    foreach (corners[p]) foreach (corners[q]) foreach (corners[r]) foreach (corners[s])
      for (int inv = 0; inv < 2; inv++) begin
        a0r = DW'(corners[p]); a0i = DW'(corners[q]); a1r = DW'(corners[r]); a1i = DW'(corners[s]);
        inverse = inv[0];
        #10; check_all();
      end
    repeat (3000) begin
      a0r = DW'($urandom); a0i = DW'($urandom); a1r = DW'($urandom); a1i = DW'($urandom);
      inverse = 1'($urandom);
      #10; check_all();
    end
    $display("saturations in reference: %0d", sat_count);
    checks++;
    if (sat_count == 0) begin failures++; $display("FAIL saturation never exercised"); end
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
