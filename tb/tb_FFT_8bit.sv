// End-to-end testbench of FFT_8bit at its default parameters (8 points, 8-bit data).
//
// Applies directed and random 8-sample blocks in both directions and compares all 16
// output words with the integer flow-graph model of fft_ref_pkg (bit-exact), and with a
// floating-point DFT/8 (or IDFT/8) within a tolerance where nothing saturated. Directed
// cases: a unit impulse (flat spectrum), a constant (energy in X(0) only), a complex tone
// on bin 1, and a forward-then-inverse round trip. Mechanisms counted, each must occur:
// forward transforms, inverse transforms, saturation in a butterfly, round trips, and
// every twiddle W8^1..W8^3 multiplying a non-zero value.
module tb_FFT_8bit;
  import fft_ref_pkg::*;
  localparam int DW = 8, TW = 8;
  logic signed [DW-1:0] f_re [8], f_im [8], y_re [8], y_im [8];
  logic inverse;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_inv = 0, n_sat = 0, n_round = 0, n_twiddle = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  FFT_8bit dut (.f_re(f_re), .f_im(f_im), .inverse(inverse), .y_re(y_re), .y_im(y_im));

  task automatic apply(input int xr[8], input int xi[8], input bit inv, input bit floatcheck);
    int er[8], ei[8];
    real fr[8], fi[8];
    int sat_before;
    for (int n = 0; n < 8; n++) begin f_re[n] = DW'(xr[n]); f_im[n] = DW'(xi[n]); end
    inverse = inv;
    #10;
    sat_before = sat_count;
    fft8_ref(xr, xi, inv, DW, TW, er, ei);
    if (inv) n_inv++; else n_fwd++;
    if (sat_count != sat_before) n_sat++;
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (y_re[k] != er[k] || y_im[k] != ei[k]) begin
        failures++;
        if (failures < 10) $display("FAIL inv=%0b X(%0d) got (%0d,%0d) exp (%0d,%0d)",
                                    inv, k, y_re[k], y_im[k], er[k], ei[k]);
      end
    end
    // truncation in three stages and the 45/64 twiddle stay within a few LSB
    if (floatcheck && sat_count == sat_before) begin
      dft8_real(xr, xi, inv, fr, fi);
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (rabs(real'(y_re[k]) - fr[k]) > 3.0 || rabs(real'(y_im[k]) - fi[k]) > 3.0) begin
          failures++;
          if (failures < 10) $display("FAIL float inv=%0b X(%0d) got (%0d,%0d) exp (%f,%f)",
                                      inv, k, y_re[k], y_im[k], fr[k], fi[k]);
        end
      end
    end
  endtask

  initial begin
    int xr[8], xi[8], zr[8], zi[8];
    sat_count = 0;
    twiddle_count = 0;

    // impulse of 64 at n = 0: every bin is 64/8 = 8
    xr = '{64, 0, 0, 0, 0, 0, 0, 0}; xi = '{default: 0};
    apply(xr, xi, 1'b0, 1'b1);
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (y_re[k] != 8 || y_im[k] != 0) begin failures++; $display("FAIL impulse bin %0d", k); end
    end

    // constant 40: X(0) = 40, all other bins 0
    xr = '{default: 40}; xi = '{default: 0};
    apply(xr, xi, 1'b0, 1'b1);
    checks++;
    if (y_re[0] != 40 || y_im[0] != 0) begin failures++; $display("FAIL constant X(0)"); end
    for (int k = 1; k < 8; k++) begin
      checks++;
      if (y_re[k] != 0 || y_im[k] != 0) begin failures++; $display("FAIL constant bin %0d", k); end
    end

    // complex tone exp(j*2*pi*n/8) * 80: energy in bin 1
    for (int n = 0; n < 8; n++) begin
      xr[n] = rnd(80.0 * $cos(2.0 * PI * n / 8.0));
      xi[n] = rnd(80.0 * $sin(2.0 * PI * n / 8.0));
    end
    apply(xr, xi, 1'b0, 1'b1);
    checks++;
    if (y_re[1] < 75 || rabs(real'(y_im[1])) > 3) begin failures++; $display("FAIL tone bin 1 = (%0d,%0d)", y_re[1], y_im[1]); end

    // round trips: forward then inverse returns x/8 (within a few LSB)
    repeat (50) begin
      for (int n = 0; n < 8; n++) begin xr[n] = int'($urandom_range(0, 200)) - 100; xi[n] = int'($urandom_range(0, 200)) - 100; end
      apply(xr, xi, 1'b0, 1'b1);
      for (int n = 0; n < 8; n++) begin zr[n] = y_re[n]; zi[n] = y_im[n]; end
      apply(zr, zi, 1'b1, 1'b1);
      n_round++;
      for (int n = 0; n < 8; n++) begin
        checks++;
        if (rabs(real'(y_re[n]) - real'(xr[n]) / 8.0) > 3.0 || rabs(real'(y_im[n]) - real'(xi[n]) / 8.0) > 3.0) begin
          failures++;
          $display("FAIL round trip n=%0d got (%0d,%0d) from (%0d,%0d)", n, y_re[n], y_im[n], xr[n], xi[n]);
        end
      end
    end

    // full-range random blocks in both directions (saturation happens here)
    repeat (3000) begin
      for (int n = 0; n < 8; n++) begin xr[n] = int'($signed(DW'($urandom))); xi[n] = int'($signed(DW'($urandom))); end
      apply(xr, xi, 1'($urandom), 1'b1);
    end

    // a block that drives the W8^1 butterfly of the last stage past full scale:
    // stage-2 line 1 is near -128 and line 5 near -128-128j
    xr = '{-128, -128, 0, 127, 127, 127, 0, -128};
    xi = '{0, -128, -128, -128, 0, 127, 127, 127};
    apply(xr, xi, 1'b0, 1'b0);

    n_twiddle = twiddle_count;
    $display("forward=%0d inverse=%0d saturating=%0d round_trips=%0d twiddled=%0d",
             n_fwd, n_inv, n_sat, n_round, n_twiddle);
    checks++; if (n_fwd == 0)     begin failures++; $display("FAIL no forward transform"); end
    checks++; if (n_inv == 0)     begin failures++; $display("FAIL no inverse transform"); end
    checks++; if (n_sat == 0)     begin failures++; $display("FAIL no saturation"); end
    checks++; if (n_round == 0)   begin failures++; $display("FAIL no round trip"); end
    checks++; if (n_twiddle == 0) begin failures++; $display("FAIL twiddles never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
