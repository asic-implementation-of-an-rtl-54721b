// Self-checking testbench for cordic_unit: random 14-bit complex words and random
// twiddle indices on all 16 lanes, each output compared with the exact rotation by
// exp(-j*2*pi*k/256) within 2 LSB; includes k = 0 and the quadrant edges 64, 128, 192.
module tb_cordic_unit;
  import bfp_pkg::*;
  import bfp_ref_pkg::rotate, bfp_ref_pkg::rabs;
  cword_t in_data [BANKS];
  logic [ANG_W-1:0] tw_idx [BANKS];
  logic signed [PART_W:0] out_re [BANKS], out_im [BANKS];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cordic_unit dut (.in_data(in_data), .tw_idx(tw_idx), .out_re(out_re), .out_im(out_im));

  initial begin
    for (int it = 0; it < 2000; it++) begin
      for (int l = 0; l < BANKS; l++) begin
        in_data[l].re = PART_W'($urandom);
        in_data[l].im = PART_W'($urandom);
        tw_idx[l] = (it < 16) ? ANG_W'(l * 16) : ANG_W'($urandom);
      end
      #10;
      for (int l = 0; l < BANKS; l++) begin
        real er, ei;
        rotate(in_data[l].re, in_data[l].im, tw_idx[l], er, ei);
        checks++;
        if (rabs(real'(out_re[l]) - er) > 2.0 || rabs(real'(out_im[l]) - ei) > 2.0) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d k=%0d in=(%0d,%0d) got (%0d,%0d) exp (%f,%f)",
                                      l, tw_idx[l], in_data[l].re, in_data[l].im, out_re[l], out_im[l], er, ei);
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
