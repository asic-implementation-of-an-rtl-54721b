// Rotation-mode CORDIC: multiplies one complex word by the twiddle W_N^k = exp(-j*2*pi*k/N),
// N = 2^AW, without a multiplier array.
//
// The angle -2*pi*k/N is kept as a 20-bit phase (2^20 = one turn). Angles beyond
// +/-90 degrees are first brought into range by a 180-degree turn (negating x and y).
// ITER micro-rotations then add or subtract y>>i and x>>i; the phase table holds
// round(2^20 * atan(2^-i) / (2*pi)). The CORDIC gain is removed at the end by the
// constant 19898/32768 (the product of cos(atan(2^-i)), i = 0..15). Four guard bits
// carry the fraction; the output is truncated back and has one integer bit more than
// the input, since a rotated word can exceed the input range by sqrt(2). Combinational.
module cordic_rotator #(
  parameter int unsigned DW   = bfp_pkg::PART_W,  // input part width
  parameter int unsigned AW   = bfp_pkg::ANG_W,   // twiddle index width, N = 2^AW
  parameter int unsigned ITER = 16                // micro-rotations, at most 16
) (
  input  logic signed [DW-1:0] x_in,
  input  logic signed [DW-1:0] y_in,
  input  logic        [AW-1:0] k,
  output logic signed [DW:0]   x_out,
  output logic signed [DW:0]   y_out
);
  localparam int unsigned G  = 4;              // guard bits
  localparam int unsigned IW = DW + 2 + G;     // internal width
  localparam logic [19:0] ATAN [16] = '{20'd131072, 20'd77376, 20'd40884, 20'd20753,
                                        20'd10417, 20'd5213, 20'd2607, 20'd1304,
                                        20'd652, 20'd326, 20'd163, 20'd81,
                                        20'd41, 20'd20, 20'd10, 20'd5};
  localparam int KGAIN = 19898;                // 2^15 * prod cos(atan(2^-i))

  logic signed [IW-1:0] x [ITER+1];
  logic signed [IW-1:0] y [ITER+1];
  logic signed [19:0]   z [ITER+1];
  logic        [19:0]   phase;
  logic signed [IW+15:0] xs, ys;

  always_comb begin
    // phase of exp(-j*2*pi*k/N) in 1/2^20 turns
    phase = -(20'(k) << (20 - AW));
    x[0] = IW'(x_in) <<< G;
    y[0] = IW'(y_in) <<< G;
    z[0] = $signed(phase);
    if (phase[19] != phase[18]) begin      // beyond +/-90 degrees: turn by 180
      x[0] = -x[0];
      y[0] = -y[0];
      z[0] = $signed(phase + 20'h80000);
    end
    for (int i = 0; i < ITER; i++) begin
      if (z[i] >= 0) begin
        x[i+1] = x[i] - (y[i] >>> i);
        y[i+1] = y[i] + (x[i] >>> i);
        z[i+1] = z[i] - $signed(ATAN[i]);
      end else begin
        x[i+1] = x[i] + (y[i] >>> i);
        y[i+1] = y[i] - (x[i] >>> i);
        z[i+1] = z[i] + $signed(ATAN[i]);
      end
    end
    xs = (IW+16)'(x[ITER]) * KGAIN;
    ys = (IW+16)'(y[ITER]) * KGAIN;
    x_out = (DW+1)'(xs >>> (15 + G));
    y_out = (DW+1)'(ys >>> (15 + G));
  end
endmodule
