// Reference model for the testbenches of the block-floating-point FFT processor units.
//
// Works in real arithmetic, independent of the RTL: each word of a row is multiplied by
// exp(-j*2*pi*k/256), scaled from its row exponent to the common exponent E (divided
// by 2^(E - row_exp)), and lanes i and i+8 form a butterfly. row_ok() compares an RTL
// result row (14-bit parts with exponent e_out) against that model after bringing it
// to the same scale, allowing for the CORDIC, alignment and scaling truncation.
package bfp_ref_pkg;
  localparam real PI = 3.14159265358979323846;
  localparam int LANES = 16;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic void rotate(input int x, input int y, input int k,
                                 output real xr, output real yr);
    real a = -2.0 * PI * k / 256.0;
    xr = x * $cos(a) - y * $sin(a);
    yr = x * $sin(a) + y * $cos(a);
  endfunction

  // expected butterfly outputs of a row, in units of 2^E
  function automatic void pe_ref(input int xr[LANES], input int xi[LANES], input int k[LANES],
                                 input int row_exp, input int e_common,
                                 output real br[LANES], output real bi[LANES]);
    real ar[LANES], ai[LANES];
    for (int l = 0; l < LANES; l++) begin
      real rr, ri;
      rotate(xr[l], xi[l], k[l], rr, ri);
      ar[l] = rr / real'(1 << (e_common - row_exp));
      ai[l] = ri / real'(1 << (e_common - row_exp));
    end
    for (int i = 0; i < LANES / 2; i++) begin
      br[i] = ar[i] + ar[i + LANES/2];
      bi[i] = ai[i] + ai[i + LANES/2];
      br[i + LANES/2] = ar[i] - ar[i + LANES/2];
      bi[i + LANES/2] = ai[i] - ai[i + LANES/2];
    end
  endfunction

  // number of parts of the RTL row (dr, di with exponent e_out) that miss the model
  function automatic int row_errors(input int dr[LANES], input int di[LANES], input int e_out,
                                    input int e_common, input real br[LANES], input real bi[LANES]);
    int errs = 0;
    real scale = real'(1 << (e_out - e_common));
    real tol = 6.0 + scale;
    for (int l = 0; l < LANES; l++) begin
      if (rabs(dr[l] * scale - br[l]) > tol) errs++;
      if (rabs(di[l] * scale - bi[l]) > tol) errs++;
    end
    return errs;
  endfunction
endpackage
