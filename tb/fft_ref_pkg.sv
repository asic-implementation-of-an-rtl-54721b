// Reference models for the testbenches of the reversible radix-2 FFT.
//
// Written with plain integer and real arithmetic, independent of the RTL's gate-level
// adders and multipliers. The fixed-point rules mirror the design's contract:
//   twiddle W8^k = round(2^(TW-2) * cos(2*pi*k/8)) - j*round(2^(TW-2) * sin(2*pi*k/8)),
//                  conjugated for the inverse transform;
//   t = floor((A1 * W) / 2^(TW-2)) per component;
//   B0 = sat(floor((A0 + t) / 2)), B1 = sat(floor((A0 - t) / 2)), saturated to DW bits.
package fft_ref_pkg;
  localparam real PI = 3.14159265358979323846;

  // number of saturations seen by bf_ref since the last clear (for mechanism coverage)
  int sat_count = 0;
  // number of butterflies with a twiddle other than W8^0 and a non-zero A1 (coverage)
  int twiddle_count = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int rnd(input real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic void twiddle_ref(input int k, input bit inv, input int tw,
                                      output int wr, output int wi);
    real one = real'(1 << (tw - 2));
    wr = rnd(one * $cos(2.0 * PI * k / 8.0));
    wi = -rnd(one * $sin(2.0 * PI * k / 8.0));
    if (inv) wi = -wi;
  endfunction

  function automatic int sat_ref(input int v, input int dw);
    int hi = (1 << (dw - 1)) - 1;
    int lo = -(1 << (dw - 1));
    if (v > hi) begin sat_count++; return hi; end
    if (v < lo) begin sat_count++; return lo; end
    return v;
  endfunction

  // floor division by 2^s for signed integers
  function automatic int fl(input int v, input int s);
    return v >>> s;
  endfunction

  function automatic void bf_ref(input int a0r, input int a0i, input int a1r, input int a1i,
                                 input int k, input bit inv, input int dw, input int tw,
                                 output int b0r, output int b0i, output int b1r, output int b1i);
    int wr, wi, tr, ti;
    twiddle_ref(k, inv, tw, wr, wi);
    tr = fl(a1r * wr - a1i * wi, tw - 2);
    ti = fl(a1r * wi + a1i * wr, tw - 2);
    b0r = sat_ref(fl(a0r + tr, 1), dw);
    b0i = sat_ref(fl(a0i + ti, 1), dw);
    b1r = sat_ref(fl(a0r - tr, 1), dw);
    b1i = sat_ref(fl(a0i - ti, 1), dw);
  endfunction

  // Full 8-point DIT flow graph: bit-reversed input, three stages.
  function automatic void fft8_ref(input int xr[8], input int xi[8], input bit inv,
                                   input int dw, input int tw,
                                   output int yr[8], output int yi[8]);
    int ar[8], ai[8], br[8], bi[8];
    int rev[8] = '{0, 4, 2, 6, 1, 5, 3, 7};
    for (int n = 0; n < 8; n++) begin ar[n] = xr[rev[n]]; ai[n] = xi[rev[n]]; end
    for (int span = 1; span < 8; span *= 2) begin
      for (int base = 0; base < 8; base += 2 * span) begin
        for (int j = 0; j < span; j++) begin
          int k = j * (4 / span);
          if (k != 0 && (ar[base+j+span] != 0 || ai[base+j+span] != 0)) twiddle_count++;
          bf_ref(ar[base+j], ai[base+j], ar[base+j+span], ai[base+j+span], k, inv, dw, tw,
                 br[base+j], bi[base+j], br[base+j+span], bi[base+j+span]);
        end
      end
      ar = br; ai = bi;
    end
    yr = ar; yi = ai;
  endfunction

  // Floating-point DFT (inv = 0) or IDFT (inv = 1), both divided by 8.
  function automatic void dft8_real(input int xr[8], input int xi[8], input bit inv,
                                    output real yr[8], output real yi[8]);
    for (int k = 0; k < 8; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < 8; n++) begin
        real ang = (inv ? 2.0 : -2.0) * PI * k * n / 8.0;
        sr += xr[n] * $cos(ang) - xi[n] * $sin(ang);
        si += xr[n] * $sin(ang) + xi[n] * $cos(ang);
      end
      yr[k] = sr / 8.0;
      yi[k] = si / 8.0;
    end
  endfunction
endpackage
