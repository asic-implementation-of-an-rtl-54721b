// Shared constants of the 8-point reversible radix-2 DIT FFT.
//
// Data are signed two's-complement fixed-point words; twiddle factors are signed TW-bit
// words with TW-2 fraction bits, so that +1.0 and -1.0 are exact. The value 0.707 of the
// W8^1 and W8^3 twiddles is kept as parts per thousand and rounded to the twiddle width
// in twiddle_gen. The bit-reversal function gives the input order of the first stage.
package fft_pkg;
  localparam int unsigned NPOINT   = 8;      // transform length
  localparam int unsigned LOG2N    = 3;      // number of butterfly stages
  localparam int unsigned DATA_W   = 8;      // sample width (pins f0(7:0) .. y7(7:0))
  localparam int unsigned TWID_W   = 8;      // twiddle width (this design's choice)
  localparam int unsigned COS45_PM = 707;    // cos(pi/4) in thousandths, as printed

  // Index n with its LOG2N bits reversed (0->0, 1->4, 2->2, 3->6, ...).
  function automatic int unsigned bitrev(input int unsigned n);
    int unsigned r = 0;
    for (int unsigned b = 0; b < LOG2N; b++) r |= ((n >> b) & 1) << (LOG2N - 1 - b);
    return r;
  endfunction
endpackage
