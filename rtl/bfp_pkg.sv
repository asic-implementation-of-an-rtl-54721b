// Shared types and sizes of the block-floating-point (BFP) FFT processor for OFDM.
//
// Data words are complex, 28 bits: a 14-bit signed real part and a 14-bit signed
// imaginary part. The data memory has two groups of 16 single-port banks holding 256
// words per group (16 rows of 16 words); one row is read or written per cycle. The BFP
// memory keeps one 3-bit exponent per row. Bank count, word widths, the 256 and the
// 3-bit exponents follow the processor architecture; the row organisation is this
// design's reading of it.
package bfp_pkg;
  localparam int unsigned BANKS  = 16;              // banks per memory group
  localparam int unsigned PART_W = 14;              // real / imaginary part width
  localparam int unsigned WORD_W = 2 * PART_W;      // 28-bit complex word
  localparam int unsigned DEPTH  = 256;             // words per memory group
  localparam int unsigned ROWS   = DEPTH / BANKS;   // rows of BANKS words per group
  localparam int unsigned ROW_AW = $clog2(ROWS);    // row address width
  localparam int unsigned EXP_W  = 3;               // block exponent width
  localparam int unsigned ANG_W  = 8;               // twiddle index width (W_256^k)

  typedef struct packed {
    logic signed [PART_W-1:0] re;
    logic signed [PART_W-1:0] im;
  } cword_t;

  typedef logic [EXP_W-1:0] exp_t;
endpackage
