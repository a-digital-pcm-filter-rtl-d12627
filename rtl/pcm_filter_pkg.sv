// Shared types, widths and table formulas of the stored-product PCM channel filter.
//
// Number formats used throughout:
//  * Sample code (scode_t): the 8-bit compressed code {sign, segment L, step q} plus one
//    extra step bit that only the finer first-stage level assignment uses in segments 5-7.
//    The 8-bit code alone addresses the standard level assignment.
//  * Linear level (13 bits): sign-magnitude, 11 integer bits and one fraction bit, so the
//    magnitude field holds twice the level value (levels such as 2015.5 are exact).
//  * Products: 13-bit two's complement with a binary point chosen per ROM block.
//  * Accumulator: 18-bit two's complement, 13 integer bits and 4 fraction bits (the
//    document's 16-bit adder plus two guard bits, so that partial sums cannot overflow).
//
// The level values follow the segmented companding law with 16 quanta per segment, each
// quantum level being the mid value of its quantum: L = 0 gives q, L = 1 gives q + 16,
// L >= 2 gives 2^(L-1) * (q + 16.5) - 0.5. The fine assignment halves the quanta of
// segments 5, 6 and 7 (32 quanta each): level = 2^(L-2) * (q5 + 32.5) - 0.5.
// The coefficients are those of the third-order section designed by the bilinear
// transform for a 24 kHz sampling rate; two such sections in tandem form the
// sixth-order filter.
package pcm_filter_pkg;

  localparam int CODE_W   = 8;   // compressed code
  localparam int LIN_W    = 13;  // linear level, sign + 12-bit magnitude (x2)
  localparam int MAG_W    = 12;  // magnitude field of a linear level, in half units
  localparam int PROD_W   = 13;  // stored product word
  localparam int ACC_W    = 18;  // adder accumulator, incl. two guard bits
  localparam int ACC_FRAC = 4;   // fraction bits of the accumulator
  localparam int INT_W    = 11;  // integer magnitude bits of a rounded sum
  localparam int N_TAPS   = 7;   // A0 A1 A2 A3 B1 B2 B3
  localparam int ROM_AW   = 9;   // product ROM address {fine, L, q, ext}

  // Sample code as held in the unit-delay registers.
  typedef struct packed {
    logic       sign;  // 1 = negative
    logic [2:0] seg;   // segment number L
    logic [3:0] step;  // quantum number q (upper four bits in the fine assignment)
    logic       ext;   // fifth step bit, fine assignment in segments 5..7 only
  } scode_t;

  // Unit-delay contents of one channel and stage: x(n-1..n-3), y(n-1..n-3).
  typedef struct packed {
    scode_t x1, x2, x3;
    scode_t y1, y2, y3;
  } sec_state_t;

  // Filter coefficients of one third-order section (24 kHz design). The recursive
  // coefficients are the denominator coefficients b_k of 1 + b1 z^-1 + b2 z^-2 + b3 z^-3.
  localparam real COEF_A0 = 0.2726230;
  localparam real COEF_A1 = 0.0808208;
  localparam real COEF_A2 = 0.0808208;
  localparam real COEF_A3 = 0.2726230;
  localparam real COEF_B1 = -0.9877751;
  localparam real COEF_B2 = 0.7787396;
  localparam real COEF_B3 = -0.08407682;

  // Fraction bits of each 13-bit product ROM block (binary point per block).
  localparam int FRAC_A0 = 1;
  localparam int FRAC_A1 = 4;
  localparam int FRAC_A2 = 4;
  localparam int FRAC_A3 = 1;
  localparam int FRAC_B1 = 1;
  localparam int FRAC_B2 = 1;
  localparam int FRAC_B3 = 4;

  // Twice the quantization level of a code magnitude (exact integer).
  function automatic int level_x2(input int seg, input int step, input int ext, input bit fine);
    if (seg == 0) return 2 * step;
    if (seg == 1) return 2 * (step + 16);
    if (fine && seg >= 5) return (1 << (seg - 2)) * (2 * (2 * step + ext) + 65) - 1;
    return (1 << (seg - 1)) * (2 * step + 33) - 1;
  endfunction

  // Twice the level addressed by a product ROM address {fine, L, q, ext}.
  function automatic int rom_addr_level_x2(input int addr);
    int  seg, step, ext;
    bit  fine;
    fine = addr[8];
    seg  = (addr >> 5) & 7;
    step = (addr >> 1) & 15;
    ext  = addr & 1;
    return level_x2(seg, step, ext, fine);
  endfunction

  // Stored product: coef * level rounded to the nearest 2^-frac, as a product word.
  function automatic int product_word(input real coef, input int lvl_x2, input int frac);
    real scaled;
    int  word;
    scaled = coef * real'(lvl_x2) * real'(1 << frac) / 2.0;
    word   = int'($floor(scaled + 0.5));
    if (word > (1 << (PROD_W - 1)) - 1) word = (1 << (PROD_W - 1)) - 1;
    if (word < -(1 << (PROD_W - 1))) word = -(1 << (PROD_W - 1));
    return word;
  endfunction

endpackage
