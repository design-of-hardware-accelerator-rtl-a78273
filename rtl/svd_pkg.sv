// svd_pkg: constants shared by the 2x2 SVD accelerator.
//
// The CORDIC units work in fixed point. Matrix entries are signed numbers with
// 6 fraction bits (Q.6) and angles are signed radians with 14 fraction bits
// (Q.14), the two formats named for the vectoring and rotation units. Word
// widths, the iteration count and the guard bits are this design's choices.
//
// ATAN_Q30[i] is the CORDIC angle table, round(atan(2^-i) * 2^30). Each unit
// rounds it to its own angle format, so a unit may use any ANG_FRAC up to 30.
// INV_GAIN_Q16 is round(2^16 / K), K = prod_{i<15} sqrt(1 + 2^-2i) = 1.64676,
// the growth of a 15-step CORDIC; the rotation unit multiplies by it so that
// its output has the true length of the input vector.
package svd_pkg;

  localparam int unsigned DATA_W    = 16;  // matrix entry width (signed)
  localparam int unsigned DATA_FRAC = 6;   // Q.6 matrix entries
  localparam int unsigned ANG_W     = 16;  // angle width (signed)
  localparam int unsigned ANG_FRAC  = 14;  // Q.14 angles
  localparam int unsigned ITER      = 15;  // CORDIC micro-rotations
  localparam int unsigned GUARD     = 8;   // extra fraction bits inside CORDIC

  localparam int unsigned ATAN_ENTRIES = 16;
  localparam int unsigned MAX_ITER     = ATAN_ENTRIES;

  localparam logic signed [31:0] ATAN_Q30 [ATAN_ENTRIES] = '{
    32'sd843314857, 32'sd497837829, 32'sd263043837, 32'sd133525159,
    32'sd67021687,  32'sd33543516,  32'sd16775851,  32'sd8388437,
    32'sd4194283,   32'sd2097149,   32'sd1048576,   32'sd524288,
    32'sd262144,    32'sd131072,    32'sd65536,     32'sd32768
  };

  localparam int INV_GAIN_Q16 = 39797;     // 0.607253 * 2^16

  // Arctangent table entry i in a format with 'frac' fraction bits, rounded.
  function automatic longint atan_entry(int i, int frac);
    longint v;
    v = longint'(ATAN_Q30[i]);
    if (frac >= 30) return v <<< (frac - 30);
    return (v + (longint'(1) <<< (29 - frac))) >>> (30 - frac);
  endfunction

endpackage
