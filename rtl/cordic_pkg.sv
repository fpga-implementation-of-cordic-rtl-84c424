// cordic_pkg: number formats and constants shared by the CORDIC twiddle
// generator and the 4-point FFT.
//
// Angles are signed radians in Q3.13 (16 bits, 8192 = 1 rad, range [-4, 4)),
// so pi/2 = 12868 and pi = 25736. Sine, cosine and twiddle factors are signed
// Q1.6 (8 bits, 64 = 1.0), which keeps +1, -1, +j and -j exact.
//
// Angle constants arctan(2^-i): the source design aims at a smaller ROM for the
// rotation angles. For small angles arctan(2^-i) ~= 2^-i, and in Q3.13 the
// difference is below one LSB from i = 4 on, so only the first ATAN_ROM_DEPTH
// entries are stored; the rest are the shifted constant 2^(13-i). The stored
// entries are round(arctan(2^-i) * 2^13). The split point is this design's choice.
package cordic_pkg;

  localparam int ANGLE_W        = 16;
  localparam int ANGLE_FRAC     = 13;
  localparam int TWIDDLE_FRAC   = 6;
  localparam int ATAN_ROM_DEPTH = 4;

  localparam logic signed [ANGLE_W-1:0] HALF_PI = 16'sd12868;  // round(pi/2 * 2^13)
  localparam logic signed [ANGLE_W-1:0] PI      = 16'sd25736;  // round(pi * 2^13)

  // round(arctan(2^-i) * 2^13), i = 0..3
  localparam logic signed [ANGLE_W-1:0] ATAN_ROM [ATAN_ROM_DEPTH] =
    '{16'sd6434, 16'sd3798, 16'sd2007, 16'sd1019};

  // Angle constant of iteration i: ROM entry, or 2^-i once arctan(2^-i) ~= 2^-i.
  function automatic logic signed [ANGLE_W-1:0] atan_const(input int i);
    if (i < ATAN_ROM_DEPTH) return ATAN_ROM[i];
    else if (i <= ANGLE_FRAC) return ANGLE_W'(1) <<< (ANGLE_FRAC - i);
    else return '0;
  endfunction

  // 2^(DW-2) * 0.60725 ~= 2^(DW-2) / K_n, K_n = prod_{i<n} sqrt(1 + 2^-2i);
  // 1/K_n stays within 0.60725 +- 0.00002 for n >= 8. Pre-scales the start
  // vector so the rotated vector leaves the pipeline with unit length.
  function automatic longint cordic_start(input int dw);
    return (longint'(1) <<< (dw - 2)) * 60725 / 100000;
  endfunction

endpackage
