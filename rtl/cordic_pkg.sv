// cordic_pkg: constants and constant functions shared by the CORDIC quadrature
// mixer.
//
// Angles are held as binary angles: a B-bit word spans one full turn, so the
// value 2^B stands for 2*pi, 2^(B-2) for pi/2 and 2^(B-3) for pi/4.  With this
// representation the +/-90 degree pre-rotation and the first +/-45 degree
// elementary rotation need no adder, only a bit inversion (see
// cordic_angle_computation).
//
// elem_angle(i, B) returns atan(2^-i) as a B-bit binary angle, rounded to the
// nearest integer.  It is evaluated at elaboration time with integer
// arithmetic only (a 128-bit fixed-point Taylor series of atan), so that no
// real-valued constant reaches synthesis:
//   atan(x) = sum_k (-1)^k x^(2k+1) / (2k+1),  x = 2^-i, i >= 1
//   angle   = atan(2^-i) * 2^B / (2*pi)
// The series term x^(2k+1) is an exact power of two, so every term is one
// shift and one division.  The fixed-point atan value has 100 fraction bits;
// 1/(2*pi) is held with 64 fraction bits.
package cordic_pkg;

  // round(2^64 / (2*pi))
  localparam logic [127:0] INV_2PI_Q64 = 128'd2935890503282001226;

  localparam int ATAN_FRAC = 100;

  function automatic logic [63:0] elem_angle(input int i, input int B);
    logic [127:0] acc;
    logic [127:0] term;
    logic [127:0] scaled;
    int           k;
    int           sh;
    acc = '0;
    // i = 0 (pi/4) is exact in binary-angle form
    if (i == 0) return 64'(64'd1 << (B - 3));
    for (k = 0; k < 40; k++) begin
      sh = ATAN_FRAC - i * (2 * k + 1);
      if (sh >= 0) begin
        term = (128'd1 << sh) / 128'(2 * k + 1);
        if (k % 2 == 0) acc = acc + term;
        else            acc = acc - term;
      end
    end
    // acc < 0.47 * 2^100 (< 2^99) and INV_2PI_Q64 < 2^62: product < 2^128.
    // Drop 40 fraction bits first to keep the product in range:
    // atan in Q60 times 1/(2pi) in Q64 gives turns in Q124.
    scaled = (acc >> 40) * INV_2PI_Q64;
    // turns * 2^B with rounding: shift right by 124 - B
    scaled = (scaled + (128'd1 << (123 - B))) >> (124 - B);
    return scaled[63:0];
  endfunction

endpackage
