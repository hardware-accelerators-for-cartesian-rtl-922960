// Shared types and constants of the CGP accelerators.
//
// Holds the function encodings of the two kinds of programmable node: the
// 16-function set of the 8-bit symbolic-regression CFB and the 4-function
// set {wire, and, xor, not-a and b} of the bit-parallel logic PE. The logic
// set and the fact that the regression set holds addition, subtraction,
// shifts, minimum, maximum and logic functions follow the design description;
// the exact 16 regression functions and all numeric codes are this design's
// own choice (the wire code is 0 so the phenotype-size comparators test
// against a constant).
package cgp_pkg;

  // Symbolic-regression CFB functions (4 configuration bits, x = A, y = B).
  typedef enum logic [3:0] {
    SR_CONST255 = 4'd0,   // 255
    SR_X        = 4'd1,   // x
    SR_NOTX     = 4'd2,   // 255 - x
    SR_OR       = 4'd3,   // x | y
    SR_NOTX_OR  = 4'd4,   // ~x | y
    SR_AND      = 4'd5,   // x & y
    SR_NAND     = 4'd6,   // ~(x & y)
    SR_XOR      = 4'd7,   // x ^ y
    SR_SHR1     = 4'd8,   // x >> 1
    SR_SHR2     = 4'd9,   // x >> 2
    SR_SUBSAT   = 4'd10,  // max(x - y, 0)
    SR_ADD      = 4'd11,  // (x + y) mod 256
    SR_ADDSAT   = 4'd12,  // min(x + y, 255)
    SR_AVG      = 4'd13,  // (x + y) >> 1
    SR_MAX      = 4'd14,  // max(x, y)
    SR_MIN      = 4'd15   // min(x, y)
  } sr_func_e;

  // Logic PE functions (2 configuration bits, a = A, b = B).
  typedef enum logic [1:0] {
    LC_WIRE    = 2'd0,    // a
    LC_AND     = 2'd1,    // a & b
    LC_XOR     = 2'd2,    // a ^ b
    LC_NAAND_B = 2'd3     // ~a & b
  } lc_func_e;

endpackage
