// ntru_pkg: types and constants shared by the NTRU Prime truncated polynomial
// multipliers (TPM-I to TPM-IV).
//
// The multipliers compute e(x) = h(x) r(x) + m(x) in Z_q[x]/(x^n - x - 1).
// Coefficients of the small polynomials r and m are ternary and travel as
// 2-bit codes: 2'b01 = +1, 2'b00 = 0, 2'b11 = -1. This coding is the one the
// architecture is built around (bit 0 says "nonzero", bit 1 says "negative").
// The fourth code 2'b10 is unused on inputs and is read as 0; TPM-III reuses it
// internally to mean "three zeros in a row".
//
// Default sizes are those of parameter set ees401ep1 (n = 401, q = 2048), the
// set used first in every comparison of the four multipliers.
//
// The 2-bit and 3-bit code values follow the original architecture's code
// tables; reading the unused input code 10 as zero is this design's choice.
package ntru_pkg;

  parameter int unsigned N_DEFAULT = 401;
  parameter int unsigned Q_DEFAULT = 2048;

  typedef enum logic [1:0] {
    TRIT_ZERO = 2'b00,
    TRIT_POS  = 2'b01,
    TRIT_RSV  = 2'b10,  // unused on inputs, treated as zero
    TRIT_NEG  = 2'b11
  } trit_t;

  // TPM-III control code t_i (two bits)
  typedef enum logic [1:0] {
    T3_ZERO  = 2'b00,   // r_j = 0, advance one coefficient
    T3_POS   = 2'b01,   // r_j = +1
    T3_ZERO3 = 2'b10,   // r_j = r_j+1 = r_j+2 = 0, advance three
    T3_NEG   = 2'b11    // r_j = -1
  } t3_t;

  // TPM-IV control code t_i (three bits): t[2:1] selects how many zeros are
  // skipped before the nonzero coefficient, t[0] is its sign.
  typedef enum logic [2:0] {
    T4_Z4   = 3'b000,   // 0,0,0,0      : advance 4, no add
    T4_Z3   = 3'b001,   // 0,0,0,(+-1)  : advance 3, no add
    T4_Z2P  = 3'b010,   // 0,0,+1       : add +x^2 h, advance 3
    T4_Z2N  = 3'b011,   // 0,0,-1       : add -x^2 h, advance 3
    T4_Z1P  = 3'b100,   // 0,+1         : add +x h,   advance 2
    T4_Z1N  = 3'b101,   // 0,-1         : add -x h,   advance 2
    T4_Z0P  = 3'b110,   // +1           : add +h,     advance 1
    T4_Z0N  = 3'b111    // -1           : add -h,     advance 1
  } t4_t;

  // A trit is nonzero only for the two legal nonzero codes.
  function automatic logic trit_nz(trit_t t);
    return t == TRIT_POS || t == TRIT_NEG;
  endfunction

  function automatic logic trit_neg(trit_t t);
    return t == TRIT_NEG;
  endfunction

endpackage
