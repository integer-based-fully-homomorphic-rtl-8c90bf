// wntt_pkg: constants and types shared by the Weighted-NTT multiplier.
//
// The arithmetic works modulo the Proth prime p = 12289 = 3*2^12 + 1, the
// NewHope prime, chosen so that every residue (14 bits) fits the operand of a
// DSP multiplier. The transform has N = 1024 points, each holding one 4-bit
// digit of a 4096-bit operand. The weight factor phi = 7 is a primitive
// 2N-th root of unity mod p and the NTT kernel alpha = phi^2 = 49 a primitive
// N-th root. Montgomery arithmetic uses R = 2^14; p^-1 mod R = 4097 = 2^12 + 1,
// so the Montgomery quotient is a shift and an add. These numbers are the
// ones the design is built around; the phase encoding is this design's own.
package wntt_pkg;

  // modulus and Montgomery constants
  localparam int unsigned P       = 12289;      // Proth prime 3*2^12+1
  localparam int unsigned CW      = 14;         // width of one residue
  localparam int unsigned RBITS   = 14;         // R = 2^RBITS
  localparam int unsigned PINV    = 4097;       // p^-1 mod R = 2^12 + 1
  localparam int unsigned PINV_SH = 12;         // PINV = (1 << PINV_SH) + 1
  localparam int unsigned RINV    = 9216;       // R^-1 mod p
  localparam int unsigned RMODP   = 4095;       // R mod p

  // transform size
  localparam int unsigned NPTS    = 1024;       // NTT length N
  localparam int unsigned DIGIT_W = 4;          // dynamic range b, bits per point
  localparam int unsigned PHI     = 7;          // weight factor, order 2N
  localparam int unsigned ALPHA   = 49;         // NTT kernel, order N

  typedef logic [CW-1:0] coef_t;

  // steps of one Weighted-NTT multiplication (Table 5 order)
  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,
    PH_WEIGHT = 3'd1,   // a_i*phi^i and b_i*phi^i
    PH_FWD    = 3'd2,   // forward transform, one stage per step
    PH_PWM    = 3'd3,   // pointwise products A_i*B_i
    PH_INV    = 3'd4,   // inverse transform, one stage per step
    PH_DEFAC  = 3'd5,   // multiply by phi^-i
    PH_CONV   = 3'd6    // Montgomery conversion back to the standard domain
  } phase_e;

  // (a + b) mod p for a, b < p
  function automatic coef_t mod_add(coef_t a, coef_t b);
    logic [CW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s >= (CW+1)'(P)) ? coef_t'(s - (CW+1)'(P)) : coef_t'(s);
  endfunction

  // (a - b) mod p for a, b < p
  function automatic coef_t mod_sub(coef_t a, coef_t b);
    logic [CW:0] d;
    d = {1'b0, a} - {1'b0, b};
    return (a < b) ? coef_t'(d + (CW+1)'(P)) : coef_t'(d);
  endfunction

endpackage
