// rsa_pkg: constants and types shared by the RSA crypto-core.
//
// The default datapath is the main configuration of the design: 64
// processing units (PUs) of 32 bits each, operands of up to 4096 bits and a
// 16-bit random key-blinding factor.  Operand registers hold one word more
// than 4096 bits because the multiplier skips the final subtraction and its
// results lie in [0, 2N), which may need bit 4096 (this extra word is a
// choice of this implementation).
package rsa_pkg;

  // Defaults of the datapath (word size, number of PUs, largest modulus).
  localparam int unsigned W_DEF    = 32;
  localparam int unsigned P_DEF    = 64;
  localparam int unsigned NMAX_DEF = 4096;
  // Width of the random multiplier r in E' = E + r * phi(N).
  localparam int unsigned RBITS    = 16;
  // Width of the modulus-length field (holds 1 .. 4096).
  localparam int unsigned LENW     = 13;

  // Where the multiplier takes its X operand from.
  typedef enum logic [0:0] {
    XSEL_OPERAND = 1'b0,  // X is read from an operand register
    XSEL_ONE     = 1'b1   // X is the constant 1 (domain mapping in/out)
  } xsel_e;

  // States of the exponentiation flow (R-L binary method).
  typedef enum logic [2:0] {
    ST_FETCH = 3'd0,  // idle, registers are loaded from the bus
    ST_PRE   = 3'd1,  // Z = MM(1, Z), P = MM(r2, P)
    ST_DET   = 3'd2,  // look at the next key bit
    ST_EXE   = 3'd3,  // Z = MM(Z, P) or Z kept; P = MM(P, P)
    ST_POST  = 3'd4   // Z = MM(1, Z); then back to FETCH with the result valid
  } rsa_state_e;

  // Operand registers that the bus can write.
  typedef enum logic [2:0] {
    RSEL_N   = 3'd0,
    RSEL_M   = 3'd1,
    RSEL_E   = 3'd2,
    RSEL_PHI = 3'd3,
    RSEL_R2  = 3'd4
  } rsel_e;

  // Number of W-bit words needed for b bits.
  function automatic int unsigned words_for(int unsigned b, int unsigned w);
    return (b + w - 1) / w;
  endfunction

  // Width of the word indexes and counters of a multiplier: they must reach
  // both the words per bit, ceil((nmax+p+2)/w), and the shortest kernel
  // cycle, p + p/w.
  function automatic int unsigned kw_for(int unsigned w, int unsigned p, int unsigned nmax);
    int unsigned ew, m;
    ew = (nmax + p + 2 + w - 1) / w;
    m  = (ew > p + p / w) ? ew : p + p / w;
    return $clog2(m + 1);
  endfunction

endpackage
