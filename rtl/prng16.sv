// prng16: 16-bit pseudo random number generator for the countermeasures.
//
// Supplies the random multiplier r of the key blinding and the random bit
// that picks the update mode of the operand registers.  It is a 16-bit
// Fibonacci linear feedback shift register with the maximal-length
// polynomial x^16 + x^14 + x^13 + x^11 + 1 (period 65535).  Each step shifts
// left by one bit and feeds q[15]^q[13]^q[12]^q[10] into bit 0.
//
// Interface: seed_ld loads seed (a zero seed is replaced by 1, since the
// all-zero state would lock up); step advances one state; q is the state.
// Timing: both act at the clock edge.  Reset state 16'h0001.
//
// The document asks only for a 16-bit hardware PRNG (or software random
// numbers); the LFSR, its polynomial and the seed port are choices of this
// implementation.  An LFSR is predictable and is no substitute for a true
// random source in a product.
module prng16 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_ld,
  input  logic [15:0] seed,
  input  logic        step,
  output logic [15:0] q
);

  logic fb;
  assign fb = q[15] ^ q[13] ^ q[12] ^ q[10];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= 16'h0001;
    else if (seed_ld) q <= (seed == 16'h0000) ? 16'h0001 : seed;
    else if (step)    q <= {q[14:0], fb};
  end

endmodule
