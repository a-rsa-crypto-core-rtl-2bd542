// key_blind: word-serial exponent blinding E' = E + r * phi(N) (DPA
// countermeasure).
//
// Since M^phi(N) = 1 mod N, the blinded exponent E' gives the same result
// as E.  A fresh random r for every exponentiation makes the sequence of
// operations differ from run to run, which defeats averaging attacks.  With a
// 16-bit r and E < phi(N) < 2^n, E' < 2^(n+16).  The exponentiation therefore
// always scans n + 16 key bits.
//
// The unit produces E' one W-bit word at a time, least significant first,
// when the exponentiation needs the next key word: out = low W bits of
// E_word + r * phi_word + carry, and carry = the rest (at most RB+1 bits).
//
// Interface: clr clears the carry at the start of an exponentiation; next
// (one clock) takes e_word and phi_word, registers the key word in out and
// updates the carry.  r must stay constant during one exponentiation.
// Timing: out is valid one clock after next.
//
// From the document: the adder of E and r * phi(N), 16-bit r, key formed
// word by word.  The carry width and the handshake are choices of this
// implementation.
module key_blind #(
  parameter int unsigned W  = 32,
  parameter int unsigned RB = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          next,
  input  logic [RB-1:0] r,
  input  logic [W-1:0]  e_word,
  input  logic [W-1:0]  phi_word,
  output logic [W-1:0]  out
);

  logic [RB:0]    carry;
  logic [W+RB:0]  sum;

  always_comb begin
    sum = (W+RB+1)'(e_word) + (W+RB+1)'(r) * (W+RB+1)'(phi_word) + (W+RB+1)'(carry);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry <= '0;
      out   <= '0;
    end else if (clr) begin
      carry <= '0;
    end else if (next) begin
      out   <= sum[W-1:0];
      carry <= sum[W+RB:W];
    end
  end

endmodule
