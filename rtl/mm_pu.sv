// mm_pu: one processing unit (PU) of the scalable Montgomery multiplier.
//
// A PU handles one bit x of the multiplier operand X per kernel cycle.  The
// words of the partial sum S, of Y and of N stream through it one word per
// clock, least significant word first.  PU number J (counted from 0) sees Y
// and N already multiplied by 2^J: instead of shifting S right after every
// bit, each PU shifts Y and N left by one bit on their way to the next PU.
// It keeps the top bit of the previous Y and N word in the registers ym1 and
// nm1 and forwards (word[W-2:0], previous word[W-1]).  Per word it computes
//     (ca, S) = ca + x * Y + S
//     (cb, S) = cb + odd * N + S
// where odd is bit J of the partial sum after the first addition.  That bit
// sits in word J/W, at position J mod W.  While that word passes, odd is
// taken straight from the adder (odd wire) and stored in the odd register
// for the more significant words.  N*2^J is zero below that word, so earlier
// words do not need odd.  The x bit is taken from the parallel x register at
// the first word and held for the rest of the kernel cycle.
//
// In GF(2^n) mode (field = 1) both carries are suppressed and the additions
// become bitwise XOR, which turns the same unit into a binary-field
// Montgomery step.
//
// Timing: all outputs are registered; a word entering at cycle t leaves at
// t+1, so consecutive PUs work one clock apart (a 1-cycle PU-to-PU latency).
// kill clears the valid flag, so the tail of a finished operation cannot
// leak into the next one.
//
// From the document: the two adder rows with carry registers, the Y/N
// left-shift registers, the odd register and odd wire, the field select.
// Choices of this implementation: the partial sum is passed between PUs in
// plain binary form (the adders are carry-propagate, as in the algorithm's
// carry equations), and a word index travels with each word so that each PU
// knows which word holds its odd bit.
module mm_pu #(
  parameter int unsigned W  = 32,  // word size
  parameter int unsigned J  = 0,   // index of this PU in the pipeline
  parameter int unsigned KW = 8    // width of the word index
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          field,     // 0: GF(p), 1: GF(2^n)
  input  logic          kill,      // drop the word in flight (new operation)
  input  logic          x_par,     // this PU's bit of the parallel x register
  input  logic          v_in,      // a word is present
  input  logic          last_in,   // word belongs to the last kernel cycle
  input  logic [KW-1:0] k_in,      // word index within the operand
  input  logic [W-1:0]  s_in,
  input  logic [W-1:0]  y_in,      // word of Y * 2^J
  input  logic [W-1:0]  n_in,      // word of N * 2^J
  output logic          v_out,
  output logic          last_out,
  output logic [KW-1:0] k_out,
  output logic [W-1:0]  s_out,
  output logic [W-1:0]  y_out,     // word of Y * 2^(J+1)
  output logic [W-1:0]  n_out      // word of N * 2^(J+1)
);

  localparam int unsigned ODD_WORD = J / W;
  localparam int unsigned ODD_BIT  = J % W;

  logic x_r, odd_r, ca, cb, ym1, nm1;

  logic         first;
  logic         x_eff, odd_eff, odd_wire, odd_here;
  logic         ca_in, cb_in;
  logic [W:0]   sum_a, sum_b;
  logic [W-1:0] xy, on;

  always_comb begin
    first    = (k_in == '0);
    x_eff    = first ? x_par : x_r;
    ca_in    = first ? 1'b0 : ca;
    cb_in    = first ? 1'b0 : cb;
    xy       = x_eff ? y_in : '0;
    if (field) sum_a = {1'b0, s_in ^ xy};
    else       sum_a = {1'b0, s_in} + {1'b0, xy} + {{W{1'b0}}, ca_in};
    odd_wire = sum_a[ODD_BIT];
    odd_here = (k_in == KW'(ODD_WORD));
    odd_eff  = odd_here ? odd_wire : odd_r;
    on       = odd_eff ? n_in : '0;
    if (field) sum_b = {1'b0, sum_a[W-1:0] ^ on};
    else       sum_b = {1'b0, sum_a[W-1:0]} + {1'b0, on} + {{W{1'b0}}, cb_in};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_out    <= 1'b0;
      last_out <= 1'b0;
      k_out    <= '0;
      s_out    <= '0;
      y_out    <= '0;
      n_out    <= '0;
      x_r      <= 1'b0;
      odd_r    <= 1'b0;
      ca       <= 1'b0;
      cb       <= 1'b0;
      ym1      <= 1'b0;
      nm1      <= 1'b0;
    end else begin
      v_out <= v_in && !kill;
      if (v_in) begin
        last_out <= last_in;
        k_out    <= k_in;
        s_out    <= sum_b[W-1:0];
        y_out    <= {y_in[W-2:0], first ? 1'b0 : ym1};
        n_out    <= {n_in[W-2:0], first ? 1'b0 : nm1};
        x_r      <= x_eff;
        if (odd_here) odd_r <= odd_wire;
        ca       <= sum_a[W];
        cb       <= sum_b[W];
        ym1      <= y_in[W-1];
        nm1      <= n_in[W-1];
      end
    end
  end

endmodule
