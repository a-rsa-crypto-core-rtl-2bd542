// mm_flex_out: flexible output stage of the Montgomery multiplier.
//
// The number of bits the multiplier scans is the modulus length plus one
// kernel cycle (P bits).  When that is not a multiple of P, the last kernel
// cycle uses only the first sel+1 PUs, and the result is read from PU number
// sel instead of waiting for the words to pass the rest of the pipeline.  A
// P-to-1 multiplexer picks that PU's word stream (last kernel cycle only).
// The words pass into a window of P/W+1 registers (Z_t, Z_t-1, ... for
// P=64, W=32: Z_t, Z_t-1, Z_t-2).  After PU number sel the partial sum has
// not been divided by 2^(sel+1) yet.  The permutation function does that
// division: result word m is the W bits that start at bit sel+1 of the
// window whose oldest word is stream word m.  For P=64, W=32 this is
// exactly the table of the document: sel=0 gives {Z_t-1[0], Z_t-2[31:1]},
// sel=63 gives Z_t.
//
// Interface: pu_* are the registered outputs of all PUs.  out_v/out_idx/
// out_word is the result stream, one word per clock, least significant
// first.  Only words 0 .. ow-1 are sent.  Timing: a word leaves PU sel at cycle c; the
// result word that needs it as the newest window word leaves at c+2.
//
// From the document: the P-to-1 multiplexer, the Z_t window and the
// permutation table.  Choice of this implementation: the partial sum is
// already in plain binary form, so the carry-propagate adder drawn in front
// of Z_t is not needed and the window is fed directly.
//
// Lint note: only the low word of the shifted window is kept; the upper
// bits of the shifter are unused by design.
module mm_flex_out #(
  parameter int unsigned W  = 32,
  parameter int unsigned P  = 64,
  parameter int unsigned KW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic [$clog2(P)-1:0] sel,       // output PU index = ((n-1) mod P)
  input  logic [KW-1:0]        ow,        // number of result words to send
  input  logic [P-1:0]         pu_v,
  input  logic [P-1:0]         pu_last,
  input  logic [KW-1:0]        pu_k  [P],
  input  logic [W-1:0]         pu_s  [P],
  output logic                 out_v,
  output logic [KW-1:0]        out_idx,
  output logic [W-1:0]         out_word
);

  localparam int unsigned NW   = P / W;       // whole words in one kernel shift
  localparam int unsigned NWIN = NW + 1;      // window length

  logic [NWIN-1:0][W-1:0] win;                // win[NWIN-1] is the newest (Z_t)
  logic                   win_v;
  logic [KW-1:0]          win_k;

  logic                   mux_v;
  logic [KW-1:0]          mux_k;
  logic [W-1:0]           mux_s;
  logic [NWIN*W-1:0]      shifted;
  logic [7:0]             amount;

  // P-to-1 multiplexer
  always_comb begin
    mux_v = pu_v[sel] && pu_last[sel];
    mux_k = pu_k[sel];
    mux_s = pu_s[sel];
  end

  // Permutation: divide the window by 2^(sel+1) and keep one word.
  always_comb begin
    amount  = 8'(sel) + 8'd1;
    shifted = win >> amount;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win      <= '0;
      win_v    <= 1'b0;
      win_k    <= '0;
      out_v    <= 1'b0;
      out_idx  <= '0;
      out_word <= '0;
    end else if (clr) begin
      win      <= '0;
      win_v    <= 1'b0;
      win_k    <= '0;
      out_v    <= 1'b0;
    end else begin
      win_v <= mux_v;
      if (mux_v) begin
        win   <= {mux_s, win[NWIN-1:1]};
        win_k <= mux_k;
      end
      out_v <= win_v && (win_k >= KW'(NW)) && ((win_k - KW'(NW)) < ow);
      if (win_v) begin
        out_idx  <= win_k - KW'(NW);
        out_word <= shifted[W-1:0];
      end
    end
  end

endmodule
