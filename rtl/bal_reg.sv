// bal_reg: operand register with power-balanced update (SPA countermeasure).
//
// The Z and P registers of the exponentiation kernel are written word by
// word from a multiplier's result stream.  Each update is done in one of two
// ways, chosen per multiplication by a random bit:
//   index mode  - the m-th word written goes to word m;
//   shift mode  - the active part of the register (len words) shifts down one
//                 word per write and the new word enters at the top, so after
//                 len writes every word is in place.
// When a key bit is 0 the Z register must keep its value.  It still goes
// through the same sequence of writes, with recirc set: each write stores the
// old word again (in shift mode the register rotates).  A kept register and
// an updated one therefore do the same work.
//
// Reads use logical word indexes.  In shift mode, with s words written so
// far, a word i below len that is not yet rewritten sits at i - s, and a new
// word i < s sits at len - s + i; after all len writes every word is back at
// its own index.  The multipliers read a word before it is overwritten (they
// read word m of an operand before they write result word m), so no old word
// is needed after it has been shifted out.  Indexes beyond the register
// read as zero.
//
// Interface: ld_* writes one word directly (bus load while idle).  arm, at
// the start of a multiplication, clears the write count and latches mode_in
// and len_in.  wr_en writes the next word (wr_data, or the old word when
// recirc is high).  rd_idx/rd_data are NRD combinational word read ports;
// xs_widx/xs_data reads P bits starting at a word.
//
// From the document: a register that can be read and written either by
// shifting or by index addressing, chosen at random for every
// multiplication, and Z rewritten also when the key bit is 0.  The exact
// shift direction, the read-address translation and the interface are
// choices of this implementation.
module bal_reg #(
  parameter int unsigned W   = 32,
  parameter int unsigned RW  = 129,   // number of words
  parameter int unsigned P   = 64,    // width of the slice read port
  parameter int unsigned KW  = 8,     // width of word indexes
  parameter int unsigned NRD = 2      // number of word read ports
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld_en,
  input  logic [KW-1:0] ld_idx,
  input  logic [W-1:0]  ld_data,
  input  logic          arm,
  input  logic          mode_in,      // 0: index mode, 1: shift mode
  input  logic [KW-1:0] len_in,       // number of words in the update
  input  logic          wr_en,
  input  logic          recirc,
  input  logic [W-1:0]  wr_data,
  input  logic [KW-1:0] rd_idx  [NRD],
  output logic [W-1:0]  rd_data [NRD],
  input  logic [KW-1:0] xs_widx,
  output logic [P-1:0]  xs_data
);

  localparam int unsigned NS = P / W;

  logic [W-1:0]  mem [RW];
  logic          mode;
  logic [KW-1:0] len, s;

  function automatic logic [W-1:0] rd(input logic [KW-1:0] idx);
    logic [KW-1:0] phys;
    if (mode && idx < len) phys = (idx < s) ? idx + len - s : idx - s;
    else                   phys = idx;
    return (32'(phys) < RW) ? mem[phys] : '0;
  endfunction

  always_comb begin
    for (int r = 0; r < NRD; r++) rd_data[r] = rd(rd_idx[r]);
    for (int k = 0; k < NS; k++)  xs_data[k*W +: W] = rd(xs_widx + KW'(k));
  end

  logic [W-1:0] wd;
  always_comb begin
    if (recirc) wd = mode ? mem[0] : ((32'(s) < RW) ? mem[s] : '0);
    else        wd = wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= 1'b0;
      len  <= '0;
      s    <= '0;
      for (int i = 0; i < RW; i++) mem[i] <= '0;
    end else begin
      if (arm) begin
        mode <= mode_in;
        len  <= len_in;
        s    <= '0;
      end else if (wr_en) begin
        s <= s + 1'b1;
        if (mode) begin
          for (int i = 0; i < RW; i++) begin
            if (i + 1 < 32'(len))       mem[i] <= mem[(i + 1 < RW) ? i + 1 : i];
            else if (i + 1 == 32'(len)) mem[i] <= wd;
          end
        end else if (32'(s) < RW) begin
          mem[s] <= wd;
        end
      end else if (ld_en && 32'(ld_idx) < RW) begin
        mem[ld_idx] <= ld_data;
      end
    end
  end

endmodule
