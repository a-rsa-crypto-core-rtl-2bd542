// rsa_core: RSA modular exponentiation kernel with DPA and SPA
// countermeasures.
//
// Computes C = M^E mod N for an odd modulus N of any length n up to NMAX
// bits with the right-to-left binary method:
//     Z = 1, P = M;  for each key bit e_i (LSB first):
//         if e_i: Z = Z * P;   P = P * P
// Two Montgomery multipliers (mont_mul) run side by side in lockstep: "mul"
// computes the Z product and "square" the P square.  Both work for every
// key bit, and Z is rewritten (with its own value, via bal_reg's recirc)
// when the bit is 0, so the work per bit does not depend on the key.
//
// Flow (one state per step):
//   FETCH  registers are loaded from the bus: Z = r2 = 2^(2L) mod N
//          (L = n + P), P = M, N, E, phi(N); start begins a run.
//   PRE    Z = MM(1, Z) = 2^L mod N (Montgomery form of 1) and
//          P = MM(r2, P) (Montgomery form of M), both at once.
//   DET    fetch the next blinded key bit; after n+16 bits go to POST.
//   EXE    Z = MM(Z, P) if the bit is 1, Z kept otherwise; P = MM(P, P).
//   POST   Z = MM(1, Z) maps the result back; out_valid rises.
// This is n + 18 multiplications per exponentiation.
//
// Countermeasures: the key is blinded word by word as E' = E + r * phi(N)
// with a 16-bit r taken from prng16 at start and held for the whole run
// (key_blind).  Before every multiplication the PRNG also supplies one
// random bit per operand register that picks its update mode (shift or
// index addressing, see bal_reg).  The PRNG steps once per multiplication.
//
// Interface: while idle (FETCH), ld_en/ld_sel/ld_idx/ld_data write word
// ld_idx of a register.  seed_ld/seed seed the PRNG.  start (one clock)
// latches cfg_len (n) and cfg_field (1 = exponentiation over GF(2^n), with
// N the field polynomial).  busy is high during a run.  out_valid is high
// from the end of a run until the next start.  rd_idx/rd_data read words of
// Z, which holds the result.
// Timing: about (n + 18) multiplier latencies (see mont_mul) plus a few
// clocks per key bit.
//
// From the document: the flow chart, the four n-bit registers Z, P, N, E
// plus phi(N), the two multipliers and their operand multiplexers, the key
// blinding with a 16-bit random number and n+16+2 multiplications, and the
// register operation chosen at random per multiplication.  Choices of this
// implementation: the one extra register word, the handshake, the PRNG use
// and the per-state sequencing details.
//
// Lint notes: the slice port of the Z register is left open because only P
// is ever used as the bit-serial X operand; the reset also disables the
// assertions, which lint reports as a synchronous use of an asynchronous
// reset.
module rsa_core
  import rsa_pkg::*;
#(
  parameter int unsigned W    = W_DEF,
  parameter int unsigned P    = P_DEF,
  parameter int unsigned NMAX = NMAX_DEF,
  localparam int unsigned RW    = NMAX / W + 1,
  localparam int unsigned KW    = kw_for(W, P, NMAX)
) (
  input  logic            clk,
  input  logic            rst_n,
  // register loading
  input  logic            ld_en,
  input  rsel_e           ld_sel,
  input  logic [KW-1:0]   ld_idx,
  input  logic [W-1:0]    ld_data,
  input  logic            seed_ld,
  input  logic [15:0]     seed,
  // control
  input  logic [LENW-1:0] cfg_len,
  input  logic            cfg_field,
  input  logic            start,
  output logic            busy,
  output logic            out_valid,
  // result read-out
  input  logic [KW-1:0]   rd_idx,
  output logic [W-1:0]    rd_data
);

  localparam int unsigned LW  = $clog2(W);
  localparam int unsigned BCW = LENW + 1;

  rsa_state_e      state;
  logic            launched;
  logic [LENW-1:0] len_r;
  logic            field_r;
  logic [BCW-1:0]  bitcnt, nbits;
  logic            kw_ready;
  logic            ei_r;
  logic [RBITS-1:0] r_r;
  logic [KW-1:0]   ow;

  // N, E and phi(N) registers
  logic [W-1:0] n_mem   [RW];
  logic [W-1:0] e_mem   [RW];
  logic [W-1:0] phi_mem [RW];

  // PRNG
  logic [15:0] rnd;
  logic        rnd_step;
  prng16 u_prng (
    .clk    (clk),
    .rst_n  (rst_n),
    .seed_ld(seed_ld && state == ST_FETCH),
    .seed   (seed),
    .step   (rnd_step),
    .q      (rnd)
  );

  // key blinding
  logic         kb_clr, kb_next;
  logic [W-1:0] kb_out, kb_e, kb_phi;
  logic [KW-1:0] kidx;
  always_comb begin
    kidx   = KW'(bitcnt >> LW);
    kb_e   = (32'(kidx) < RW) ? e_mem[kidx]   : '0;
    kb_phi = (32'(kidx) < RW) ? phi_mem[kidx] : '0;
  end
  key_blind #(.W(W), .RB(RBITS)) u_kb (
    .clk     (clk),
    .rst_n   (rst_n),
    .clr     (kb_clr),
    .next    (kb_next),
    .r       (r_r),
    .e_word  (kb_e),
    .phi_word(kb_phi),
    .out     (kb_out)
  );

  // multiplier control
  logic    mm_start, sq_start;
  xsel_e   mul_xsel;
  logic    sq_ysel_p;        // square Y: 0 = Z (r2 in PRE), 1 = P
  logic    z_recirc;

  logic          mul_busy, mul_done, mul_ov;
  logic [KW-1:0] mul_xw, mul_ri, mul_oi;
  logic [W-1:0]  mul_ow;
  logic          sq_busy, sq_done, sq_ov;
  logic [KW-1:0] sq_xw, sq_ri, sq_oi;
  logic [W-1:0]  sq_ow;

  logic [P-1:0]  p_slice;
  logic [W-1:0]  z_rd [3];
  logic [W-1:0]  p_rd [1];
  logic [KW-1:0] z_ri [3];
  logic [KW-1:0] p_ri [1];
  logic [W-1:0]  n_word, sq_y;

  always_comb begin
    z_ri[0] = mul_ri;
    z_ri[1] = sq_ri;
    z_ri[2] = rd_idx;
    p_ri[0] = sq_ri;
    n_word  = (32'(mul_ri) < RW) ? n_mem[mul_ri] : '0;
    sq_y    = sq_ysel_p ? p_rd[0] : z_rd[1];
    rd_data = z_rd[2];
  end

  mont_mul #(.W(W), .P(P), .NMAX(NMAX)) u_mul (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (mm_start),
    .n_len   (len_r),
    .field   (field_r),
    .xsel    (mul_xsel),
    .busy    (mul_busy),
    .done    (mul_done),
    .x_widx  (mul_xw),
    .x_slice (p_slice),
    .rd_idx  (mul_ri),
    .y_word  (z_rd[0]),
    .n_word  (n_word),
    .out_v   (mul_ov),
    .out_idx (mul_oi),
    .out_word(mul_ow)
  );

  mont_mul #(.W(W), .P(P), .NMAX(NMAX)) u_sq (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (sq_start),
    .n_len   (len_r),
    .field   (field_r),
    .xsel    (XSEL_OPERAND),
    .busy    (sq_busy),
    .done    (sq_done),
    .x_widx  (sq_xw),
    .x_slice (p_slice),
    .rd_idx  (sq_ri),
    .y_word  (sq_y),
    .n_word  (n_word),
    .out_v   (sq_ov),
    .out_idx (sq_oi),
    .out_word(sq_ow)
  );

  bal_reg #(.W(W), .RW(RW), .P(P), .KW(KW), .NRD(3)) u_z (
    .clk    (clk),
    .rst_n  (rst_n),
    .ld_en  (ld_en && state == ST_FETCH && ld_sel == RSEL_R2),
    .ld_idx (ld_idx),
    .ld_data(ld_data),
    .arm    (mm_start),
    .mode_in(rnd[0]),
    .len_in (ow),
    .wr_en  (mul_ov),
    .recirc (z_recirc),
    .wr_data(mul_ow),
    .rd_idx (z_ri),
    .rd_data(z_rd),
    .xs_widx('0),
    .xs_data()
  );

  bal_reg #(.W(W), .RW(RW), .P(P), .KW(KW), .NRD(1)) u_p (
    .clk    (clk),
    .rst_n  (rst_n),
    .ld_en  (ld_en && state == ST_FETCH && ld_sel == RSEL_M),
    .ld_idx (ld_idx),
    .ld_data(ld_data),
    .arm    (sq_start),
    .mode_in(rnd[1]),
    .len_in (ow),
    .wr_en  (sq_ov),
    .recirc (1'b0),
    .wr_data(sq_ow),
    .rd_idx (p_ri),
    .rd_data(p_rd),
    .xs_widx(mul_xw),
    .xs_data(p_slice)
  );

  // N, E, phi(N) loading
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RW; i++) begin
        n_mem[i]   <= '0;
        e_mem[i]   <= '0;
        phi_mem[i] <= '0;
      end
    end else if (ld_en && state == ST_FETCH && 32'(ld_idx) < RW) begin
      case (ld_sel)
        RSEL_N:   n_mem[ld_idx]   <= ld_data;
        RSEL_E:   e_mem[ld_idx]   <= ld_data;
        RSEL_PHI: phi_mem[ld_idx] <= ld_data;
        default: ;
      endcase
    end
  end

  // exponentiation flow
  always_comb begin
    mm_start  = 1'b0;
    sq_start  = 1'b0;
    mul_xsel  = XSEL_OPERAND;
    sq_ysel_p = 1'b1;
    z_recirc  = (state == ST_EXE) && !ei_r;
    kb_next   = 1'b0;
    kb_clr    = 1'b0;
    rnd_step  = 1'b0;
    case (state)
      ST_FETCH: begin
        kb_clr   = start;
        rnd_step = start;
      end
      ST_PRE: begin
        mul_xsel  = XSEL_ONE;
        sq_ysel_p = 1'b0;
        mm_start  = !launched;
        sq_start  = !launched;
        rnd_step  = !launched;
      end
      ST_DET: begin
        kb_next = (bitcnt != nbits) && (bitcnt[LW-1:0] == '0) && !kw_ready;
      end
      ST_EXE: begin
        mm_start = !launched;
        sq_start = !launched;
        rnd_step = !launched;
      end
      ST_POST: begin
        mul_xsel = XSEL_ONE;
        mm_start = !launched;
        rnd_step = !launched;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_FETCH;
      launched  <= 1'b0;
      len_r     <= LENW'(1);
      field_r   <= 1'b0;
      bitcnt    <= '0;
      nbits     <= '0;
      kw_ready  <= 1'b0;
      ei_r      <= 1'b0;
      r_r       <= '0;
      ow        <= '0;
      out_valid <= 1'b0;
      busy      <= 1'b0;
    end else begin
      case (state)
        ST_FETCH: if (start) begin
          len_r     <= cfg_len;
          field_r   <= cfg_field;
          ow        <= KW'((32'(cfg_len) >> LW) + 1);
          nbits     <= BCW'(cfg_len) + BCW'(RBITS);
          r_r       <= rnd;
          bitcnt    <= '0;
          kw_ready  <= 1'b0;
          out_valid <= 1'b0;
          busy      <= 1'b1;
          launched  <= 1'b0;
          state     <= ST_PRE;
        end
        ST_PRE, ST_EXE, ST_POST: begin
          if (!launched) launched <= 1'b1;
          else if (mul_done) begin
            launched <= 1'b0;
            case (state)
              ST_PRE: state <= ST_DET;
              ST_EXE: begin
                bitcnt <= bitcnt + 1'b1;
                if (bitcnt[LW-1:0] == LW'(W - 1)) kw_ready <= 1'b0;
                state <= ST_DET;
              end
              default: begin
                out_valid <= 1'b1;
                busy      <= 1'b0;
                state     <= ST_FETCH;
              end
            endcase
          end
        end
        ST_DET: begin
          if (bitcnt == nbits) state <= ST_POST;
          else if (kb_next) kw_ready <= 1'b1;
          else begin
            ei_r  <= kb_out[bitcnt[LW-1:0]];
            state <= ST_EXE;
          end
        end
        default: state <= ST_FETCH;
      endcase
    end
  end

  // Both multipliers run in lockstep, so they read and write in step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (mul_busy && sq_busy) |-> (mul_ri == sq_ri && mul_xw == sq_xw));
  a_same_words: assert property (@(posedge clk) disable iff (!rst_n)
                                 (mul_ov && sq_ov) |-> (mul_oi == sq_oi));
  a_square_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                     (mul_done && sq_busy) |-> sq_done);

endmodule
