// mont_mul: scalable word-based Montgomery multiplier with sequence control.
//
// Computes S = X * Y * 2^-L mod N for an odd modulus N of n bits (any n up
// to NMAX), with L = n + P.  The P extra bits (one more kernel cycle) let the
// final conditional subtraction be left out.  For inputs below 2N the result
// also lies in [0, 2N), so results can be fed back as inputs.  This keeps the
// run time and the power profile independent of the data.
//
// How it works.  P processing units (mm_pu) form a pipeline.  In one kernel
// cycle PU j handles bit i*P+j of X, and all Y, N and S words stream through
// the pipeline, one word per clock, PU j one clock behind PU j-1.  EW =
// ceil((n+P+2)/W) words are processed per bit.  After the last PU the sum
// has grown by 2^P.  The first P/W words are zero and are dropped, the rest
// re-enter PU 0 as the S of the next kernel cycle.  They pass through
// mm_queue when PU 0 is still busy with the current kernel cycle.  A kernel
// cycle therefore lasts T = max(EW, P + P/W) clocks.  ceil((n+P)/P) kernel
// cycles scan the L bits.  The last one uses only the first ((n-1) mod P)+1
// PUs, and mm_flex_out takes the result from there.
//
// Interface.  start (one clock) latches the length n_len, the field select
// (0: GF(p), 1: GF(2^n)) and the X source xsel (an operand, or the constant
// 1 used to map into and out of the Montgomery domain).  Operands are read
// from outside through combinational read ports:
// x_widx -> x_slice gives P bits of X starting at word x_widx; rd_idx ->
// y_word, n_word gives one word of Y and of N.  Indexes beyond the register
// must read as zero.  The result comes out as a stream
// out_v/out_idx/out_word of ow = floor(n/W)+1 words, least significant first,
// during the last kernel cycle.  By then every operand word has been read for
// the last time, so the result may overwrite an operand in place.  done
// pulses one clock after the last word.
// Latency from the start clock edge to the done pulse:
//     (ker-1)*T + ((n-1) mod P) + P/W + ow + 4 clocks.
//
// From the document: the PU pipeline and its 1-cycle PU-to-PU latency, the
// kernel cycle lengths of its timing table, the extra kernel cycle instead of
// a final subtraction, the X multiplexer with constant 1, the queue, the
// flexible output, the GF(2^n) select.  Choices of this implementation: the
// extra kernel cycle is exactly P bits, the word count EW, the read-port
// interface and the handshake.
//
// Lint notes: the queue's bypass flag is not used here (it only tells an
// observer whether a carried word went through storage); the reset also
// disables the assertions, which lint reports as a synchronous use of an
// asynchronous reset.
module mont_mul
  import rsa_pkg::*;
#(
  parameter int unsigned W    = W_DEF,
  parameter int unsigned P    = P_DEF,
  parameter int unsigned NMAX = NMAX_DEF,
  localparam int unsigned NW    = P / W,
  localparam int unsigned EWMAX = (NMAX + P + 2 + W - 1) / W,
  localparam int unsigned KW    = kw_for(W, P, NMAX)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [LENW-1:0] n_len,
  input  logic            field,
  input  xsel_e           xsel,
  output logic            busy,
  output logic            done,
  // operand read ports
  output logic [KW-1:0]   x_widx,
  input  logic [P-1:0]    x_slice,
  output logic [KW-1:0]   rd_idx,
  input  logic [W-1:0]    y_word,
  input  logic [W-1:0]    n_word,
  // result stream
  output logic            out_v,
  output logic [KW-1:0]   out_idx,
  output logic [W-1:0]    out_word
);

  localparam int unsigned LW    = $clog2(W);
  localparam int unsigned LP    = $clog2(P);
  localparam int unsigned QD    = (EWMAX > P + NW) ? EWMAX - P - NW + 2 : 2;
  localparam int unsigned CW    = KW + 2;

  // latched configuration
  logic            field_r;
  xsel_e           xsel_r;
  logic [KW-1:0]   ew, ow, tlen;
  logic [CW-1:0]   ker;
  logic [LP-1:0]   sel;
  // kernel-cycle and word counters
  logic            issuing;
  logic [CW-1:0]   kc;
  logic [KW-1:0]   wc;
  logic [P-1:0]    xk;

  // configuration computed from the length at start
  logic [KW-1:0]   ew_n, ow_n, tlen_n;
  logic [CW-1:0]   ker_n;
  always_comb begin
    ew_n   = KW'((32'(n_len) + P + 2 + W - 1) >> LW);
    ow_n   = KW'((32'(n_len) >> LW) + 1);
    ker_n  = CW'((32'(n_len) + 2 * P - 1) >> LP);
    tlen_n = (32'(ew_n) > P + NW) ? ew_n : KW'(P + NW);
  end

  // pipeline wiring: index j is the input of PU j, index P the output of PU P-1
  logic          pv    [P+1];
  logic          plast [P+1];
  logic [KW-1:0] pk    [P+1];
  logic [W-1:0]  ps    [P+1];
  logic [W-1:0]  py    [P+1];
  logic [W-1:0]  pn    [P+1];

  logic [W-1:0]  q_out;
  logic          q_avail, q_bypass, q_pop, q_push;
  logic          last_kc, end_kc, s_from_q;

  always_comb begin
    last_kc  = (kc == ker - 1'b1);
    end_kc   = last_kc ? (wc == ew - 1'b1) : (wc == tlen - 1'b1);
    s_from_q = (kc != '0) && (wc < ew - KW'(NW));
    q_pop    = issuing && s_from_q;
    rd_idx   = wc;
    // X bits for the next kernel cycle are fetched one clock ahead
    x_widx   = issuing ? KW'((32'(kc) + 1) * NW) : '0;

    pv[0]    = issuing && (wc < ew);
    plast[0] = last_kc;
    pk[0]    = wc;
    ps[0]    = s_from_q ? q_out : '0;
    py[0]    = y_word;
    pn[0]    = n_word;
  end

  for (genvar j = 0; j < P; j++) begin : g_pu
    mm_pu #(.W(W), .J(j), .KW(KW)) u_pu (
      .clk     (clk),
      .rst_n   (rst_n),
      .field   (field_r),
      .kill    (start),
      .x_par   (xk[j]),
      .v_in    (pv[j]),
      .last_in (plast[j]),
      .k_in    (pk[j]),
      .s_in    (ps[j]),
      .y_in    (py[j]),
      .n_in    (pn[j]),
      .v_out   (pv[j+1]),
      .last_out(plast[j+1]),
      .k_out   (pk[j+1]),
      .s_out   (ps[j+1]),
      .y_out   (py[j+1]),
      .n_out   (pn[j+1])
    );
  end

  // words of the last PU that carry over to the next kernel cycle
  assign q_push = pv[P] && !plast[P] && (pk[P] >= KW'(NW));

  mm_queue #(.W(W), .DEPTH(QD)) u_queue (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (start),
    .push_v(q_push),
    .push_d(ps[P]),
    .pop   (q_pop),
    .out_d (q_out),
    .avail (q_avail),
    .bypass(q_bypass)
  );

  // flexible output
  logic [P-1:0]  fo_v, fo_last;
  logic [KW-1:0] fo_k [P];
  logic [W-1:0]  fo_s [P];
  always_comb begin
    for (int j = 0; j < P; j++) begin
      fo_v[j]    = pv[j+1];
      fo_last[j] = plast[j+1];
      fo_k[j]    = pk[j+1];
      fo_s[j]    = ps[j+1];
    end
  end

  mm_flex_out #(.W(W), .P(P), .KW(KW)) u_out (
    .clk     (clk),
    .rst_n   (rst_n),
    .clr     (start),
    .sel     (sel),
    .ow      (ow),
    .pu_v    (fo_v),
    .pu_last (fo_last),
    .pu_k    (fo_k),
    .pu_s    (fo_s),
    .out_v   (out_v),
    .out_idx (out_idx),
    .out_word(out_word)
  );

  // sequence control unit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      issuing <= 1'b0;
      field_r <= 1'b0;
      xsel_r  <= XSEL_OPERAND;
      ew      <= '0;
      ow      <= '0;
      tlen    <= '0;
      ker     <= '0;
      sel     <= '0;
      kc      <= '0;
      wc      <= '0;
      xk      <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        issuing <= 1'b1;
        field_r <= field;
        xsel_r  <= xsel;
        ew      <= ew_n;
        ow      <= ow_n;
        tlen    <= tlen_n;
        ker     <= ker_n;
        sel     <= LP'(n_len - 1'b1);
        kc      <= '0;
        wc      <= '0;
        xk      <= (xsel == XSEL_ONE) ? P'(1) : x_slice;
      end else begin
        if (issuing) begin
          if (end_kc) begin
            wc <= '0;
            if (last_kc) issuing <= 1'b0;
            else begin
              kc <= kc + 1'b1;
              xk <= (xsel_r == XSEL_ONE) ? '0 : x_slice;
            end
          end else begin
            wc <= wc + 1'b1;
          end
        end
        if (busy && out_v && (out_idx == ow - 1'b1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // The queue always holds the next S word when PU 0 needs it.
  a_s_ready: assert property (@(posedge clk) disable iff (!rst_n) q_pop |-> q_avail);
  // The dropped low words of each kernel cycle are zero (reduction works).
  a_low_zero: assert property (@(posedge clk) disable iff (!rst_n)
                               (pv[P] && !plast[P] && pk[P] < KW'(NW)) |-> (ps[P] == '0));

  initial begin
    assert (P % W == 0) else $error("P must be a multiple of W");
    assert ((1 << LW) == W && (1 << LP) == P) else $error("W and P must be powers of two");
  end

endmodule
