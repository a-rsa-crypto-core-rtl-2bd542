// mm_harness: drives one mont_mul instance with random operands and checks
// each result against wide-integer (or carry-less polynomial) arithmetic.
//
// For GF(p) the check is: out < 2N and out * 2^L = X * Y (mod N), with
// L = n + P.  This needs no modular inverse.  For GF(2^n) the same identity
// is checked with carry-less products modulo the field polynomial N, and
// the result must have degree below n-1 (N has n bits, degree n-1).  The latency from start to done is
// compared with (ker-1)*T + ((n-1) mod P) + P/W + ow + 4.  Counts of the
// queue pass-through and queued cases are reported so the caller can check
// that both happened.
module mm_harness #(
  parameter int unsigned W    = 32,
  parameter int unsigned P    = 64,
  parameter int unsigned NMAX = 512,
  parameter int unsigned NTEST = 20,
  parameter int unsigned SEED = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_queued,
  output int   n_bypass,
  output bit   finished
);
  import rsa_pkg::*;
  localparam int unsigned EWMAX = (NMAX + P + 2 + W - 1) / W;
  localparam int unsigned KW    = kw_for(W, P, NMAX);
  localparam int unsigned OPW   = (EWMAX + 4) * W;     // operand storage width
  localparam int unsigned BIG   = 2 * OPW + 2 * P + 64;

  logic [OPW-1:0] xop, yop, nop, res;
  logic            start, field, busy, done, out_v;
  xsel_e           xsel;
  logic [LENW-1:0] n_len;
  logic [KW-1:0]   x_widx, rd_idx, out_idx;
  logic [P-1:0]    x_slice;
  logic [W-1:0]    y_word, n_word, out_word;

  assign x_slice = xop[32'(x_widx) * W +: P];
  assign y_word  = yop[32'(rd_idx) * W +: W];
  assign n_word  = nop[32'(rd_idx) * W +: W];

  mont_mul #(.W(W), .P(P), .NMAX(NMAX)) dut (
    .clk, .rst_n, .start, .n_len, .field, .xsel, .busy, .done,
    .x_widx, .x_slice, .rd_idx, .y_word, .n_word, .out_v, .out_idx, .out_word
  );

  always_ff @(posedge clk) if (out_v) res[32'(out_idx) * W +: W] <= out_word;
  always_ff @(posedge clk) begin
    if (dut.q_pop && dut.q_bypass) n_bypass <= n_bypass + 1;
    if (dut.q_pop && !dut.q_bypass) n_queued <= n_queued + 1;
  end

  function automatic logic [BIG-1:0] rnd_big(int unsigned bits);
    logic [BIG-1:0] v = '0;
    for (int i = 0; i < BIG / 32; i++) v[i*32 +: 32] = $urandom;
    if (bits < BIG) v &= (BIG'(1) << bits) - 1;
    return v;
  endfunction

  // carry-less multiply and polynomial remainder
  function automatic logic [BIG-1:0] clmul(logic [BIG-1:0] a, logic [BIG-1:0] b);
    logic [BIG-1:0] r = '0;
    for (int i = 0; i < BIG / 2; i++) if (b[i]) r ^= a << i;
    return r;
  endfunction
  function automatic logic [BIG-1:0] pmod(logic [BIG-1:0] a, logic [BIG-1:0] m, int unsigned deg);
    for (int i = BIG - 1; i >= int'(deg); i--) if (a[i]) a ^= m << (i - deg);
    return a;
  endfunction

  task automatic run_one(int unsigned n, bit gf2, bit one);
    logic [BIG-1:0] nb, xb, yb, rb, lhs, rhs;
    int unsigned L, ker, T, ew, ow, lat_exp, lat;
    L = n + P;
    nb = rnd_big(n); nb[n-1] = 1'b1; nb[0] = 1'b1;
    if (gf2) begin
      xb = rnd_big(n - 1);   // degree below n-1, the degree of N
      yb = rnd_big(n - 1);
    end else begin
      xb = rnd_big(n + 1) % (2 * nb);
      yb = rnd_big(n + 1) % (2 * nb);
    end
    if (one) xb = 1;
    xop = '0; yop = '0; nop = '0; res = '0;
    xop[OPW-1:0] = xb[OPW-1:0];
    yop[OPW-1:0] = yb[OPW-1:0];
    nop[OPW-1:0] = nb[OPW-1:0];
    @(negedge clk);
    n_len = LENW'(n); field = gf2; xsel = one ? XSEL_ONE : XSEL_OPERAND; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    rb = '0; rb[OPW-1:0] = res;
    ew  = (n + P + 2 + W - 1) / W;
    ow  = n / W + 1;
    ker = (n + 2 * P - 1) / P;
    T   = (ew > P + P / W) ? ew : P + P / W;
    lat_exp = (ker - 1) * T + ((n - 1) % P) + P / W + ow + 4;
    checks++;
    if (gf2) begin
      lhs = pmod(clmul(rb, BIG'(1) << L), nb, n - 1);
      rhs = pmod(clmul(xb, yb), nb, n - 1);
      if (lhs != rhs || (rb >> (n - 1)) != 0) begin
        failures++;
        $display("FAIL W=%0d P=%0d GF2 n=%0d", W, P, n);
      end
    end else begin
      lhs = (rb << L) % nb;
      rhs = (xb * yb) % nb;
      if (lhs != rhs || rb >= 2 * nb) begin
        failures++;
        $display("FAIL W=%0d P=%0d n=%0d one=%0d", W, P, n, one);
      end
    end
    checks++;
    if (lat != lat_exp) begin
      failures++;
      $display("FAIL latency W=%0d P=%0d n=%0d got %0d expected %0d", W, P, n, lat, lat_exp);
    end
  endtask

  initial begin
    int unsigned n;
    checks = 0; failures = 0; n_queued = 0; n_bypass = 0; finished = 0;
    start = 0; field = 0; xsel = XSEL_OPERAND; n_len = '0;
    void'($urandom(SEED));
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    // edge lengths, then random ones
    run_one(NMAX, 0, 0);
    run_one(2, 0, 0);
    run_one(P, 0, 0);
    run_one(P + 1, 0, 0);
    run_one(NMAX - 1, 0, 1);
    run_one(NMAX, 1, 0);
    run_one(P + 3, 1, 0);
    for (int t = 0; t < NTEST; t++) begin
      n = 2 + $urandom % (NMAX - 1);
      run_one(n, t % 4 == 3, t % 5 == 4);
    end
    finished = 1;
  end
endmodule
