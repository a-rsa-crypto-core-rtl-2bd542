// tb_rsa_core: self-checking test of the exponentiation kernel (W=32, P=64,
// operands up to 512 bits).
//   - the small RSA example with p=47, q=59: N=2773, E=17, D=157;
//     1819^17 mod 2773 = 818 and 818^157 mod 2773 = 1819;
//   - a 188-bit modulus (2^127-1)(2^61-1) with its true phi(N), so the
//     key blinding with a random r is active;
//   - random odd moduli with phi = 0 (blinding adds nothing), checked
//     against a reference modular exponentiation;
//   - an exponentiation over GF(2)[x] (field select).
// Every run must take (n+18) multiplications; its cycle count is compared
// with (n+18)*(Tmm+1) + (n+16) + ceil((n+16)/W) + 1, where Tmm is the
// multiplier latency.
module tb_rsa_core;
  import rsa_pkg::*;
  import tb_bn_pkg::*;
  localparam int unsigned W = 32, P = 64, NMAX = 512;
  localparam int unsigned KW = kw_for(W, P, NMAX);
  localparam int unsigned RW = NMAX / W + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            ld_en = 0, seed_ld = 0, start = 0, cfg_field = 0;
  rsel_e           ld_sel = RSEL_N;
  logic [KW-1:0]   ld_idx = '0, rd_idx = '0;
  logic [W-1:0]    ld_data = '0, rd_data;
  logic [15:0]     seed = '0;
  logic [LENW-1:0] cfg_len = '0;
  logic            busy, out_valid;

  rsa_core #(.W(W), .P(P), .NMAX(NMAX)) dut (.*);

  int checks = 0, failures = 0;
  int n_exe0 = 0, n_exe1 = 0, n_shift = 0, n_index = 0, n_mm = 0;

  always @(posedge clk) begin
    if (dut.mm_start) begin
      n_mm++;
      if (dut.rnd[0]) n_shift++; else n_index++;
      if (dut.state == ST_EXE) begin
        if (dut.ei_r) n_exe1++; else n_exe0++;
      end
    end
  end

  task automatic load(rsel_e s, bn_t v);
    for (int i = 0; i < RW; i++) begin
      @(negedge clk);
      ld_en = 1; ld_sel = s; ld_idx = KW'(i); ld_data = v[i*W +: W];
    end
    @(negedge clk);
    ld_en = 0;
  endtask

  function automatic int unsigned mm_lat(int unsigned n);
    int unsigned ew, ow, ker, T;
    ew  = (n + P + 2 + W - 1) / W;
    ow  = n / W + 1;
    ker = (n + 2 * P - 1) / P;
    T   = (ew > P + P / W) ? ew : P + P / W;
    return (ker - 1) * T + ((n - 1) % P) + P / W + ow + 4;
  endfunction

  task automatic run(string name, int unsigned n, bit gf2, bn_t nm, bn_t m, bn_t e,
                     bn_t phi, bn_t want, logic [15:0] sd);
    bn_t r2, res;
    int unsigned L = n + P, cyc = 0, exp_cyc, mm0;
    if (gf2) r2 = pl_pow2mod(2 * L, nm, n - 1);
    else     r2 = bn_pow2mod(2 * L, nm);
    load(RSEL_N, nm); load(RSEL_M, m); load(RSEL_E, e); load(RSEL_PHI, phi); load(RSEL_R2, r2);
    @(negedge clk); seed_ld = 1; seed = sd;
    @(negedge clk); seed_ld = 0;
    cfg_len = LENW'(n); cfg_field = gf2; start = 1;
    mm0 = n_mm;
    @(negedge clk); start = 0;
    while (!out_valid) begin @(negedge clk); cyc++; end
    res = '0;
    for (int i = 0; i < RW; i++) begin
      rd_idx = KW'(i); #1; res[i*W +: W] = rd_data;
    end
    checks++;
    if (res != want) begin
      failures++;
      $display("FAIL %s: result %h expected %h", name, res[NMAX-1:0], want[NMAX-1:0]);
    end
    exp_cyc = (n + 18) * (mm_lat(n) + 1) + (n + 16) + (n + 16 + W - 1) / W + 1;
    checks++;
    if (cyc != exp_cyc || n_mm - mm0 != int'(n + 18)) begin
      failures++;
      $display("FAIL %s: %0d cycles, %0d multiplications; expected %0d, %0d",
               name, cyc, n_mm - mm0, exp_cyc, n + 18);
    end
    $display("%s: n=%0d, %0d cycles", name, n, cyc);
  endtask

  initial begin
    bn_t nm, m, e, phi, a, b;
    int unsigned n;
    void'($urandom(5));
    repeat (3) @(negedge clk);
    rst_n = 1;
    // the RSA example of the text
    run("example encrypt", 12, 0, 2773, 1819, 17, 2668, 818, 16'h1234);
    run("example decrypt", 12, 0, 2773, 818, 157, 2668, 1819, 16'h4321);
    // product of two Mersenne primes, true phi(N)
    a = (bn_t'(1) << 127) - 1; b = (bn_t'(1) << 61) - 1;
    nm = (a << 61) - a;               // a * (2^61 - 1)
    phi = ((a - 1) << 61) - ((a - 1) << 1);  // (a - 1) * (2^61 - 2)
    m = bn_rnd(180); e = bn_rnd(150) | 1;
    run("mersenne product", 188, 0, nm, m, e, phi, bn_modexp(m, e, nm), 16'hBEEF);
    // random odd moduli, no blinding
    for (int t = 0; t < 3; t++) begin
      n = (t == 0) ? NMAX : 40 + $urandom % 300;
      nm = bn_rnd(n); nm[n-1] = 1; nm[0] = 1;
      m = bn_rnd(n - 1); e = bn_rnd(n);
      run("random", n, 0, nm, m, e, 0, bn_modexp(m, e, nm), 16'(t + 7));
    end
    // binary field
    n = 97;
    nm = bn_rnd(n); nm[n-1] = 1; nm[0] = 1;
    m = bn_rnd(n - 1); e = bn_rnd(40);
    run("GF(2^n)", n, 1, nm, m, e, 0, pl_modexp(m, e, nm, n - 1), 16'h0F0F);
    // every mechanism must have happened
    checks++;
    if (n_exe0 == 0 || n_exe1 == 0 || n_shift == 0 || n_index == 0) begin
      failures++;
      $display("FAIL mechanisms: exe0=%0d exe1=%0d shift=%0d index=%0d", n_exe0, n_exe1, n_shift, n_index);
    end
    $display("key bits 0: %0d, 1: %0d; shift-mode updates %0d, index-mode %0d", n_exe0, n_exe1, n_shift, n_index);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
