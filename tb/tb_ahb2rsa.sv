// tb_ahb2rsa: end-to-end test of the RSA crypto-core through its AHB port,
// at a reduced size (W = 16, P = 32, NMAX = 1024) so that the run is short
// and the carry-over queue is exercised (it is needed when a modulus has
// more than about 32*16 bits at this size).
//
// A bus master model writes MODE, FIELD, SEED, N, M, E, phi(N) and
// r2 = 2^(2(n+P)) mod N, writes START, polls STATUS and reads the result,
// which is compared with a reference modular exponentiation.
// Runs:
//   - the small RSA example (N = 2773 = 47*59, E = 17, D = 157): encryption
//     and decryption;
//   - a 582-bit modulus (2^521-1)(2^61-1) with its true phi(N), so the key
//     blinding with a random r is active, and a random full-length key;
//   - a random 544-bit modulus (n a multiple of P, so all PUs work in the
//     last kernel cycle) without blinding (phi = 0);
//   - an exponentiation over GF(2)[x] with n = 150.
// Bus writes while the core is busy must be ignored.
// Each run must take (n+18)*(Tmm+1) + (n+16) + ceil((n+16)/W) + 1 clocks
// from START to out_valid, Tmm being the multiplier latency.
// Every mechanism must have happened at least once: key bits 0 and 1
// (recirculated and updated Z), shift- and index-mode register updates,
// queued and passed-through carry words, blinding with r != 0, both fields,
// output from an inner PU and from the last PU, an ignored busy write.
module tb_ahb2rsa;
  import rsa_pkg::*;
  import tb_bn_pkg::*;
  localparam int unsigned W = 16, P = 32, NMAX = 1024;
  localparam int unsigned IW = $clog2(NMAX / W);
  localparam logic [2:0] R_CTRL = 0, R_N = 1, R_M = 2, R_E = 3, R_PHI = 4, R_R2 = 5, R_C = 6;

  logic HCLK = 0, HRESETn = 0;
  always #5 HCLK = ~HCLK;

  logic         HSELRSA = 0, HREADYIn = 1, HWRITE = 0;
  logic [1:0]   HTRANS = 2'b00;
  logic [31:0]  HADDR = '0;
  logic [W-1:0] HWDATA = '0, HRDATA;
  logic [1:0]   HRESP;
  logic         HREADYOut;

  ahb2rsa #(.W(W), .P(P), .NMAX(NMAX)) dut (.*);

  int checks = 0, failures = 0;
  int n_exe0 = 0, n_exe1 = 0, n_shift = 0, n_index = 0, n_queued = 0, n_bypass = 0;
  int n_blind = 0, n_gf2 = 0, n_gfp = 0, n_inner = 0, n_lastpu = 0, n_ignored = 0;

  always @(posedge HCLK) begin
    if (dut.u_core.mm_start) begin
      if (dut.u_core.rnd[0]) n_shift++; else n_index++;
      if (dut.u_core.state == ST_EXE) begin
        if (dut.u_core.ei_r) n_exe1++; else n_exe0++;
      end
    end
    if (dut.u_core.u_mul.q_pop) begin
      if (dut.u_core.u_mul.q_bypass) n_bypass++; else n_queued++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] addr(logic [2:0] region, int unsigned idx);
    return 32'({region, IW'(idx)}) << 2;
  endfunction

  task automatic bus_write(logic [31:0] a, logic [W-1:0] d);
    @(negedge HCLK);
    HSELRSA = 1; HTRANS = 2'b10; HWRITE = 1; HADDR = a;
    @(negedge HCLK);
    HSELRSA = 0; HTRANS = 2'b00; HWRITE = 0; HWDATA = d;
  endtask

  task automatic bus_read(logic [31:0] a, output logic [W-1:0] d);
    @(negedge HCLK);
    HSELRSA = 1; HTRANS = 2'b10; HWRITE = 0; HADDR = a;
    @(negedge HCLK);
    HSELRSA = 0; HTRANS = 2'b00;
    d = HRDATA;
    check(HREADYOut && HRESP == 2'b00, "OKAY response without wait states");
  endtask

  task automatic load(logic [2:0] region, bn_t v);
    for (int i = 0; i < int'(NMAX / W); i++) bus_write(addr(region, i), v[i*W +: W]);
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
    logic [W-1:0] st;
    int unsigned L = n + P, t0, t1, exp_cyc;
    if (gf2) r2 = pl_pow2mod(2 * L, nm, n - 1);
    else     r2 = bn_pow2mod(2 * L, nm);
    bus_write(addr(R_CTRL, 0), W'(n));
    bus_write(addr(R_CTRL, 4), W'(gf2));
    bus_write(addr(R_CTRL, 3), sd);
    load(R_N, nm); load(R_M, m); load(R_E, e); load(R_PHI, phi); load(R_R2, r2);
    bus_read(addr(R_CTRL, 0), st);
    check(st == W'(n), "MODE read-back");
    bus_write(addr(R_CTRL, 1), 1);
    t0 = $time / 10;
    // a write to N while busy must be ignored
    bus_write(addr(R_N, 0), 16'hFFFF);
    n_ignored++;
    do bus_read(addr(R_CTRL, 2), st); while (!st[1]);
    t1 = $time / 10;
    res = '0;
    for (int i = 0; i < int'(NMAX / W); i++) begin
      bus_read(addr(R_C, i), st);
      res[i*W +: W] = st;
    end
    check(res == want, $sformatf("%s result", name));
    if (res != want) $display("  got %h\n  exp %h", res[NMAX-1:0], want[NMAX-1:0]);
    // START is seen two clocks after the address phase begins; STATUS
    // polling reads out_valid up to two clocks late
    exp_cyc = (n + 18) * (mm_lat(n) + 1) + (n + 16) + (n + 16 + W - 1) / W + 1;
    checks++;
    if (t1 - t0 < exp_cyc || t1 - t0 > exp_cyc + 4) begin
      failures++;
      $display("FAIL %s: %0d clocks, expected %0d", name, t1 - t0, exp_cyc);
    end
    if (phi != 0 && dut.u_core.r_r != 0) n_blind++;
    if (gf2) n_gf2++; else n_gfp++;
    if ((n - 1) % P == P - 1) n_lastpu++; else n_inner++;
    $display("%s: n=%0d, about %0d clocks (model %0d), r=%h", name, n, t1 - t0, exp_cyc, dut.u_core.r_r);
  endtask

  initial begin
    bn_t nm, m, e, phi, a;
    int unsigned n;
    repeat (3) @(negedge HCLK);
    HRESETn = 1;
    run("example encrypt", 12, 0, 2773, 1819, 17, 2668, 818, 16'h1357);
    run("example decrypt", 12, 0, 2773, 818, 157, 2668, 1819, 16'h2468);
    a   = (bn_t'(1) << 521) - 1;
    nm  = (a << 61) - a;                          // (2^521-1)(2^61-1)
    phi = ((a - 1) << 61) - ((a - 1) << 1);       // (2^521-2)(2^61-2)
    m = bn_rnd(580); e = bn_rnd(575) | 1;
    run("mersenne product", 582, 0, nm, m, e, phi, bn_modexp(m, e, nm), 16'hC0DE);
    n = 544;
    nm = bn_rnd(n); nm[n-1] = 1; nm[0] = 1;
    m = bn_rnd(n - 1); e = bn_rnd(n);
    run("random", n, 0, nm, m, e, 0, bn_modexp(m, e, nm), 16'h0042);
    n = 150;
    nm = bn_rnd(n); nm[n-1] = 1; nm[0] = 1;
    m = bn_rnd(n - 1); e = bn_rnd(60);
    run("GF(2^n)", n, 1, nm, m, e, 0, pl_modexp(m, e, nm, n - 1), 16'h7777);
    $display("key bits 0/1: %0d/%0d, shift/index updates: %0d/%0d, queued/passed words: %0d/%0d",
             n_exe0, n_exe1, n_shift, n_index, n_queued, n_bypass);
    $display("blinded runs %0d, GF(p)/GF(2^n) runs %0d/%0d, inner/last output PU %0d/%0d, ignored writes %0d",
             n_blind, n_gfp, n_gf2, n_inner, n_lastpu, n_ignored);
    check(n_exe0 > 0, "key bit 0 seen");
    check(n_exe1 > 0, "key bit 1 seen");
    check(n_shift > 0, "shift-mode update seen");
    check(n_index > 0, "index-mode update seen");
    check(n_queued > 0, "queued carry word seen");
    check(n_bypass > 0, "passed-through carry word seen");
    check(n_blind > 0, "blinding with r != 0 seen");
    check(n_gfp > 0 && n_gf2 > 0, "both fields used");
    check(n_inner > 0 && n_lastpu > 0, "inner and last output PU used");
    check(n_ignored > 0, "busy write ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge HCLK);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
