// tb_rsa_workloads: the 1024- and 2048-bit RSA operations at the default
// size of the core (32-bit words, 64 processing units, 4096-bit registers),
// run through the AHB port.  (The 4096-bit operation is tb_ahb2rsa_full.)
//
// Each modulus is a product of Mersenne primes with known phi(N), so the
// key blinding is active:
//     1024 bits: (2^607-1)(2^127-1)(2^107-1)(2^89-1)(2^61-1)(2^31-1)(2^2-1)
//     2048 bits: (2^1279-1)(2^521-1)(2^127-1)(2^107-1)(2^7-1)(2^5-1)(2^2-1)
// with E = 65537 and a random message.  Checked: the result against a
// reference modular exponentiation; every multiplication time (start to
// done inside the core) against the multiplier latency model; the whole
// run against (n+18)*(Tmm+1) + (n+16) + ceil((n+16)/W) + 1.  The measured
// times are printed in clocks and in ms at 100 MHz.
module tb_rsa_workloads;
  import rsa_pkg::*;
  import tb_bn_pkg::*;
  localparam int unsigned W = W_DEF, P = P_DEF, NMAX = NMAX_DEF;
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

  ahb2rsa dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0, mm_t0 = 0, mm_want = 0, mm_bad = 0, mm_cnt = 0;

  always @(posedge HCLK) cyc <= cyc + 1;
  always @(posedge HCLK) begin
    if (dut.u_core.mm_start) mm_t0 <= cyc;
    if (dut.u_core.mul_done) begin
      mm_cnt <= mm_cnt + 1;
      if (cyc - mm_t0 != mm_want) mm_bad <= mm_bad + 1;
    end
  end

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
  endtask

  task automatic load(logic [2:0] region, bn_t v);
    for (int i = 0; i < int'(NMAX / W); i++) bus_write(addr(region, i), v[i*W +: W]);
  endtask

  task automatic run(int unsigned n, int unsigned ex [7]);
    bn_t nm = 1, phi = 1, m, e = 65537, r2, want, res;
    logic [W-1:0] st;
    int unsigned ew, ow, ker, T, exp_cyc, t0, t1, mm0, bad0;
    foreach (ex[i]) begin
      nm  = (nm << ex[i]) - nm;
      phi = (phi << ex[i]) - (phi << 1);
    end
    checks++;
    if (bn_top(nm) != int'(n) - 1) begin failures++; $display("FAIL modulus length %0d", n); end
    m = bn_rnd(n - 1);
    r2 = bn_pow2mod(2 * (n + P), nm);
    want = bn_modexp(m, e, nm);
    ew  = (n + P + 2 + W - 1) / W;
    ow  = n / W + 1;
    ker = (n + 2 * P - 1) / P;
    T   = (ew > P + P / W) ? ew : P + P / W;
    mm_want = (ker - 1) * T + ((n - 1) % P) + P / W + ow + 4;
    exp_cyc = (n + 18) * (mm_want + 1) + (n + 16) + (n + 16 + W - 1) / W + 1;
    bus_write(addr(R_CTRL, 0), W'(n));
    bus_write(addr(R_CTRL, 4), 0);
    bus_write(addr(R_CTRL, 3), W'($urandom) | 1);
    load(R_N, nm); load(R_M, m); load(R_E, e); load(R_PHI, phi); load(R_R2, r2);
    mm0 = mm_cnt; bad0 = mm_bad;
    bus_write(addr(R_CTRL, 1), 1);
    t0 = cyc;
    do begin
      repeat (200) @(negedge HCLK);
      bus_read(addr(R_CTRL, 2), st);
    end while (!st[1]);
    t1 = cyc;
    res = '0;
    for (int i = 0; i < int'(NMAX / W); i++) begin
      bus_read(addr(R_C, i), st);
      res[i*W +: W] = st;
    end
    checks++;
    if (res != want) begin failures++; $display("FAIL %0d-bit result", n); end
    checks++;
    if (mm_cnt - mm0 != n + 18 || mm_bad != bad0) begin
      failures++;
      $display("FAIL %0d-bit: %0d multiplications, %0d with a wrong latency", n, mm_cnt - mm0, mm_bad - bad0);
    end
    checks++;
    if (t1 - t0 < exp_cyc || t1 - t0 > exp_cyc + 210) begin
      failures++;
      $display("FAIL %0d-bit: %0d clocks, expected %0d", n, t1 - t0, exp_cyc);
    end
    $display("%0d-bit RSA: multiplication %0d clocks, exponentiation %0d clocks = %0d.%01d ms at 100 MHz (r=%h)",
             n, mm_want, t1 - t0, (t1 - t0) / 100000, ((t1 - t0) / 10000) % 10, dut.u_core.r_r);
  endtask

  initial begin
    repeat (3) @(negedge HCLK);
    HRESETn = 1;
    run(1024, '{607, 127, 107, 89, 61, 31, 2});
    run(2048, '{1279, 521, 127, 107, 7, 5, 2});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7000000) @(posedge HCLK);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
