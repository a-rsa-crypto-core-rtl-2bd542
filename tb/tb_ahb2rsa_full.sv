// tb_ahb2rsa_full: one complete 4096-bit RSA operation through the AHB port
// with the top at its default size (32-bit words, 64 processing units,
// 4096-bit operands).
//
// The modulus is the 4096-bit product of six Mersenne primes,
//     N = (2^3217-1)(2^607-1)(2^127-1)(2^107-1)(2^31-1)(2^7-1),
// whose phi(N) = product of (2^a - 2) is known exactly, so the key blinding
// runs with a nonzero random r over the full n+16 = 4112 key bits.  The
// public exponent is E = 65537 and the message is random.  The result read
// over the bus is compared with a reference modular exponentiation, and the
// START-to-out_valid time with the cycle model
//     (n+18)*(Tmm+1) + (n+16) + ceil((n+16)/W) + 1,
// Tmm being the multiplier latency (about 8.6k clocks at n = 4096, so the
// whole operation takes about 35 million clocks).
module tb_ahb2rsa_full;
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

  initial begin
    bn_t nm, phi, m, e, r2, want, res;
    logic [W-1:0] st;
    int unsigned n = NMAX, L, ew, ow, ker, T, tmm, exp_cyc, t0, t1;
    int unsigned ex [6] = '{3217, 607, 127, 107, 31, 7};
    nm = 1; phi = 1;
    foreach (ex[i]) begin
      nm  = (nm << ex[i]) - nm;
      phi = (phi << ex[i]) - (phi << 1);
    end
    checks++;
    if (bn_top(nm) != int'(n) - 1) begin failures++; $display("FAIL modulus length"); end
    m = bn_rnd(n - 1);
    e = 65537;
    L = n + P;
    r2 = bn_pow2mod(2 * L, nm);
    want = bn_modexp(m, e, nm);

    repeat (3) @(negedge HCLK);
    HRESETn = 1;
    bus_write(addr(R_CTRL, 0), W'(n));
    bus_write(addr(R_CTRL, 4), 0);
    bus_write(addr(R_CTRL, 3), W'(16'hA5C3));
    load(R_N, nm); load(R_M, m); load(R_E, e); load(R_PHI, phi); load(R_R2, r2);
    bus_write(addr(R_CTRL, 1), 1);
    t0 = $time / 10;
    do begin
      repeat (1000) @(negedge HCLK);
      bus_read(addr(R_CTRL, 2), st);
    end while (!st[1]);
    t1 = $time / 10;
    res = '0;
    for (int i = 0; i < int'(NMAX / W); i++) begin
      bus_read(addr(R_C, i), st);
      res[i*W +: W] = st;
    end
    checks++;
    if (res != want) begin
      failures++;
      $display("FAIL result\n  got %h\n  exp %h", res[NMAX-1:0], want[NMAX-1:0]);
    end
    ew  = (n + P + 2 + W - 1) / W;
    ow  = n / W + 1;
    ker = (n + 2 * P - 1) / P;
    T   = (ew > P + P / W) ? ew : P + P / W;
    tmm = (ker - 1) * T + ((n - 1) % P) + P / W + ow + 4;
    exp_cyc = (n + 18) * (tmm + 1) + (n + 16) + (n + 16 + W - 1) / W + 1;
    checks++;
    if (t1 - t0 < exp_cyc || t1 - t0 > exp_cyc + 1010) begin
      failures++;
      $display("FAIL %0d clocks, expected %0d", t1 - t0, exp_cyc);
    end
    checks++;
    if (dut.u_core.r_r == 0) begin failures++; $display("FAIL blinding factor is zero"); end
    $display("4096-bit RSA: %0d clocks (model %0d, %0d per multiplication), r=%h",
             t1 - t0, exp_cyc, tmm + 1, dut.u_core.r_r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge HCLK);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
