// tb_mm_pu: checks single processing units against wide-integer arithmetic.
// Two PUs with W = 8 are tested: J = 3 (odd bit in word 0) and J = 13 (odd
// bit in word 1).  For random S, Y, odd N and x the words of S, Y*2^J and
// N*2^J are streamed in, one per clock; the output stream must equal
//     A = S + x*Y*2^J,  odd = bit J of A,  S' = A + odd*N*2^J
// (with XOR instead of + in GF(2^n) mode), bit J of S' must be zero, and
// the forwarded operands must be Y*2^(J+1) and N*2^(J+1).  Each word leaves
// exactly one clock after it enters.  x is only sampled at word 0: the
// testbench changes x_par afterwards.  kill must drop the word in flight.
module tb_mm_pu;
  localparam int unsigned W = 8, KW = 5, NWD = 10, BW = NWD * W;
  localparam int unsigned JS [2] = '{3, 13};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          field = 0, kill = 0, x_par = 0, v_in = 0, last_in = 0;
  logic [KW-1:0] k_in = '0;
  logic [W-1:0]  s_in = '0, y_in [2], n_in [2];
  logic          v_out [2], last_out [2];
  logic [KW-1:0] k_out [2];
  logic [W-1:0]  s_out [2], y_out [2], n_out [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    mm_pu #(.W(W), .J(JS[g]), .KW(KW)) dut (
      .clk, .rst_n, .field, .kill, .x_par, .v_in, .last_in, .k_in, .s_in,
      .y_in(y_in[g]), .n_in(n_in[g]), .v_out(v_out[g]), .last_out(last_out[g]),
      .k_out(k_out[g]), .s_out(s_out[g]), .y_out(y_out[g]), .n_out(n_out[g])
    );
  end

  int checks = 0, failures = 0, n_odd = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [BW-1:0] s, y, nm, a, b, got_s [2], got_y [2], got_n [2], ys [2], ns [2];
    bit x, gf2, odd;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      gf2 = (t % 4 == 3);
      s = {$urandom, $urandom} & ((BW'(1) << 60) - 1);
      y = {$urandom, $urandom} & ((BW'(1) << 60) - 1);
      nm = {$urandom, $urandom} & ((BW'(1) << 60) - 1) | 1;
      x = $urandom;
      field = gf2;
      for (int g = 0; g < 2; g++) begin ys[g] = y << JS[g]; ns[g] = nm << JS[g]; end
      for (int k = 0; k < int'(NWD); k++) begin
        v_in = 1; k_in = KW'(k); last_in = (t % 2 == 1);
        x_par = (k == 0) ? x : ~x;
        s_in = s[k*W +: W];
        for (int g = 0; g < 2; g++) begin y_in[g] = ys[g][k*W +: W]; n_in[g] = ns[g][k*W +: W]; end
        @(negedge clk);
        for (int g = 0; g < 2; g++) begin
          check(v_out[g] && k_out[g] == KW'(k) && last_out[g] == last_in, "one-clock delay of the word");
          got_s[g][k*W +: W] = s_out[g];
          got_y[g][k*W +: W] = y_out[g];
          got_n[g][k*W +: W] = n_out[g];
        end
      end
      v_in = 0;
      for (int g = 0; g < 2; g++) begin
        a   = gf2 ? (s ^ (x ? ys[g] : '0)) : (s + (x ? ys[g] : '0));
        odd = a[JS[g]];
        b   = gf2 ? (a ^ (odd ? ns[g] : '0)) : (a + (odd ? ns[g] : '0));
        n_odd += int'(odd);
        check(got_s[g] == b, $sformatf("sum J=%0d t=%0d", JS[g], t));
        check(got_s[g][JS[g]] == 1'b0, "bit J cleared");
        check(got_y[g] == (y << (JS[g] + 1)) && got_n[g] == (nm << (JS[g] + 1)), "operand shift");
      end
      @(negedge clk);
      for (int g = 0; g < 2; g++) check(!v_out[g], "valid drops after the stream");
    end
    // kill drops the word in flight
    v_in = 1; kill = 1; k_in = '0; @(negedge clk); v_in = 0; kill = 0;
    check(!v_out[0] && !v_out[1], "kill");
    check(n_odd > 100 && n_odd < 700, "odd taken both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
