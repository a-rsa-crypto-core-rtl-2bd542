// tb_prng16: checks the 16-bit random number generator.
//   - reset value 1, a zero seed is replaced by 1, other seeds load as given;
//   - the state holds while step is low;
//   - each step follows the recurrence q' = {q[14:0], parity(q & B400h)}
//     (taps 16, 14, 13, 11 of x^16 + x^14 + x^13 + x^11 + 1);
//   - the sequence is maximal: from any seed it returns after exactly
//     65535 steps and visits every nonzero state once on the way.
module tb_prng16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        seed_ld = 0, step = 0;
  logic [15:0] seed = '0, q;
  prng16 dut (.*);

  int checks = 0, failures = 0;
  bit seen [65536];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (q=%h)", what, q); end
  endtask

  initial begin
    logic [15:0] ref_q, first;
    int unsigned period, distinct;
    repeat (2) @(negedge clk);
    check(q == 16'h0001, "reset value");
    rst_n = 1;
    @(negedge clk);
    check(q == 16'h0001, "hold after reset");
    seed_ld = 1; seed = 16'h0000; @(negedge clk); seed_ld = 0;
    check(q == 16'h0001, "zero seed maps to 1");
    seed_ld = 1; seed = 16'hACE1; @(negedge clk); seed_ld = 0;
    check(q == 16'hACE1, "seed load");
    repeat (5) @(negedge clk);
    check(q == 16'hACE1, "hold without step");
    // recurrence on random states
    for (int t = 0; t < 200; t++) begin
      seed_ld = 1; seed = 16'($urandom) | 16'h0001; @(negedge clk); seed_ld = 0;
      ref_q = q;
      step = 1;
      repeat (1 + $urandom % 20) begin
        @(negedge clk);
        ref_q = {ref_q[14:0], ^(ref_q & 16'hB400)};
      end
      step = 0;
      check(q == ref_q, "recurrence");
    end
    // full period
    seed_ld = 1; seed = 16'h5A5A; @(negedge clk); seed_ld = 0;
    first = q; period = 0; distinct = 0;
    step = 1;
    do begin
      if (!seen[q]) distinct++;
      seen[q] = 1;
      @(negedge clk);
      period++;
    end while (q != first && period < 70000);
    step = 0;
    check(period == 65535, "period 65535");
    check(distinct == 65535 && !seen[0], "all nonzero states visited");
    $display("period %0d, distinct states %0d", period, distinct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
