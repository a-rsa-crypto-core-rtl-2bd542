// tb_mont_mul: self-checking test of the scalable Montgomery multiplier.
// Two configurations run side by side: the default word size and PU count
// (W=32, P=64) with operands up to 512 bits, and W=8, P=16 with operands up
// to 256 bits, where long operands make the partial-sum queue fill up.
// Each result is checked against wide-integer arithmetic and each latency
// against the kernel-cycle formula.  Both the pass-through and the queued
// path of the partial-sum queue must be used.
module tb_mont_mul;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int c0, f0, q0, b0, c1, f1, q1, b1;
  bit d0, d1;
  int checks, failures;

  mm_harness #(.W(32), .P(64), .NMAX(512), .NTEST(16), .SEED(11)) h0 (
    .clk, .rst_n, .checks(c0), .failures(f0), .n_queued(q0), .n_bypass(b0), .finished(d0));
  mm_harness #(.W(8), .P(16), .NMAX(256), .NTEST(24), .SEED(7)) h1 (
    .clk, .rst_n, .checks(c1), .failures(f1), .n_queued(q1), .n_bypass(b1), .finished(d1));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d0 && d1);
    checks = c0 + c1 + 2;
    failures = f0 + f1;
    if (q1 == 0) begin failures++; $display("FAIL queued path never used"); end
    if (b0 + b1 == 0) begin failures++; $display("FAIL pass-through never used"); end
    $display("queued words %0d, passed-through words %0d", q0 + q1, b0 + b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
endmodule
