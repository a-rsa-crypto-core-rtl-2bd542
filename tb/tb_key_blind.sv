// tb_key_blind: checks the word-serial exponent blinding E' = E + r * phi.
// Random E, phi (up to 16 words of 32 bits) and 16-bit r are fed word by
// word; every output word, valid one clock after next, is compared with the
// matching word of E + r * phi computed with wide integers.  The words
// beyond the operands carry the top of the sum.  clr between runs must drop
// the carry of the previous run.
module tb_key_blind;
  localparam int unsigned W = 32, RB = 16, NWD = 16;
  localparam int unsigned BW = (NWD + 2) * W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          clr = 0, next = 0;
  logic [RB-1:0] r = '0;
  logic [W-1:0]  e_word = '0, phi_word = '0, out;
  key_blind #(.W(W), .RB(RB)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    logic [BW-1:0] e, phi, want;
    int unsigned nw;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      nw = 1 + $urandom % NWD;
      e = '0; phi = '0;
      for (int i = 0; i < int'(nw); i++) begin
        e[i*W +: W] = $urandom; phi[i*W +: W] = $urandom;
      end
      r = (t % 10 == 0) ? RB'(16'hFFFF) : RB'($urandom);
      if (t % 10 == 0) phi = (BW'(1) << (nw * W)) - 1;  // largest carries
      want = e + BW'(r) * phi;
      // the previous run left a carry behind; clr must remove it
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      for (int i = 0; i < int'(nw) + 1; i++) begin
        e_word = e[i*W +: W]; phi_word = phi[i*W +: W]; next = 1;
        @(negedge clk);
        next = 0;
        checks++;
        if (out != want[i*W +: W]) begin
          failures++;
          $display("FAIL run %0d word %0d: %h expected %h", t, i, out, want[i*W +: W]);
        end
        // idle clocks between words must not change anything
        repeat ($urandom % 3) @(negedge clk);
        checks++;
        if (out != want[i*W +: W]) begin failures++; $display("FAIL hold run %0d", t); end
      end
    end
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
