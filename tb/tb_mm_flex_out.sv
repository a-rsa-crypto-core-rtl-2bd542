// tb_mm_flex_out: checks the flexible output stage.
// With W = 8 and P = 16, for random output PU numbers sel and random
// streams V (words k = 0, 1, ... at consecutive clocks on PU sel, marked as
// last kernel cycle), the result stream must be
//     word m = bits [m*W +: W] of V >> (sel + 1),  m = 0 .. ow-1,
// each word leaving two clocks after stream word m + P/W entered, and no
// other words.  Words of other PUs and words of PU sel outside the last
// kernel cycle are driven with random data and must be ignored.
module tb_mm_flex_out;
  localparam int unsigned W = 8, P = 16, KW = 6, NW = P / W, NWD = 12, BW = NWD * W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 clr = 0;
  logic [$clog2(P)-1:0] sel = '0;
  logic [KW-1:0]        ow = '0;
  logic [P-1:0]         pu_v = '0, pu_last = '0;
  logic [KW-1:0]        pu_k [P];
  logic [W-1:0]         pu_s [P];
  logic                 out_v;
  logic [KW-1:0]        out_idx;
  logic [W-1:0]         out_word;
  mm_flex_out #(.W(W), .P(P), .KW(KW)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int sel_seen [P];
  int in_cyc [NWD];
  logic [BW-1:0] got;
  int n_out, bad_lat;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_v) begin
      got[32'(out_idx) * W +: W] <= out_word;
      n_out <= n_out + 1;
      if (cyc != in_cyc[32'(out_idx) + NW] + 2) bad_lat <= bad_lat + 1;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic drive_noise(int skip);
    for (int j = 0; j < int'(P); j++) begin
      if (j == skip) continue;
      pu_v[j] = $urandom; pu_last[j] = $urandom;
      pu_k[j] = KW'($urandom); pu_s[j] = W'($urandom);
    end
  endtask

  initial begin
    logic [BW-1:0] v, want;
    int unsigned nwd;
    for (int j = 0; j < int'(P); j++) begin pu_k[j] = '0; pu_s[j] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      sel = (t < int'(P)) ? t : $urandom;
      nwd = NW + 2 + $urandom % (NWD - NW - 2);
      ow  = KW'(1 + $urandom % (nwd - NW));
      v = '0;
      for (int i = 0; i < int'(nwd); i++) v[i*W +: W] = W'($urandom);
      clr = 1; @(negedge clk); clr = 0;
      // a stream of PU sel outside the last kernel cycle: ignored
      for (int k = 0; k < int'(nwd); k++) begin
        drive_noise(sel);
        pu_v[sel] = 1; pu_last[sel] = 0; pu_k[sel] = KW'(k); pu_s[sel] = W'($urandom);
        @(negedge clk);
      end
      n_out = 0; bad_lat = 0; got = '0;
      for (int k = 0; k < int'(nwd); k++) begin
        drive_noise(sel);
        pu_v[sel] = 1; pu_last[sel] = 1; pu_k[sel] = KW'(k); pu_s[sel] = v[k*W +: W];
        in_cyc[k] = cyc;
        @(negedge clk);
      end
      pu_v = '0;
      repeat (3) @(negedge clk);
      want = v >> (32'(sel) + 1);
      want &= (BW'(1) << (32'(ow) * W)) - 1;
      check(got == want, $sformatf("result words, sel=%0d ow=%0d", sel, ow));
      check(n_out == int'(ow), "number of words");
      check(bad_lat == 0, "two-clock latency");
      sel_seen[sel]++;
    end
    for (int j = 0; j < int'(P); j++) check(sel_seen[j] > 0, "every PU used as output");
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
