// tb_bal_reg: checks the power-balanced operand register against a model
// that keeps the logical register contents.
// Random updates of random length in index mode and shift mode, with and
// without recirculation, with idle clocks between writes and direct loads
// between updates.  Before every write the word read ports and the slice
// port read random logical indexes (also beyond the register, which must
// read zero).  A word already rewritten must read its new value, any other
// word its old value.  After the update the first len words hold the new
// data (the old data when recirculating) and the rest is unchanged.
module tb_bal_reg;
  localparam int unsigned W = 8, RW = 12, P = 16, KW = 5, NRD = 2, NS = P / W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          ld_en = 0, arm = 0, mode_in = 0, wr_en = 0, recirc = 0;
  logic [KW-1:0] ld_idx = '0, len_in = '0, xs_widx = '0;
  logic [W-1:0]  ld_data = '0, wr_data = '0;
  logic [KW-1:0] rd_idx [NRD];
  logic [W-1:0]  rd_data [NRD];
  logic [P-1:0]  xs_data;
  bal_reg #(.W(W), .RW(RW), .P(P), .KW(KW), .NRD(NRD)) dut (.*);

  int checks = 0, failures = 0;
  int n_mode [2][2];                 // [shift][recirc]
  logic [W-1:0] cur [RW];

  function automatic logic [W-1:0] model_rd(int i, logic [W-1:0] nw [RW], int s);
    if (i >= int'(RW)) return '0;
    return (i < s) ? nw[i] : cur[i];
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic probe(logic [W-1:0] nw [RW], int s);
    logic [P-1:0] want_xs;
    for (int r = 0; r < int'(NRD); r++) rd_idx[r] = KW'($urandom % (RW + 3));
    xs_widx = KW'($urandom % (RW + 2));
    #1;
    for (int r = 0; r < int'(NRD); r++)
      check(rd_data[r] == model_rd(int'(rd_idx[r]), nw, s), $sformatf("read port %0d index %0d", r, rd_idx[r]));
    for (int k = 0; k < int'(NS); k++) want_xs[k*W +: W] = model_rd(int'(xs_widx) + k, nw, s);
    check(xs_data == want_xs, "slice port");
  endtask

  initial begin
    logic [W-1:0] nw [RW];
    int len;
    bit md, rc;
    for (int r = 0; r < int'(NRD); r++) rd_idx[r] = '0;
    for (int i = 0; i < int'(RW); i++) cur[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      // a few direct loads
      repeat ($urandom % 4) begin
        ld_en = 1; ld_idx = KW'($urandom % (RW + 2)); ld_data = W'($urandom);
        if (int'(ld_idx) < int'(RW)) cur[ld_idx] = ld_data;
        @(negedge clk);
        ld_en = 0;
      end
      md = $urandom; rc = ($urandom % 3 == 0);
      len = 1 + $urandom % RW;
      for (int i = 0; i < int'(RW); i++) nw[i] = (i < len && !rc) ? W'($urandom) : cur[i];
      arm = 1; mode_in = md; len_in = KW'(len);
      @(negedge clk);
      arm = 0;
      for (int s = 0; s < len; s++) begin
        probe(nw, s);
        wr_en = 1; recirc = rc; wr_data = rc ? W'($urandom) : nw[s];
        @(negedge clk);
        wr_en = 0; recirc = 0;
        repeat ($urandom % 2) @(negedge clk);
      end
      for (int i = 0; i < int'(RW); i++) cur[i] = nw[i];
      probe(nw, 0);
      n_mode[md][rc]++;
    end
    for (int m = 0; m < 2; m++)
      for (int r = 0; r < 2; r++) check(n_mode[m][r] > 0, $sformatf("mode %0d recirc %0d seen", m, r));
    $display("index %0d/%0d, shift %0d/%0d (update/recirculate)", n_mode[0][0], n_mode[0][1], n_mode[1][0], n_mode[1][1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
