// tb_mm_queue: checks the carry-over queue against a reference FIFO.
// Random pushes and pops (never a pop with nothing to give, never a push
// into a full queue, as the multiplier guarantees) with three phases of
// different push/pop balance, so that the queue runs empty (pass-through),
// partly full and completely full.  Each popped word must be the oldest one
// pushed; bypass must be high exactly when the queue was empty and the
// word came straight from the push port.  clr must empty the queue.
module tb_mm_queue;
  localparam int unsigned W = 16, DEPTH = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         clr = 0, push_v = 0, pop = 0;
  logic [W-1:0] push_d = '0, out_d;
  logic         avail, bypass;
  mm_queue #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_bypass = 0, n_full = 0, n_stored = 0;
  logic [W-1:0] model [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int pp, pq;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 3; ph++) begin
      pp = (ph == 0) ? 40 : (ph == 1) ? 80 : 60;   // push probability, %
      pq = (ph == 0) ? 80 : (ph == 1) ? 40 : 60;   // pop probability, %
      for (int c = 0; c < 3000; c++) begin
        push_v = ($urandom % 100) < pp;
        push_d = W'($urandom);
        pop    = (($urandom % 100) < pq) && (model.size() > 0 || push_v);
        if (push_v && !pop && model.size() == DEPTH) push_v = 0;
        #1;
        check(avail == (model.size() > 0 || push_v), "avail");
        if (pop) begin
          if (model.size() == 0) begin
            check(out_d == push_d && bypass, "pass-through word");
            n_bypass++;
          end else begin
            check(out_d == model[0] && !bypass, "queued word");
            void'(model.pop_front());
            n_stored++;
            if (push_v) model.push_back(push_d);
          end
        end else begin
          check(!bypass, "no bypass without pop");
          if (push_v) model.push_back(push_d);
        end
        if (model.size() == DEPTH) n_full++;
        @(negedge clk);
      end
    end
    push_v = 1; push_d = 16'h1234; @(negedge clk); push_v = 0;
    clr = 1; @(negedge clk); clr = 0; model.delete();
    #1 check(!avail, "clr empties the queue");
    check(n_bypass > 0 && n_full > 0 && n_stored > 0, "empty, stored and full cases all seen");
    $display("pass-through %0d, from storage %0d, full %0d", n_bypass, n_stored, n_full);
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
