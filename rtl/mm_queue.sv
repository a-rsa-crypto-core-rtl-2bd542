// mm_queue: partial-sum queue between the last PU and the first PU.
//
// When the operand has many words, the last PU finishes the first useful
// word of a kernel cycle before the first PU has consumed all the words of
// the current one.  Those words of S wait here until the first PU starts its
// next kernel cycle.  When the first PU is already waiting (few words), the
// incoming word is handed straight through in the same cycle, so no queue
// latency is added.  That is the case in which the document says no queue is
// needed.
//
// Interface: push_v/push_d write a word at the clock edge, unless the queue
// is empty and pop is high in the same cycle (pass-through).  out_d/avail
// show the oldest word, or the incoming one when empty.  pop removes the
// word shown.  clr empties the queue.  Storage is a circular buffer of DEPTH
// words.  The document draws it as a shift-register queue with a tap
// multiplexer; the circular buffer and the pass-through path are choices of
// this implementation with the same ordering behaviour.
module mm_queue #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 66
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         push_v,
  input  logic [W-1:0] push_d,
  input  logic         pop,
  output logic [W-1:0] out_d,
  output logic         avail,
  output logic         bypass      // this cycle's pop was served by push_d
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;
  logic          empty, do_store, do_pop;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    empty    = (count == '0);
    avail    = !empty || push_v;
    out_d    = empty ? push_d : mem[rd_ptr];
    bypass   = empty && push_v && pop;
    do_store = push_v && !bypass;
    do_pop   = pop && !empty;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (clr) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_store) wr_ptr <= inc(wr_ptr);
      if (do_pop)   rd_ptr <= inc(rd_ptr);
      count <= count + (AW+1)'(do_store) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_store) mem[wr_ptr] <= push_d;
  end

  // The sequence controller never reads an empty queue nor overfills it.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> avail);
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                   (do_store && !do_pop) |-> (count < (AW+1)'(DEPTH)));

endmodule
