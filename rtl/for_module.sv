// for_module: hardware FOR loop, "for i = init downto end do process".
// The counter i (a bit-slice decremental register) and the end-condition
// register are preloaded together by LOAD. While START ("enable for") is
// high the module alternates between two steps, kept in one flip-flop:
//   step 1: compare i with end. If they differ, ENABLE ("enable process")
//           goes high and stays high until the process answers with NEXT;
//           NEXT toggles the flip-flop to step 2.
//   step 2: decrement i, toggle back to step 1.
// When i equals end in step 1, ENABLE stays low and DONE goes high.
// A process that answers NEXT in the same cycle as ENABLE gives one
// iteration every two clock cycles. The structure (counter, end register,
// comparator, toggling step flip-flop, enable/next/done) is the document's;
// the exact gating and the synchronous reset of the step flip-flop are this
// design's own.
module for_module #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] init,
  input  logic [W-1:0] end_val,
  input  logic         start,
  input  logic         next,
  output logic [W-1:0] i,
  output logic         enable,
  output logic         done
);
  logic [W-1:0] cond;
  logic         step;   // 0: step 1 (compare), 1: step 2 (decrement)
  logic         equal;
  logic         unused_zero, unused_bo;

  decr_reg_bitslice #(.W(W)) u_count (
    .clk (clk),
    .l   (load),
    .d   (step & ~load),
    .d_in(init),
    .q   (i),
    .bo  (unused_bo)
  );

  register_nbit #(.N(W)) u_cond (
    .clk  (clk),
    .load (load),
    .reset(1'b0),
    .x    (end_val),
    .y    (cond)
  );

  comparator #(.W(W)) u_comp (
    .x   (i),
    .y   (cond),
    .s   (1'b1),
    .c   (equal),
    .zero(unused_zero)
  );

  assign enable = start & ~step & ~equal;
  assign done   = start & ~step &  equal;

  always_ff @(posedge clk) begin
    if (rst || load)        step <= 1'b0;
    else if (step)          step <= 1'b0;
    else if (enable & next) step <= 1'b1;
  end

  // A loop may only be reloaded between runs, never while a step-2
  // decrement is pending.
  assert property (@(posedge clk) disable iff (rst) load |-> !step);
endmodule
