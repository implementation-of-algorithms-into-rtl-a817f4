// while_module: hardware WHILE loop by token flow. START puts a token on
// the test place. There the CONDITION input routes it: if CONDITION is
// true the token leaves and NEXT pulses for one cycle (the loop is over);
// if it is false the token enters the loop body, a chain of NSTEPS enable
// signals EN[0..NSTEPS-1], each high for one clock cycle, and then returns
// to the test place. NSTEPS = 1 is the single "enable process" line;
// larger values are the expansion of the enable signal into a series of
// statements. Following the document's figure, a true condition exits the
// loop, so CONDITION is the exit test. One cycle per test and one per body
// step is this design's timing.
module while_module #(
  parameter int unsigned NSTEPS = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              condition,
  output logic [NSTEPS-1:0] en,
  output logic              next,
  output logic              busy
);
  logic test_tok;

  assign busy = test_tok | (|en);

  always_ff @(posedge clk) begin
    if (rst) begin
      test_tok <= 1'b0;
      en       <= '0;
      next     <= 1'b0;
    end else begin
      next <= 1'b0;
      en   <= en << 1;
      if (start && !busy) test_tok <= 1'b1;
      else if (test_tok) begin
        test_tok <= 1'b0;
        if (condition) next  <= 1'b1;
        else           en[0] <= 1'b1;
      end
      if (en[NSTEPS-1]) test_tok <= 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (rst) $onehot0({test_tok, en}));
endmodule
