// decr_reg_moore: decremental register written as a Moore machine. The
// state is the register value and is also the output. The next state is
// D_IN when L is high, state - 1 when D is high, else the same state. L has
// priority over D (this design's choice). The word-level form is the
// counterpart of decr_reg_bitslice, which builds the same function from
// one-bit subtractor slices.
module decr_reg_moore #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         l,
  input  logic         d,
  input  logic [W-1:0] d_in,
  output logic [W-1:0] q
);
  logic [W-1:0] state, next_state;

  always_comb begin
    unique casez ({l, d})
      2'b1?:   next_state = d_in;
      2'b01:   next_state = state - W'(1);
      default: next_state = state;
    endcase
  end

  always_ff @(posedge clk) state <= next_state;

  assign q = state;
endmodule
