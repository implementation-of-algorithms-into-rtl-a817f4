// decr_reg_bitslice: decremental register of W bits built from W
// subtractor_bit slices. Each slice subtracts its Y input and the borrow of
// the slice below from its own flip-flop; Y is 1 for slice 0 and 0 for all
// others, so the chain computes Q - 1. On a rising clock edge, L loads D_IN
// and otherwise D (decrement) stores the chain's result; with neither the
// register holds. BO is the borrow out of the top slice, high when Q is
// zero. Giving L priority over D is this design's choice.
module decr_reg_bitslice #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         l,
  input  logic         d,
  input  logic [W-1:0] d_in,
  output logic [W-1:0] q,
  output logic         bo
);
  logic [W-1:0] r;
  logic [W:0]   borrow;

  assign borrow[0] = 1'b0;
  for (genvar k = 0; k < W; k++) begin : g_slice
    subtractor_bit u_bit (
      .x (q[k]),
      .y (k == 0),
      .bi(borrow[k]),
      .r (r[k]),
      .bo(borrow[k+1])
    );
  end

  // Borrow out of the top slice: Q - 1 would underflow (Q is zero).
  assign bo = borrow[W];

  always_ff @(posedge clk) begin
    if (l)      q <= d_in;
    else if (d) q <= r;
  end
endmodule
