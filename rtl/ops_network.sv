// ops_network: small operational network with a status signal. Two
// W-bit registers A and B are updated on the clock edge according to
// command Z:
//   S0  no operation
//   S1  A = I (external input), B = A
//   S2  A = B, B = A - B
// Both registers take their new values together, from the old contents
// (edge-triggered registers). Independently of Z, the status vector
// X = {X3, X2, X1} reports A > B, A = B and A < B (unsigned); it is
// combinational, so a controller can branch on it in the same cycle.
// The commands and the status table are the document's; reading S1's
// source as the external input I, the unsigned comparison and the reset
// are this design's.
module ops_network #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [1:0]   z,
  input  logic [W-1:0] i,
  output logic [W-1:0] a,
  output logic [W-1:0] b,
  output logic [2:0]   x
);
  localparam logic [1:0] S0 = 2'd0, S1 = 2'd1, S2 = 2'd2;

  always_ff @(posedge clk) begin
    if (rst) begin
      a <= '0;
      b <= '0;
    end else begin
      unique case (z)
        S1: begin a <= i; b <= a;     end
        S2: begin a <= b; b <= a - b; end
        S0:      ;
        default: ;
      endcase
    end
  end

  assign x[0] = a < b;   // X1
  assign x[1] = a == b;  // X2
  assign x[2] = a > b;   // X3
endmodule
