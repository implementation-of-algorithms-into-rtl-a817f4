// demux: connects one source to one of NOUT destinations, chosen by S.
// The selected output carries IN; all other outputs are held at zero.
// Combinational.
module demux #(
  parameter int unsigned NOUT = 4,
  parameter int unsigned W    = 8,
  localparam int unsigned SW  = (NOUT > 1) ? $clog2(NOUT) : 1
) (
  input  logic [W-1:0]           in,
  input  logic [SW-1:0]          s,
  output logic [NOUT-1:0][W-1:0] out
);
  always_comb begin
    for (int i = 0; i < NOUT; i++)
      out[i] = (s == SW'(i)) ? in : '0;
  end
endmodule
