// mux: connects one of NIN sources to its output, chosen by select S.
// Purely combinational; a select beyond the last input yields zero.
module mux #(
  parameter int unsigned NIN = 4,
  parameter int unsigned W   = 8,
  localparam int unsigned SW = (NIN > 1) ? $clog2(NIN) : 1
) (
  input  logic [NIN-1:0][W-1:0] in,
  input  logic [SW-1:0]         s,
  output logic [W-1:0]          out
);
  always_comb begin
    out = '0;
    for (int i = 0; i < NIN; i++)
      if (s == SW'(i)) out = in[i];
  end
endmodule
