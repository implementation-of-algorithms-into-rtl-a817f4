// register_nbit: n-bit storage register with LOAD and RESET.
// On a rising clock edge RESET clears the register (Y := 0), otherwise
// LOAD copies X into it (Y := X); with neither asserted it holds. Because
// it is edge triggered, the old contents stay on Y during the cycle in
// which a new value is loaded, so a register may feed its own input.
// Following the document, RESET is a synchronous operation like LOAD;
// giving RESET priority over LOAD is this design's choice. The optional
// three-state READ enable of the document is left out: on-chip buses here
// are built from multiplexers.
module register_nbit #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         load,
  input  logic         reset,
  input  logic [N-1:0] x,
  output logic [N-1:0] y
);
  always_ff @(posedge clk) begin
    if (reset)     y <= '0;
    else if (load) y <= x;
  end
endmodule
