// ram: 2^K words of N bits, one address port A with READ and WRITE.
// WRITE stores DIN at address A on the rising clock edge. READ puts the
// addressed word on DOUT combinationally; without READ, DOUT is zero (the
// document's three-state output is replaced by a forced zero). K and N
// have no values in the document; the defaults suit the video RAM of the
// video controller (2048 words of 6-bit character codes).
module ram #(
  parameter int unsigned K = 11,
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic [K-1:0] a,
  input  logic         read,
  input  logic         write,
  input  logic [N-1:0] din,
  output logic [N-1:0] dout
);
  logic [N-1:0] mem [2**K];

  always_ff @(posedge clk) begin
    if (write) mem[a] <= din;
  end

  assign dout = read ? mem[a] : '0;
endmodule
