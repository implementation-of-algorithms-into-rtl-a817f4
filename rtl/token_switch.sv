// token_switch: token-flow switching for if-then-else and CASE. A control
// token arriving on TOKEN_IN is routed, on the next clock edge, to exactly
// one of N statement-enable outputs, chosen by SEL. With N = 2 and
// SEL = ~condition this is "if condition then statement 1 else
// statement 2" (output 0 is the true branch); with N > 2 it is a CASE on
// SEL. Each output holds its token until the enabled statement returns ACK,
// after which the switch is free for the next token. The routing is the
// document's token-flow scheme; the one-cycle registered output and the ACK
// return are this design's choice.
module token_switch #(
  parameter int unsigned N  = 2,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          token_in,
  input  logic [SW-1:0] sel,
  input  logic          ack,
  output logic [N-1:0]  en,
  output logic          busy
);
  logic [N-1:0][0:0] routed;

  demux #(.NOUT(N), .W(1)) u_demux (
    .in (token_in & ~busy),
    .s  (sel),
    .out(routed)
  );

  assign busy = |en;

  always_ff @(posedge clk) begin
    if (rst) en <= '0;
    else if (busy) begin
      if (ack) en <= '0;
    end else begin
      for (int k = 0; k < N; k++) en[k] <= routed[k][0];
    end
  end

  assert property (@(posedge clk) disable iff (rst) $onehot0(en));
endmodule
