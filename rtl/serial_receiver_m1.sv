// serial_receiver_m1: the same serial package receiver as serial_receiver
// (packages of 5, 6, 7 or 8 bits, LSB first, delivered as an 8-bit word
// with zeros above the package), built the other way: the algorithm is
// compiled into a flat sequence of register transfers and branches, and
// one eight-state Moore controller runs it on a small data unit.
// The program, one step per state:
//   0  reset state
//   1  size = input                      (only after reset)
//   2  i = size
//   3  shift(reg); reg[7] = data; i--
//   4  if (i == 0) continue else -> 3
//   5  i = 8 - size
//   6  shift(reg); reg[7] = 0; i--
//   7  if (i == 0) -> 2 (next package) else -> 6
// Data unit: a 4-bit size register, a subtractor forming 8 - size, the
// counter i (a bit-slice decremental register loaded from size or from the
// subtractor), one comparator i == 0 whose output C is the controller's
// only status input, and the 8-bit shift register.
// The state register uses the document's state assignment Y2..Y0:
// 0=000 1=001 2=011 3=010 4=100 5=101 6=111 7=110. The program and the
// next-state table are the document's.
// Interface and timing: DATA_TAKE is high in the cycle in which DATA is
// sampled (state 3), one bit every two cycles. PKT_VALID is high for one
// cycle (state 7 with C) while PKT holds the finished package. A package
// takes 18 cycles for sizes 5..7 and 20 for size 8 (2 + 2*8, plus the
// guarded pass through states 6 and 7 described below). SIZE must be 5..8.
// This design's own choices: the shift and decrement of states 3 and 6 are
// gated by C = 0 (i > 0), so that a loop with zero iterations (size 8
// leaves 8 - size = 0 zeros to fill) does nothing, as the for loop of the
// algorithm requires, instead of wrapping i; the controller's output
// decoding, DATA_TAKE and PKT_VALID are also this design's.
module serial_receiver_m1 (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] size_in,
  input  logic       data,
  output logic       data_take,
  output logic [7:0] pkt,
  output logic       pkt_valid,
  output logic [2:0] state_no,
  output logic [3:0] loop_i
);
  typedef enum logic [2:0] {
    M0 = 3'b000, M1 = 3'b001, M2 = 3'b011, M3 = 3'b010,
    M4 = 3'b100, M5 = 3'b101, M6 = 3'b111, M7 = 3'b110
  } m1_state_e;
  m1_state_e state;

  logic [3:0] size_q, rest, i_in, i_q;
  logic       c, shift, i_load, i_bo, i_zero;

  register_nbit #(.N(4)) u_size (
    .clk  (clk),
    .load (state == M1),
    .reset(rst),
    .x    (size_in),
    .y    (size_q)
  );

  assign rest   = 4'd8 - size_q;                       // ALU1: 8 - size
  assign i_load = (state == M2) || (state == M5);
  assign i_in   = (state == M5) ? rest : size_q;

  decr_reg_bitslice #(.W(4)) u_i (
    .clk (clk),
    .l   (i_load),
    .d   (shift),
    .d_in(i_in),
    .q   (i_q),
    .bo  (i_bo)
  );

  comparator #(.W(4)) u_cmp (                          // C = (i == 0)
    .x   (i_q),
    .y   (4'd0),
    .s   (1'b1),
    .c   (c),
    .zero(i_zero)
  );

  assign shift = ((state == M3) || (state == M6)) && !c;

  always_ff @(posedge clk) begin
    if (rst)        pkt <= '0;
    else if (shift) pkt <= {(state == M3) ? data : 1'b0, pkt[7:1]};
  end

  // Controller: next-state table of the method-1 implementation
  always_ff @(posedge clk) begin
    if (rst) state <= M0;
    else begin
      unique case (state)
        M0: state <= M1;
        M1: state <= M2;
        M2: state <= M3;
        M3: state <= M4;
        M4: state <= c ? M5 : M3;
        M5: state <= M6;
        M6: state <= M7;
        M7: state <= c ? M2 : M6;
        default: state <= M0;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      M0: state_no = 3'd0;
      M1: state_no = 3'd1;
      M2: state_no = 3'd2;
      M3: state_no = 3'd3;
      M4: state_no = 3'd4;
      M5: state_no = 3'd5;
      M6: state_no = 3'd6;
      M7: state_no = 3'd7;
      default: state_no = 3'd0;
    endcase
  end

  assign data_take = (state == M3) && !c;
  assign pkt_valid = (state == M7) && c;
  assign loop_i    = i_q;

  // The counter's top borrow and the comparator's zero output both mark
  // i == 0 as well; they must agree with C.
  assert property (@(posedge clk) disable iff (rst) (c == i_zero) && (c == i_bo));
  assert property (@(posedge clk) disable iff (rst)
                   (state == M2) |-> (size_q >= 4'd5 && size_q <= 4'd8));
endmodule
