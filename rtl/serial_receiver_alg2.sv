// serial_receiver_alg2: serial package receiver (packages of 5, 6, 7 or 8
// bits, LSB first, delivered as an 8-bit word with zeros above the
// package) built from a second algorithm: instead of a data loop followed
// by a zero-fill loop, every package takes exactly eight shift steps, and
// the size decides where in the register the new bit enters. Each step:
//   reg[0..3] move down one place (reg[k] = reg[k+1]);
//   reg[size-1] = data; the bits below it move down one place, the bits
//   above it move down one place with 0 entering reg[7].
// After eight steps the last SIZE samples of DATA are in reg[size-1:0]
// (the earliest in reg[0]) and reg[7:size] is zero; the first 8 - SIZE
// samples fall out of the bottom of the register.
// A four-state Moore controller runs the program
//   0  (idle for one cycle)
//   1  size = input; i = 8                       (control S0)
//   2  shift step for the selected size; i--    (S1 and one of S31..S34)
//   3  if (i == 0) -> 0 else -> 2                (S7)
// S1 moves reg[0..3]; S34, S33, S32, S31 move reg[4..7] for size 5, 6, 7, 8.
// Data unit: a 4-bit size register, the counter i (bit-slice decremental
// register loaded with 8), a comparator i == 0 giving the status C, and the
// 8-bit register with one multiplexer per bit.
// Interface and timing: SIZE is read in state 1 of every package, so it may
// change from one package to the next. DATA is sampled in the cycles marked
// by DATA_TAKE (state 2), one sample every two cycles, eight per package;
// the package must occupy the last SIZE of them. PKT_VALID is high for one
// cycle (state 3 with C) while PKT holds the package. A package takes 18
// cycles. The program, the state table and the control names are the
// document's; the sampling convention, DATA_TAKE and PKT_VALID are this
// design's.
module serial_receiver_alg2 (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] size_in,
  input  logic       data,
  output logic       data_take,
  output logic [7:0] pkt,
  output logic       pkt_valid,
  output logic [1:0] state_no,
  output logic [3:0] loop_i
);
  typedef enum logic [1:0] {A0, A1, A2, A3} a2_state_e;
  a2_state_e state;

  logic [3:0] size_q, i_q;
  logic       c, i_bo, i_zero;
  logic       s0, s1, s31, s32, s33, s34, s7;

  // Control outputs, decoded from the present state (and the stored size)
  assign s0  = (state == A1);
  assign s1  = (state == A2);
  assign s34 = s1 && (size_q == 4'd5);
  assign s33 = s1 && (size_q == 4'd6);
  assign s32 = s1 && (size_q == 4'd7);
  assign s31 = s1 && (size_q == 4'd8);
  assign s7  = (state == A3);

  register_nbit #(.N(4)) u_size (
    .clk  (clk),
    .load (s0),
    .reset(rst),
    .x    (size_in),
    .y    (size_q)
  );

  decr_reg_bitslice #(.W(4)) u_i (
    .clk (clk),
    .l   (s0),
    .d   (s1),
    .d_in(4'd8),
    .q   (i_q),
    .bo  (i_bo)
  );

  comparator #(.W(4)) u_cmp (
    .x   (i_q),
    .y   (4'd0),
    .s   (1'b1),
    .c   (c),
    .zero(i_zero)
  );

  // Shift register: one multiplexer per bit, selected by S1 and S31..S34
  logic [7:0] reg_d;
  always_comb begin
    reg_d = pkt;
    if (s1) reg_d[3:0] = pkt[4:1];
    if (s34) reg_d[7:4] = {1'b0, pkt[7], pkt[6], data};
    if (s33) reg_d[7:4] = {1'b0, pkt[7], data, pkt[5]};
    if (s32) reg_d[7:4] = {1'b0, data, pkt[6], pkt[5]};
    if (s31) reg_d[7:4] = {data, pkt[7], pkt[6], pkt[5]};
  end

  always_ff @(posedge clk) begin
    if (rst) pkt <= '0;
    else     pkt <= reg_d;
  end

  // Controller: state table of the Algorithm 2 implementation
  always_ff @(posedge clk) begin
    if (rst) state <= A0;
    else begin
      unique case (state)
        A0: state <= A1;
        A1: state <= A2;
        A2: state <= A3;
        A3: state <= c ? A0 : A2;
        default: state <= A0;
      endcase
    end
  end

  assign data_take = s1;
  assign pkt_valid = s7 && c;
  assign state_no  = state;
  assign loop_i    = i_q;

  // The counter's top borrow and the comparator's zero output mark i == 0
  // as well; they must agree with C.
  assert property (@(posedge clk) disable iff (rst) (c == i_bo) && (c == i_zero));
  assert property (@(posedge clk) disable iff (rst)
                   s1 |-> (size_q >= 4'd5 && size_q <= 4'd8));
endmodule
