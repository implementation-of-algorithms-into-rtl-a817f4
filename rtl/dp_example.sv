// dp_example: data processing unit obtained by register, operator and
// interconnection allocation for the looping code sequence
//   1. R3 = R1 + R2 ;   R12 = R1
//   2. R5 = R3 - R4 ;   R2  = R3 * R6
//   3. R3 = R3 + R5 ;   R2  = R1 + R2 ;  R5 = R10 / R5
//   4. R1 = R3 AND R5 ; R2  = R12 OR R2
// (fifteen variables folded into eight registers, a fifth statement line
// removed). Operators are grouped into three ALUs: ALU1 (+, *, OR),
// ALU2 (-, +, AND) and ALU3 (/). Interconnections are grouped into four
// shared buses, each a multiplexer:
//   MUX1: ALU1.Out or ALU2.Out  -> R1, R3, R5
//   MUX2: R1, R3 or R12         -> ALU1.In1, R12
//   MUX3: R4 or R5              -> ALU2.In2, ALU3.In2
//   MUX4: R2 or R6              -> ALU1.In2
// plus the dedicated links R3 -> ALU2.In1, R10 -> ALU3.In1,
// ALU1.Out -> R2 and ALU3.Out -> R5 (R5 picks MUX1 or ALU3).
// A four-state Moore controller issues one control word per line, one
// line per clock cycle, and starts again at line 1 after line 4.
// Interface: INIT loads the registers that are live on entry (R1, R2, R4,
// R6, R10) from the INIT_* inputs and clears the others. While RUN is high
// the unit executes one line per cycle; ITER_DONE pulses in the cycle in
// which line 4 is executed, so the new R1 and R2 are visible one cycle
// later. REGS shows all eight registers. Values are W-bit unsigned;
// subtraction wraps; division by zero gives all ones.
// The allocation (registers, ALUs, buses) is the document's; ALU3's result
// goes to R5 as the code sequence says, where the interconnection list
// names R10. The word width, the op-code encoding, INIT/RUN and the
// divide-by-zero result are this design's.
module dp_example #(
  parameter int unsigned W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             init,
  input  logic             run,
  input  logic [W-1:0]     init_r1,
  input  logic [W-1:0]     init_r2,
  input  logic [W-1:0]     init_r4,
  input  logic [W-1:0]     init_r6,
  input  logic [W-1:0]     init_r10,
  output logic [7:0][W-1:0] regs,      // {R12, R10, R6, R5, R4, R3, R2, R1}
  output logic [1:0]       line,       // current line - 1
  output logic             iter_done
);
  typedef enum logic [1:0] {ALU1_ADD, ALU1_MUL, ALU1_OR} alu1_op_e;
  typedef enum logic [1:0] {ALU2_SUB, ALU2_ADD, ALU2_AND} alu2_op_e;

  typedef struct packed {
    alu1_op_e   alu1;
    alu2_op_e   alu2;
    logic       mux1;    // 0 ALU1.Out, 1 ALU2.Out
    logic [1:0] mux2;    // 0 R1, 1 R3, 2 R12
    logic       mux3;    // 0 R4, 1 R5
    logic       mux4;    // 0 R2, 1 R6
    logic       r5_alu3; // R5 input: 0 MUX1 bus, 1 ALU3.Out
    logic [4:0] load;    // {R12, R5, R3, R2, R1}
  } dp_ctrl_t;

  function automatic dp_ctrl_t ctrl_word(input logic [1:0] l);
    unique case (l)
      // R3 = R1 + R2 ; R12 = R1
      2'd0: ctrl_word = '{alu1: ALU1_ADD, alu2: ALU2_SUB, mux1: 1'b0, mux2: 2'd0,
                          mux3: 1'b0, mux4: 1'b0, r5_alu3: 1'b0, load: 5'b10100};
      // R5 = R3 - R4 ; R2 = R3 * R6
      2'd1: ctrl_word = '{alu1: ALU1_MUL, alu2: ALU2_SUB, mux1: 1'b1, mux2: 2'd1,
                          mux3: 1'b0, mux4: 1'b1, r5_alu3: 1'b0, load: 5'b01010};
      // R3 = R3 + R5 ; R2 = R1 + R2 ; R5 = R10 / R5
      2'd2: ctrl_word = '{alu1: ALU1_ADD, alu2: ALU2_ADD, mux1: 1'b1, mux2: 2'd0,
                          mux3: 1'b1, mux4: 1'b0, r5_alu3: 1'b1, load: 5'b01110};
      // R1 = R3 AND R5 ; R2 = R12 OR R2
      default: ctrl_word = '{alu1: ALU1_OR, alu2: ALU2_AND, mux1: 1'b1, mux2: 2'd2,
                          mux3: 1'b1, mux4: 1'b0, r5_alu3: 1'b0, load: 5'b00011};
    endcase
  endfunction

  logic [W-1:0] r1, r2, r3, r4, r5, r6, r10, r12;
  logic [W-1:0] bus1, bus2, bus3, bus4;
  logic [W-1:0] alu1_out, alu2_out, alu3_out, r5_in;
  logic [1:0]   state;
  dp_ctrl_t     cw;
  logic [4:0]   ld;

  assign cw = ctrl_word(state);
  assign ld = run ? cw.load : 5'b0;

  // Interconnection buses
  mux #(.NIN(2), .W(W)) u_mux1 (.in({alu2_out, alu1_out}), .s(cw.mux1), .out(bus1));
  mux #(.NIN(3), .W(W)) u_mux2 (.in({r12, r3, r1}),        .s(cw.mux2), .out(bus2));
  mux #(.NIN(2), .W(W)) u_mux3 (.in({r5, r4}),             .s(cw.mux3), .out(bus3));
  mux #(.NIN(2), .W(W)) u_mux4 (.in({r6, r2}),             .s(cw.mux4), .out(bus4));

  // ALU1 (+, *, OR): In1 = MUX2, In2 = MUX4
  always_comb begin
    unique case (cw.alu1)
      ALU1_MUL: alu1_out = W'(bus2 * bus4);
      ALU1_OR:  alu1_out = bus2 | bus4;
      default:  alu1_out = bus2 + bus4;
    endcase
  end

  // ALU2 (-, +, AND): In1 = R3, In2 = MUX3
  always_comb begin
    unique case (cw.alu2)
      ALU2_ADD: alu2_out = r3 + bus3;
      ALU2_AND: alu2_out = r3 & bus3;
      default:  alu2_out = r3 - bus3;
    endcase
  end

  // ALU3 (/): In1 = R10, In2 = MUX3
  assign alu3_out = (bus3 == '0) ? '1 : r10 / bus3;

  assign r5_in = cw.r5_alu3 ? alu3_out : bus1;

  // Registers. R4, R6 and R10 are only read by the loop.
  register_nbit #(.N(W)) u_r1  (.clk(clk), .load(ld[0] | init), .reset(rst),
                                .x(init ? init_r1 : bus1), .y(r1));
  register_nbit #(.N(W)) u_r2  (.clk(clk), .load(ld[1] | init), .reset(rst),
                                .x(init ? init_r2 : alu1_out), .y(r2));
  register_nbit #(.N(W)) u_r3  (.clk(clk), .load(ld[2] & ~init), .reset(rst | init),
                                .x(bus1), .y(r3));
  register_nbit #(.N(W)) u_r4  (.clk(clk), .load(init), .reset(rst),
                                .x(init_r4), .y(r4));
  register_nbit #(.N(W)) u_r5  (.clk(clk), .load(ld[3] & ~init), .reset(rst | init),
                                .x(r5_in), .y(r5));
  register_nbit #(.N(W)) u_r6  (.clk(clk), .load(init), .reset(rst),
                                .x(init_r6), .y(r6));
  register_nbit #(.N(W)) u_r10 (.clk(clk), .load(init), .reset(rst),
                                .x(init_r10), .y(r10));
  register_nbit #(.N(W)) u_r12 (.clk(clk), .load(ld[4] & ~init), .reset(rst | init),
                                .x(bus2), .y(r12));

  // Controller: line counter 1..4, looping.
  always_ff @(posedge clk) begin
    if (rst || init) state <= 2'd0;
    else if (run)    state <= state + 2'd1;
  end

  assign line      = state;
  assign iter_done = run && (state == 2'd3);
  assign regs      = {r12, r10, r6, r5, r4, r3, r2, r1};

  assert property (@(posedge clk) disable iff (rst) !(init && run));
endmodule
