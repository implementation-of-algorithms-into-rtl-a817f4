// abc_processor2: solves a*x^2 + b*x + c = 0 like abc_processor, but with
// the faster data path that runs two operations per control step:
//   x1 = (-b + sqrt(b^2 - 4ac)) / 2a,  x2 = (-b - sqrt(b^2 - 4ac)) / 2a.
// The code sequence is written with as much parallelism as the data
// dependencies allow, and register allocation folds its variables into
// five registers A, B, C, E, F. Seven control steps:
//    1 E = 4*A         ; F = B
//    2 E = E*C         ; C = B*F
//    3 C = C - E
//    4 A = SQRT(C)     ; C = 2*A
//    5 F = A - B       ; A = -A
//    6 B = A - B       ; A = F / C      (x1 in A)
//    7 B = B / C                        (x2 in B)
// Both operations of a step read the register values from before the
// step. Two ALUs (abc_alu) do the work:
//   ALU1: 4*A, B*F, C-E, 2*A, A-B (twice), B/C
//   ALU2: E*C, SQRT(C), -A, F/C
// Multiplexers: ALU1.IN1 from A, B or C; ALU1.IN2 from the constants 4 and
// 2, F, E, B or C; ALU2.IN1 from E, C, A or F; ALU2.IN2 is always C. The E
// register takes ALU1 or ALU2, F takes B directly or ALU1; A is written
// only by ALU2, B and C only by ALU1.
// Each step starts the ALUs it uses (state ISSUE), then waits until every
// started ALU has reported DONE, and loads all destination registers in the
// same edge. A step takes 1 + the longer ALU latency (1 for the one-cycle
// operations, W+1 for a division, W/2+1 for the square root); a whole
// solution takes 14 + 5W/2 cycles after START (54 at W = 16), W/2 fewer
// when the discriminant is negative, against 24 + 5W/2 for abc_processor.
// Interface: START (one cycle, when idle) loads A, B, C from A_IN, B_IN,
// C_IN. DONE is high for one cycle when X1 (register A) and X2 (register B)
// hold the roots. Same number format as abc_processor.
// The code sequence, the five registers and the split of the operations
// over the two ALUs are the document's; the multiplexer inputs, the
// control encoding and the two-ALU step protocol are this design's.
module abc_processor2
  import alg_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic signed [W-1:0] a_in,
  input  logic signed [W-1:0] b_in,
  input  logic signed [W-1:0] c_in,
  output logic signed [W-1:0] x1,
  output logic signed [W-1:0] x2,
  output logic                done,
  output logic                busy,
  output logic [2:0]          step_no
);
  localparam int unsigned NSTEP = 7;

  // One control word per step
  typedef struct packed {
    logic [4:0] load;   // {A, B, C, E, F}
    logic       en1;    // ALU1 used
    abc_op_e    op1;
    logic [1:0] m1a;    // ALU1.IN1: 0 A, 1 B, 2 C
    logic [2:0] m1b;    // ALU1.IN2: 0 const 4, 1 const 2, 2 F, 3 E, 4 B, 5 C
    logic       en2;    // ALU2 used
    abc_op_e    op2;
    logic [1:0] m2a;    // ALU2.IN1: 0 E, 1 C, 2 A, 3 F
    logic       esrc;   // E input: 0 ALU1, 1 ALU2
    logic       fsrc;   // F input: 0 B, 1 ALU1
  } abc2_ctrl_t;

  function automatic abc2_ctrl_t ctrl_word(input logic [2:0] s);
    unique case (s)
      //                   load      en1  op1      m1a   m1b   en2  op2      m2a   esrc  fsrc
      3'd0:    ctrl_word = '{5'b00011, 1'b1, OP_MUL, 2'd0, 3'd0, 1'b0, OP_PASS, 2'd0, 1'b0, 1'b0}; // E=4*A; F=B
      3'd1:    ctrl_word = '{5'b00110, 1'b1, OP_MUL, 2'd1, 3'd2, 1'b1, OP_MUL,  2'd0, 1'b1, 1'b0}; // C=B*F; E=E*C
      3'd2:    ctrl_word = '{5'b00100, 1'b1, OP_SUB, 2'd2, 3'd3, 1'b0, OP_PASS, 2'd0, 1'b0, 1'b0}; // C=C-E
      3'd3:    ctrl_word = '{5'b10100, 1'b1, OP_MUL, 2'd0, 3'd1, 1'b1, OP_SQRT, 2'd1, 1'b0, 1'b0}; // C=2*A; A=SQRT(C)
      3'd4:    ctrl_word = '{5'b10001, 1'b1, OP_SUB, 2'd0, 3'd4, 1'b1, OP_NEG,  2'd2, 1'b0, 1'b1}; // F=A-B; A=-A
      3'd5:    ctrl_word = '{5'b11000, 1'b1, OP_SUB, 2'd0, 3'd4, 1'b1, OP_DIV,  2'd3, 1'b0, 1'b0}; // B=A-B; A=F/C
      default: ctrl_word = '{5'b01000, 1'b1, OP_DIV, 2'd1, 3'd5, 1'b0, OP_PASS, 2'd0, 1'b0, 1'b0}; // B=B/C
    endcase
  endfunction

  typedef enum logic [1:0] {P_IDLE, P_ISSUE, P_WAIT, P_DONE} pstate_e;
  pstate_e state;

  logic [2:0]          step;
  abc2_ctrl_t          cw;
  logic                ext_load, step_end;
  logic                start1, start2, done1, done2, busy1, busy2, seen1, seen2, fin1, fin2;
  logic signed [W-1:0] y1, y2, in1a, in1b, in2a;
  logic signed [W-1:0] ra, rb, rc, re, rf, e_in, f_in;
  logic [4:0]          ld;

  assign cw       = ctrl_word(step);
  assign ext_load = (state == P_IDLE) && start;
  assign start1   = (state == P_ISSUE) && cw.en1;
  assign start2   = (state == P_ISSUE) && cw.en2;

  // A step ends when every ALU it uses has finished (now or earlier)
  assign fin1     = !cw.en1 || seen1 || done1;
  assign fin2     = !cw.en2 || seen2 || done2;
  assign step_end = (state == P_WAIT) && fin1 && fin2;
  assign ld       = step_end ? cw.load : 5'b00000;

  assign e_in = cw.esrc ? y2 : y1;
  assign f_in = cw.fsrc ? y1 : rb;

  register_nbit #(.N(W)) u_ra (.clk(clk), .load(ld[4] | ext_load), .reset(rst),
                               .x(ext_load ? a_in : y2), .y(ra));
  register_nbit #(.N(W)) u_rb (.clk(clk), .load(ld[3] | ext_load), .reset(rst),
                               .x(ext_load ? b_in : y1), .y(rb));
  register_nbit #(.N(W)) u_rc (.clk(clk), .load(ld[2] | ext_load), .reset(rst),
                               .x(ext_load ? c_in : y1), .y(rc));
  register_nbit #(.N(W)) u_re (.clk(clk), .load(ld[1]), .reset(rst), .x(e_in), .y(re));
  register_nbit #(.N(W)) u_rf (.clk(clk), .load(ld[0]), .reset(rst), .x(f_in), .y(rf));

  mux #(.NIN(3), .W(W)) u_mux1a (.in({rc, rb, ra}), .s(cw.m1a), .out(in1a));
  mux #(.NIN(6), .W(W)) u_mux1b (.in({rc, rb, re, rf, W'(2), W'(4)}), .s(cw.m1b), .out(in1b));
  mux #(.NIN(4), .W(W)) u_mux2a (.in({rf, ra, rc, re}), .s(cw.m2a), .out(in2a));

  abc_alu #(.W(W)) u_alu1 (
    .clk(clk), .rst(rst), .start(start1), .op(cw.op1), .in1(in1a), .in2(in1b),
    .y(y1), .done(done1), .busy(busy1)
  );

  abc_alu #(.W(W)) u_alu2 (
    .clk(clk), .rst(rst), .start(start2), .op(cw.op2), .in1(in2a), .in2(rc),
    .y(y2), .done(done2), .busy(busy2)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= P_IDLE;
      step  <= '0;
      seen1 <= 1'b0;
      seen2 <= 1'b0;
    end else begin
      unique case (state)
        P_IDLE:  if (start) begin step <= '0; state <= P_ISSUE; end
        P_ISSUE: begin
          seen1 <= 1'b0;
          seen2 <= 1'b0;
          state <= P_WAIT;
        end
        P_WAIT: begin
          if (done1) seen1 <= 1'b1;
          if (done2) seen2 <= 1'b1;
          if (step_end) begin
            if (step == 3'(NSTEP - 1)) state <= P_DONE;
            else begin
              step  <= step + 3'd1;
              state <= P_ISSUE;
            end
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  assign done    = (state == P_DONE);
  assign busy    = (state != P_IDLE);
  assign x1      = ra;
  assign x2      = rb;
  assign step_no = step + 3'd1;

  assert property (@(posedge clk) disable iff (rst) start1 |-> !busy1);
  assert property (@(posedge clk) disable iff (rst) start2 |-> !busy2);
endmodule
