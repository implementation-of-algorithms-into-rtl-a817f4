// abc_processor: solves a*x^2 + b*x + c = 0 with the minimum-hardware data
// path of the abc formula,
//   x1 = (-b + sqrt(b^2 - 4ac)) / 2a,  x2 = (-b - sqrt(b^2 - 4ac)) / 2a.
// Register allocation folded the fifteen variables of the algorithm into
// four registers A, B, C and E, and every operation onto one ALU
// (abc_alu). The ALU's first operand comes from MUX1 (constant 2, C, B or
// E), its second from MUX2 (B, A, E or constant 4), and its result can be
// loaded into any of the four registers. A Moore controller steps through
// twelve control words, one per line of the reduced code sequence:
//    1 E = C*4      5 C = C-E       9 C = -C
//    2 E = E*A      6 C = SQRT(C)  10 C = C-B
//    3 C = B        7 A = 2*A      11 B = E/A   (x1)
//    4 C = C*B      8 E = C-B      12 C = C/A   (x2)
// Each step starts the ALU (state ISSUE) and waits for its DONE (state
// WAIT), loading the destination register when DONE arrives, so a step
// takes two cycles for the one-cycle operations, W/2+2 for the square
// root and W+2 for a division; a whole solution takes 24 + 5W/2 cycles
// after START (64 at W = 16) when 2a is not zero.
// Interface: START (one cycle, in IDLE) loads A, B, C from A_IN, B_IN,
// C_IN. DONE is high for one cycle when X1 (register B) and X2 (register C)
// hold the roots; they keep them until the next START.
// The control words, multiplexer codes and ALU codes follow the
// document's control table except step 2: the table reads E = C*E, which
// would form 4c^2, while the algorithm needs 4ac; here step 2 is E = E*A
// (MUX1 = E, MUX2 = A). The register width, two's-complement integers,
// the operand-loading step and the START/DONE protocol are this design's.
module abc_processor
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
  output logic [3:0]          step_no
);
  localparam int unsigned NSTEP = 12;

  // Control table. load = {A, B, C, E}; MUX1: 0 const 2, 1 C, 2 B, 3 E;
  // MUX2: 0 B, 1 A, 2 E, 3 const 4.
  function automatic abc_ctrl_t ctrl_word(input logic [3:0] s);
    unique case (s)
      4'd0:    ctrl_word = '{load: 4'b0001, mux1: 2'd1, mux2: 2'd3, op: OP_MUL};  // E = C*4
      4'd1:    ctrl_word = '{load: 4'b0001, mux1: 2'd3, mux2: 2'd1, op: OP_MUL};  // E = E*A
      4'd2:    ctrl_word = '{load: 4'b0010, mux1: 2'd2, mux2: 2'd0, op: OP_PASS}; // C = B
      4'd3:    ctrl_word = '{load: 4'b0010, mux1: 2'd1, mux2: 2'd0, op: OP_MUL};  // C = C*B
      4'd4:    ctrl_word = '{load: 4'b0010, mux1: 2'd1, mux2: 2'd2, op: OP_SUB};  // C = C-E
      4'd5:    ctrl_word = '{load: 4'b0010, mux1: 2'd1, mux2: 2'd0, op: OP_SQRT}; // C = SQRT(C)
      4'd6:    ctrl_word = '{load: 4'b1000, mux1: 2'd0, mux2: 2'd1, op: OP_MUL};  // A = 2*A
      4'd7:    ctrl_word = '{load: 4'b0001, mux1: 2'd1, mux2: 2'd0, op: OP_SUB};  // E = C-B
      4'd8:    ctrl_word = '{load: 4'b0010, mux1: 2'd1, mux2: 2'd0, op: OP_NEG};  // C = -C
      4'd9:    ctrl_word = '{load: 4'b0010, mux1: 2'd1, mux2: 2'd0, op: OP_SUB};  // C = C-B
      4'd10:   ctrl_word = '{load: 4'b0100, mux1: 2'd3, mux2: 2'd1, op: OP_DIV};  // B = E/A
      default: ctrl_word = '{load: 4'b0010, mux1: 2'd1, mux2: 2'd1, op: OP_DIV};  // C = C/A
    endcase
  endfunction

  typedef enum logic [1:0] {P_IDLE, P_ISSUE, P_WAIT, P_DONE} pstate_e;
  pstate_e state;

  logic [3:0]          step;
  abc_ctrl_t           cw;
  logic                ext_load;
  logic                alu_start, alu_done, alu_busy;
  logic signed [W-1:0] alu_y, opnd1, opnd2;
  logic signed [W-1:0] ra, rb, rc, re;
  logic [3:0]          ld;

  assign cw        = ctrl_word(step);
  assign ext_load  = (state == P_IDLE) && start;
  assign alu_start = (state == P_ISSUE);
  assign ld        = (state == P_WAIT && alu_done) ? cw.load : 4'b0000;

  register_nbit #(.N(W)) u_ra (.clk(clk), .load(ld[3] | ext_load), .reset(rst),
                               .x(ext_load ? a_in : alu_y), .y(ra));
  register_nbit #(.N(W)) u_rb (.clk(clk), .load(ld[2] | ext_load), .reset(rst),
                               .x(ext_load ? b_in : alu_y), .y(rb));
  register_nbit #(.N(W)) u_rc (.clk(clk), .load(ld[1] | ext_load), .reset(rst),
                               .x(ext_load ? c_in : alu_y), .y(rc));
  register_nbit #(.N(W)) u_re (.clk(clk), .load(ld[0]), .reset(rst),
                               .x(alu_y), .y(re));

  mux #(.NIN(4), .W(W)) u_mux1 (.in({re, rb, rc, W'(2)}), .s(cw.mux1), .out(opnd1));
  mux #(.NIN(4), .W(W)) u_mux2 (.in({W'(4), re, ra, rb}), .s(cw.mux2), .out(opnd2));

  abc_alu #(.W(W)) u_alu (
    .clk  (clk),
    .rst  (rst),
    .start(alu_start),
    .op   (cw.op),
    .in1  (opnd1),
    .in2  (opnd2),
    .y    (alu_y),
    .done (alu_done),
    .busy (alu_busy)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= P_IDLE;
      step  <= '0;
    end else begin
      unique case (state)
        P_IDLE:  if (start) begin step <= '0; state <= P_ISSUE; end
        P_ISSUE: state <= P_WAIT;
        P_WAIT:  if (alu_done) begin
          if (step == 4'(NSTEP - 1)) state <= P_DONE;
          else begin
            step  <= step + 4'd1;
            state <= P_ISSUE;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  assign done    = (state == P_DONE);
  assign busy    = (state != P_IDLE);
  assign x1      = rb;
  assign x2      = rc;
  assign step_no = step + 4'd1;

  assert property (@(posedge clk) disable iff (rst) alu_start |-> !alu_busy);
endmodule
