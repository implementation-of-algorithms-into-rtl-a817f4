// Shared types and constants for the algorithm-to-hardware examples.
// abc_op_e is the ALU code of the abc-formula processor: the numeric
// values are the codes printed in its control table (0 transparent,
// 1 multiply, 2 divide, 3 square root, 4 add, 5 subtract, 6 negate).
package alg_pkg;

  typedef enum logic [2:0] {
    OP_PASS = 3'd0,
    OP_MUL  = 3'd1,
    OP_DIV  = 3'd2,
    OP_SQRT = 3'd3,
    OP_ADD  = 3'd4,
    OP_SUB  = 3'd5,
    OP_NEG  = 3'd6
  } abc_op_e;

  // One control word of the abc processor: register loads, the two
  // multiplexer selects and the ALU code (columns of the control table).
  typedef struct packed {
    logic [3:0] load;   // {A, B, C, E}
    logic [1:0] mux1;   // X2 X1
    logic [1:0] mux2;   // Y2 Y1
    abc_op_e    op;     // Z3 Z2 Z1
  } abc_ctrl_t;

endpackage
