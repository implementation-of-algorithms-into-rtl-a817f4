// abc_alu: the single multi-function operator of the abc-formula
// processor, built as an operator subsystem with a START/DONE handshake.
// On START it takes its operands IN1, IN2 and the code OP:
//   0 transparent (Y = IN1)    4 add       (Y = IN1 + IN2)
//   1 multiply    (IN1 * IN2)  5 subtract  (Y = IN1 - IN2)
//   2 divide      (IN1 / IN2)  6 negate    (Y = -IN1)
//   3 square root (Y = floor(sqrt(IN1)))
// All values are W-bit two's-complement integers. Transparent, add,
// subtract, negate and multiply (low W bits of the product) are
// combinational and finish at once: DONE is high, with Y, in the cycle
// after START. Divide is a restoring division on magnitudes, one quotient
// bit per cycle, truncating toward zero as C does; DONE comes W+1 cycles
// after START. Square root uses the bit-pair method, one result bit per
// cycle; DONE comes W/2+1 cycles after START. Y holds its value until the
// next result. Division by zero gives 0; the square root of a negative
// operand gives 0. The operation codes are the document's; the number
// format, the algorithms, the latencies and the treatment of zero
// divisors and negative radicands are this design's.
module abc_alu
  import alg_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  abc_op_e             op,
  input  logic signed [W-1:0] in1,
  input  logic signed [W-1:0] in2,
  output logic signed [W-1:0] y,
  output logic                done,
  output logic                busy
);
  localparam int unsigned CW = $clog2(W + 1);

  typedef enum logic [1:0] {A_IDLE, A_DIV, A_SQRT} alu_state_e;
  alu_state_e state;

  logic [CW-1:0] count;
  logic [W-1:0]  quo;        // dividend shifting out, quotient shifting in
  logic [W-1:0]  rem;
  logic [W-1:0]  dvs;
  logic          neg_q;
  logic [W-1:0]  rad, root, bitv;   // square root registers

  logic signed [W-1:0] comb_y;
  logic [W-1:0]        mag1, mag2;
  logic [W:0]          rem_sh, rem_try;
  logic [W-1:0]        trial;

  assign mag1 = in1[W-1] ? W'(-in1) : W'(in1);
  assign mag2 = in2[W-1] ? W'(-in2) : W'(in2);

  always_comb begin
    unique case (op)
      OP_MUL:  comb_y = W'(in1 * in2);
      OP_ADD:  comb_y = in1 + in2;
      OP_SUB:  comb_y = in1 - in2;
      OP_NEG:  comb_y = -in1;
      default: comb_y = in1;
    endcase
  end

  // One restoring-division step.
  assign rem_sh  = {rem, quo[W-1]};
  assign rem_try = rem_sh - {1'b0, dvs};
  // One square-root step.
  assign trial   = root + bitv;

  assign busy = (state != A_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= A_IDLE;
      done  <= 1'b0;
      y     <= '0;
      count <= '0;
      quo   <= '0;
      rem   <= '0;
      dvs   <= '0;
      neg_q <= 1'b0;
      rad   <= '0;
      root  <= '0;
      bitv  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        A_IDLE: if (start) begin
          unique case (op)
            OP_DIV: begin
              if (in2 == '0) begin
                y    <= '0;
                done <= 1'b1;
              end else begin
                quo   <= mag1;
                rem   <= '0;
                dvs   <= mag2;
                neg_q <= in1[W-1] ^ in2[W-1];
                count <= CW'(W);
                state <= A_DIV;
              end
            end
            OP_SQRT: begin
              if (in1[W-1]) begin
                y    <= '0;
                done <= 1'b1;
              end else begin
                rad   <= W'(in1);
                root  <= '0;
                bitv  <= W'(1) << (W - 2);
                count <= CW'(W / 2);
                state <= A_SQRT;
              end
            end
            default: begin
              y    <= comb_y;
              done <= 1'b1;
            end
          endcase
        end
        A_DIV: begin
          if (!rem_try[W]) begin
            rem <= rem_try[W-1:0];
            quo <= {quo[W-2:0], 1'b1};
          end else begin
            rem <= rem_sh[W-1:0];
            quo <= {quo[W-2:0], 1'b0};
          end
          count <= count - CW'(1);
          if (count == CW'(1)) begin
            state <= A_IDLE;
            done  <= 1'b1;
            if (!rem_try[W]) y <= neg_q ? -$signed({quo[W-2:0], 1'b1}) : $signed({quo[W-2:0], 1'b1});
            else             y <= neg_q ? -$signed({quo[W-2:0], 1'b0}) : $signed({quo[W-2:0], 1'b0});
          end
        end
        A_SQRT: begin
          if (rad >= trial) begin
            rad  <= rad - trial;
            root <= (root >> 1) + bitv;
          end else begin
            root <= root >> 1;
          end
          bitv  <= bitv >> 2;
          count <= count - CW'(1);
          if (count == CW'(1)) begin
            state <= A_IDLE;
            done  <= 1'b1;
            y     <= (rad >= trial) ? $signed((root >> 1) + bitv) : $signed(root >> 1);
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst) start |-> !busy);
endmodule
