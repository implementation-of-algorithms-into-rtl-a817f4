// Testbench for abc_alu: every operation code with random operands against
// reference arithmetic (C-style truncating division, floor square root,
// zero for a zero divisor or a negative radicand), and the latency of each
// class: 1 cycle for the simple operations, W+1 for divide, W/2+1 for
// square root.
module tb_abc_alu;
  import alg_pkg::*;
  localparam int W = 16;
  logic clk = 0, rst, start, done, busy;
  abc_op_e op;
  logic signed [W-1:0] in1, in2, y;
  int checks = 0, failures = 0;

  abc_alu #(.W(W)) dut (.clk(clk), .rst(rst), .start(start), .op(op), .in1(in1), .in2(in2),
                        .y(y), .done(done), .busy(busy));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int isqrt(input int v);
    int r = 0;
    if (v <= 0) return 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic logic signed [W-1:0] ref_y(input abc_op_e o, input logic signed [W-1:0] p, q);
    case (o)
      OP_MUL:  return W'(p * q);
      OP_DIV:  return (q == 0) ? '0 : W'(int'(p) / int'(q));
      OP_SQRT: return W'(isqrt(int'(p)));
      OP_ADD:  return p + q;
      OP_SUB:  return p - q;
      OP_NEG:  return -p;
      default: return p;
    endcase
  endfunction

  task automatic do_op(input abc_op_e o, input logic signed [W-1:0] p, q);
    int lat = 0, want_lat;
    op = o; in1 = p; in2 = q; start = 1;
    @(posedge clk); #1;
    start = 0;
    lat = 1;
    while (!done && lat < 100) begin @(posedge clk); #1; lat++; end
    want_lat = (o == OP_DIV && q != 0) ? W + 1 : (o == OP_SQRT && p >= 0) ? W / 2 + 1 : 1;
    checks += 2;
    if (y !== ref_y(o, p, q)) begin failures++; $display("op %0d %0d %0d: y=%0d want %0d", o, p, q, y, ref_y(o, p, q)); end
    if (lat != want_lat) begin failures++; $display("op %0d latency %0d want %0d", o, lat, want_lat); end
  endtask

  initial begin
    rst = 1; start = 0; op = OP_PASS; in1 = '0; in2 = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    do_op(OP_DIV, 16'sd7, 16'sd2);
    do_op(OP_DIV, -16'sd7, 16'sd2);
    do_op(OP_DIV, 16'sd7, -16'sd2);
    do_op(OP_DIV, -16'sd32768, 16'sd3);
    do_op(OP_DIV, 16'sd5, 16'sd0);
    do_op(OP_SQRT, 16'sd32767, 16'sd0);
    do_op(OP_SQRT, 16'sd0, 16'sd0);
    do_op(OP_SQRT, -16'sd4, 16'sd0);
    for (int k = 0; k < 700; k++) begin
      automatic abc_op_e o = abc_op_e'($urandom % 7);
      do_op(o, W'($urandom), (k % 2) ? W'($urandom) : W'($signed(7'($urandom))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
