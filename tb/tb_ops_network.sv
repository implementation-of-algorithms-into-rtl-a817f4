// Testbench for ops_network: random command sequences against a reference
// model of S0/S1/S2 and of the status vector; counts that every status
// (A<B, A=B, A>B) was seen.
module tb_ops_network;
  localparam int W = 8;
  logic clk = 0, rst;
  logic [1:0] z;
  logic [W-1:0] i, a, b, ma, mb;
  logic [2:0] x;
  int checks = 0, failures = 0;
  int seen [3];

  ops_network #(.W(W)) dut (.clk(clk), .rst(rst), .z(z), .i(i), .a(a), .b(b), .x(x));

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '{0, 0, 0};
    rst = 1; z = 0; i = '0; ma = '0; mb = '0;
    @(posedge clk); #1;
    rst = 0;
    for (int k = 0; k < 1000; k++) begin
      z = 2'($urandom % 4); i = W'($urandom % 16);
      @(posedge clk); #1;
      case (z)
        2'd1: begin mb = ma; ma = i; end
        2'd2: begin logic [W-1:0] t; t = ma; ma = mb; mb = t - mb; end
        default: ;
      endcase
      checks += 3;
      if (a !== ma || b !== mb) begin failures++; $display("a=%0d b=%0d want %0d %0d", a, b, ma, mb); end
      if (x !== {ma > mb, ma == mb, ma < mb}) begin failures++; $display("x=%b", x); end
      if (ma < mb) seen[0]++; else if (ma == mb) seen[1]++; else seen[2]++;
    end
    for (int j = 0; j < 3; j++) begin
      checks++;
      if (seen[j] == 0) begin failures++; $display("status X%0d never seen", j + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
