// Testbench for decr_reg_bitslice: random load / decrement / hold sequences against a
// reference counter, including wrap-around below zero.
module tb_decr_reg_bitslice;
  localparam int W = 4;
  logic clk = 0, l, d, bo;
  logic [W-1:0] d_in, q, model;
  int checks = 0, failures = 0;
  int decrements = 0;

  decr_reg_bitslice #(.W(W)) dut (.clk(clk), .l(l), .d(d), .d_in(d_in), .q(q), .bo(bo));

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    l = 1; d = 0; d_in = W'(9); model = W'(9);
    @(posedge clk); #1;
    for (int k = 0; k < 600; k++) begin
      l = ($urandom % 8) == 0; d = ($urandom % 3) != 0; d_in = W'($urandom);
      #1;
      checks++; if (bo !== (q == '0)) begin failures++; $display("bo wrong"); end
      @(posedge clk); #1;
      if (l) model = d_in;
      else if (d) begin model = model - W'(1); decrements++; end
      checks++;
      if (q !== model) begin failures++; $display("q=%0d want %0d", q, model); end
    end
    checks++;
    if (decrements < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
