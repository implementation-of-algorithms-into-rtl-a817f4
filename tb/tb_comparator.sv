// Testbench for comparator: exhaustive over both operands and the enable.
module tb_comparator;
  localparam int W = 4;
  logic [W-1:0] x, y;
  logic s, c, zero;
  int checks = 0, failures = 0;

  comparator #(.W(W)) dut (.x(x), .y(y), .s(s), .c(c), .zero(zero));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int sv = 0; sv < 2; sv++)
      for (int i = 0; i < 2**W; i++)
        for (int j = 0; j < 2**W; j++) begin
          x = W'(i); y = W'(j); s = sv[0];
          #1; checks += 2;
          if (c !== (sv == 1 && i == j)) begin failures++; $display("c x=%0d y=%0d s=%0d", i, j, sv); end
          if (zero !== (sv == 1 && i == 0)) begin failures++; $display("zero x=%0d s=%0d", i, sv); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
