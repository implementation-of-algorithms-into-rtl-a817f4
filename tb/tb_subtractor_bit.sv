// Testbench for subtractor_bit: all eight input combinations against
// the arithmetic x - y - bi = r - 2*bo.
module tb_subtractor_bit;
  logic x, y, bi, r, bo;
  int checks = 0, failures = 0;

  subtractor_bit dut (.x(x), .y(y), .bi(bi), .r(r), .bo(bo));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      int diff;
      {x, y, bi} = 3'(k);
      #1;
      diff = int'(x) - int'(y) - int'(bi);
      checks += 2;
      if (r !== diff[0]) begin failures++; $display("R wrong for %b", k[2:0]); end
      if (bo !== (diff < 0)) begin failures++; $display("BO wrong for %b", k[2:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
