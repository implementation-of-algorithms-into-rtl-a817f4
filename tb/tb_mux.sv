// Testbench for mux: every select value with random inputs, 5-input
// instance (so one select code is out of range and must give zero).
module tb_mux;
  localparam int NIN = 5, W = 8;
  logic [NIN-1:0][W-1:0] in;
  logic [2:0] s;
  logic [W-1:0] out;
  int checks = 0, failures = 0;

  mux #(.NIN(NIN), .W(W)) dut (.in(in), .s(s), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      for (int j = 0; j < NIN; j++) in[j] = W'($urandom);
      s = 3'($urandom);
      #1; checks++;
      if (out !== ((s < NIN) ? in[s] : '0)) begin
        failures++; $display("s=%0d out=%h", s, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
