// Testbench for demux: the selected output carries the input, all others
// are zero, for random inputs and every select value.
module tb_demux;
  localparam int NOUT = 4, W = 8;
  logic [W-1:0] in;
  logic [1:0] s;
  logic [NOUT-1:0][W-1:0] out;
  int checks = 0, failures = 0;

  demux #(.NOUT(NOUT), .W(W)) dut (.in(in), .s(s), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      in = W'($urandom); s = 2'($urandom);
      #1;
      for (int j = 0; j < NOUT; j++) begin
        checks++;
        if (out[j] !== ((j == s) ? in : '0)) begin
          failures++; $display("s=%0d out[%0d]=%h", s, j, out[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
