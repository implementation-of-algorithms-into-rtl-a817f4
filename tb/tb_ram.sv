// Testbench for ram: random writes and reads against an associative
// reference; reads without READ must give zero.
module tb_ram;
  localparam int K = 6, N = 8;
  logic clk = 0, read, write;
  logic [K-1:0] a;
  logic [N-1:0] din, dout;
  logic [N-1:0] model [2**K];
  int checks = 0, failures = 0;

  ram #(.K(K), .N(N)) dut (.clk(clk), .a(a), .read(read), .write(write), .din(din), .dout(dout));

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    read = 0; write = 0; a = '0; din = '0;
    // fill every word first so that every read has a known value
    for (int k = 0; k < 2**K; k++) begin
      a = K'(k); din = N'($urandom); write = 1; model[k] = din;
      @(posedge clk); #1;
    end
    write = 0;
    for (int k = 0; k < 500; k++) begin
      a = K'($urandom); din = N'($urandom);
      write = ($urandom % 3) == 0; read = ($urandom % 4) != 0;
      #1; checks++;
      if (dout !== (read ? model[a] : '0)) begin
        failures++; $display("a=%0d dout=%h want %h", a, dout, model[a]);
      end
      @(posedge clk); #1;
      if (write) model[a] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
