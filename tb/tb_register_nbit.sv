// Testbench for register_nbit: random LOAD/RESET sequences against a
// reference model; also checks that RESET wins over LOAD and that the old
// value is still visible during the loading cycle.
module tb_register_nbit;
  localparam int N = 8;
  logic clk = 0, load, reset;
  logic [N-1:0] x, y, model;
  int checks = 0, failures = 0;

  register_nbit #(.N(N)) dut (.clk(clk), .load(load), .reset(reset), .x(x), .y(y));

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; load = 0; x = '0; model = '0;
    @(posedge clk); #1;
    reset = 0;
    for (int k = 0; k < 300; k++) begin
      load  = ($urandom % 2) == 0;
      reset = ($urandom % 10) == 0;
      x     = N'($urandom);
      #3; checks++;
      if (y !== model) begin failures++; $display("old value %h, want %h", y, model); end
      @(posedge clk); #1;
      if (reset) model = '0; else if (load) model = x;
      checks++;
      if (y !== model) begin failures++; $display("y=%h want %h", y, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
