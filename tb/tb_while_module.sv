// Testbench for while_module: the loop condition is "count == K", where the
// testbench's count grows by one at the end of each body pass. Checks
// that the body runs exactly K times, that its enables come in order one
// cycle each, that NEXT pulses once at the exit, and the cycle count
// (K*(NSTEPS+1) + 1 test cycles after the start).
module tb_while_module;
  localparam int NSTEPS = 3;
  logic clk = 0, rst, start, condition, next, busy;
  logic [NSTEPS-1:0] en;
  int checks = 0, failures = 0;
  int count, target;

  while_module #(.NSTEPS(NSTEPS)) dut (.clk(clk), .rst(rst), .start(start), .condition(condition),
                                       .en(en), .next(next), .busy(busy));

  always #5 clk = ~clk;
  assign condition = (count == target);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int k);
    int cycles = 0, nexts = 0, expect_step = 0;
    count = 0; target = k;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    while (!next && cycles < 500) begin
      if (en != 0) begin
        checks++;
        if (en !== NSTEPS'(1) << expect_step) begin failures++; $display("en=%b want step %0d", en, expect_step); end
        expect_step = (expect_step + 1) % NSTEPS;
        if (en[NSTEPS-1]) count++;
      end
      @(posedge clk); #1; cycles++;
    end
    checks++;
    if (count != k) begin failures++; $display("body ran %0d times, want %0d", count, k); end
    checks++;
    if (cycles != k * (NSTEPS + 1) + 1) begin failures++; $display("cycles %0d", cycles); end
    @(posedge clk); #1;
    checks++;
    if (next || busy) begin failures++; $display("still busy after exit"); end
  endtask

  initial begin
    rst = 1; start = 0; count = 0; target = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    run(0); run(1); run(4);
    for (int j = 0; j < 5; j++) run($urandom % 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
