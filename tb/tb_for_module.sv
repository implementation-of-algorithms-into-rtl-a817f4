// Testbench for for_module: runs loops with several (init, end) pairs and
// a process that answers ENABLE with NEXT after a random delay. Checks
// the number of iterations (init - end), the counter value seen by each
// iteration, DONE at the end, ENABLE held until NEXT, and two cycles per
// iteration when NEXT answers at once.
module tb_for_module;
  localparam int W = 4;
  logic clk = 0, rst, load, start, next, enable, done;
  logic [W-1:0] init, end_val, i;
  int checks = 0, failures = 0;

  for_module #(.W(W)) dut (.clk(clk), .rst(rst), .load(load), .init(init), .end_val(end_val),
                           .start(start), .next(next), .i(i), .enable(enable), .done(done));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_loop(input int ini, input int fin, input bit fast);
    int iters = 0, cycles = 0;
    load = 1; init = W'(ini); end_val = W'(fin); start = 0; next = 0;
    @(posedge clk); #1;
    load = 0; start = 1;
    while (1) begin
      #1;
      if (done) break;
      if (enable) begin
        checks++;
        if (i !== W'(ini - iters)) begin failures++; $display("iteration %0d sees i=%0d", iters, i); end
        if (!fast) begin
          int dly = $urandom % 4;
          repeat (dly) begin
            @(posedge clk); #1; cycles++;
            checks++;
            if (!enable) begin failures++; $display("enable dropped before next"); end
          end
        end
        next = 1;
        iters++;
      end
      @(posedge clk); #1; cycles++;
      next = 0;
      if (cycles > 1000) break;
    end
    checks++;
    if (iters != ini - fin) begin failures++; $display("init %0d end %0d: %0d iterations", ini, fin, iters); end
    checks++;
    if (i !== W'(fin)) begin failures++; $display("final i=%0d", i); end
    if (fast) begin
      checks++;
      if (cycles != 2 * (ini - fin)) begin failures++; $display("cycles %0d", cycles); end
    end
    start = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    rst = 1; load = 0; start = 0; next = 0; init = '0; end_val = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    run_loop(5, 0, 1);
    run_loop(8, 0, 0);
    run_loop(9, 3, 1);
    run_loop(4, 4, 1);
    run_loop(15, 0, 0);
    for (int k = 0; k < 10; k++) begin
      automatic int a = $urandom % 16;
      automatic int b = $urandom % (a + 1);
      run_loop(a, b, k[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
