// Testbench for abc_processor: solves quadratics with known integer roots
// and random ones, comparing X1 and X2 with the abc formula evaluated in
// integer arithmetic here (floor square root, truncating division), and
// checks the solution time of 24 + 5W/2 cycles (W/2 fewer when the
// discriminant is negative and the square root ends at once).
module tb_abc_processor;
  localparam int W = 16;
  logic clk = 0, rst, start, done, busy;
  logic signed [W-1:0] a, b, c, x1, x2;
  logic [3:0] step_no;
  int checks = 0, failures = 0;

  abc_processor #(.W(W)) dut (.clk(clk), .rst(rst), .start(start), .a_in(a), .b_in(b), .c_in(c),
                              .x1(x1), .x2(x2), .done(done), .busy(busy), .step_no(step_no));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int isqrt(input int v);
    int r = 0;
    if (v <= 0) return 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  task automatic run_case(input int av, bv, cv);
    int d, s, r1, r2, cycles;
    d  = bv * bv - 4 * av * cv;
    s  = isqrt(d);
    r1 = (s - bv) / (2 * av);
    r2 = (-s - bv) / (2 * av);
    a = W'(av); b = W'(bv); c = W'(cv); start = 1;
    @(posedge clk); #1;
    start = 0;
    cycles = 0;
    while (!done && cycles < 1000) begin @(posedge clk); #1; cycles++; end
    checks += 3;
    if (x1 !== W'(r1)) begin failures++; $display("a=%0d b=%0d c=%0d: x1=%0d want %0d", av, bv, cv, x1, r1); end
    if (x2 !== W'(r2)) begin failures++; $display("a=%0d b=%0d c=%0d: x2=%0d want %0d", av, bv, cv, x2, r2); end
    if (cycles != 24 + 5 * W / 2 - ((d < 0) ? W / 2 : 0)) begin failures++; $display("solution took %0d cycles", cycles); end
    @(posedge clk); #1;
  endtask

  initial begin
    rst = 1; start = 0; a = '0; b = '0; c = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    run_case(1, -5, 6);     // roots 3, 2
    run_case(2, -4, -6);    // roots 3, -1
    run_case(1, 2, 1);      // double root -1
    run_case(3, 0, -27);    // roots 3, -3
    run_case(-1, 1, 6);     // roots -2, 3
    run_case(1, -1, -1);    // irrational roots, truncated
    run_case(1, 0, 4);      // negative discriminant
    for (int k = 0; k < 60; k++) begin
      automatic int av = 1 + $urandom % 9;
      if (($urandom % 2) != 0) av = -av;
      run_case(av, int'($urandom % 101) - 50, int'($urandom % 101) - 50);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
