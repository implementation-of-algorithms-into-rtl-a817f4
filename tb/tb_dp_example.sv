// Testbench for dp_example: runs the looping code sequence for many
// iterations from random start values and compares, after every
// iteration, the registers with the original fifteen-variable sequence
//   R3 = R1 + R2; R12 = R1 / R5 = R3 - R4; R7 = R3 * R6; R13 = R3 /
//   R8 = R3 + R5; R9 = R1 + R7; R11 = R10 / R5 /
//   R14 = R11 AND R8; R15 = R12 OR R9 / R1 = R14 (and R2 = R15)
// evaluated here. One iteration must take four cycles.
module tb_dp_example;
  localparam int W = 16;
  logic clk = 0, rst, init, run, iter_done;
  logic [W-1:0] i1, i2, i4, i6, i10;
  logic [7:0][W-1:0] regs;
  logic [1:0] line;
  int checks = 0, failures = 0;

  dp_example #(.W(W)) dut (.clk(clk), .rst(rst), .init(init), .run(run),
                           .init_r1(i1), .init_r2(i2), .init_r4(i4), .init_r6(i6), .init_r10(i10),
                           .regs(regs), .line(line), .iter_done(iter_done));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] divw(input logic [W-1:0] p, q);
    return (q == 0) ? '1 : p / q;
  endfunction

  task automatic session(input int iters);
    logic [W-1:0] v1, v2, v3, v4, v5, v6, v7, v8, v9, v10, v11, v12, v14, v15;
    int cycles;
    v1 = W'($urandom); v2 = W'($urandom); v4 = W'($urandom % 8); v6 = W'($urandom); v10 = W'($urandom);
    i1 = v1; i2 = v2; i4 = v4; i6 = v6; i10 = v10;
    init = 1;
    @(posedge clk); #1;
    init = 0; run = 1;
    for (int n = 0; n < iters; n++) begin
      v3 = v1 + v2; v12 = v1;
      v5 = v3 - v4; v7 = W'(v3 * v6);
      v8 = v3 + v5; v9 = v1 + v7; v11 = divw(v10, v5);
      v14 = v11 & v8; v15 = v12 | v9;
      v1 = v14; v2 = v15;
      cycles = 0;
      while (!iter_done && cycles < 10) begin @(posedge clk); #1; cycles++; end
      @(posedge clk); #1; cycles++;
      checks += 6;
      if (cycles != 4) begin failures++; $display("iteration took %0d cycles", cycles); end
      if (regs[0] !== v1) begin failures++; $display("iter %0d R1=%h want %h", n, regs[0], v1); end
      if (regs[1] !== v2) begin failures++; $display("iter %0d R2=%h want %h", n, regs[1], v2); end
      if (regs[2] !== v8) begin failures++; $display("iter %0d R3=%h want %h", n, regs[2], v8); end
      if (regs[4] !== v11) begin failures++; $display("iter %0d R5=%h want %h", n, regs[4], v11); end
      if (regs[7] !== v12) begin failures++; $display("iter %0d R12=%h want %h", n, regs[7], v12); end
    end
    run = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    rst = 1; init = 0; run = 0; i1 = '0; i2 = '0; i4 = '0; i6 = '0; i10 = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int s = 0; s < 20; s++) session(1 + $urandom % 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
