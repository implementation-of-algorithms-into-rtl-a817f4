// Testbench for token_switch as a 4-way CASE and a 2-way if-then-else:
// a token appears one cycle later on the selected output only, is held
// until ACK, and tokens arriving while busy are ignored.
module tb_token_switch;
  logic clk = 0, rst, tok4, ack4, busy4, tok2, ack2, busy2, cond;
  logic [1:0] sel4;
  logic [3:0] en4;
  logic [1:0] en2;
  int checks = 0, failures = 0;

  token_switch #(.N(4)) dut4 (.clk(clk), .rst(rst), .token_in(tok4), .sel(sel4), .ack(ack4),
                              .en(en4), .busy(busy4));
  token_switch #(.N(2)) dut2 (.clk(clk), .rst(rst), .token_in(tok2), .sel(~cond), .ack(ack2),
                              .en(en2), .busy(busy2));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; tok4 = 0; ack4 = 0; sel4 = 0; tok2 = 0; ack2 = 0; cond = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int k = 0; k < 100; k++) begin
      automatic int s = $urandom % 4;
      automatic int hold = $urandom % 3;
      automatic bit cv = $urandom % 2;
      tok4 = 1; sel4 = 2'(s); tok2 = 1; cond = cv;
      @(posedge clk); #1;
      tok4 = 0; tok2 = 0;
      checks += 2;
      if (en4 !== 4'(1 << s)) begin failures++; $display("case: en=%b sel=%0d", en4, s); end
      if (en2 !== (cv ? 2'b01 : 2'b10)) begin failures++; $display("if: en=%b cond=%0d", en2, cv); end
      // a second token while busy must be ignored
      tok4 = 1; sel4 = 2'(s + 1);
      repeat (hold) begin
        @(posedge clk); #1;
        checks++;
        if (en4 !== 4'(1 << s)) begin failures++; $display("token not held"); end
      end
      tok4 = 0;
      ack4 = 1; ack2 = 1;
      @(posedge clk); #1;
      ack4 = 0; ack2 = 0;
      checks += 2;
      if (en4 !== 0 || en2 !== 0) begin failures++; $display("ack did not clear"); end
      if (busy4) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
