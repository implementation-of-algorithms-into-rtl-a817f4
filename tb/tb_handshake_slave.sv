// Testbench for handshake_slave: an environment model on an unrelated
// clock runs the four-phase handshake (raise DATA_READY with DATA, wait
// for DATA_ACCEPTED, drop DATA_READY, wait for DATA_ACCEPTED to drop).
// Every word must come out once, in order, and no word may be taken while
// TAKE_EN is low.
module tb_handshake_slave;
  localparam int W = 17;
  logic clk = 0, eclk = 0, rst, data_ready, data_accepted, take_en, word_valid;
  logic [W-1:0] data, word;
  logic [W-1:0] sent [$];
  int checks = 0, failures = 0, received = 0;
  logic take_en_q;   // TAKE_EN in the cycle the word was captured

  always @(posedge clk) take_en_q <= take_en;

  handshake_slave #(.W(W)) dut (.clk(clk), .rst(rst), .data_ready(data_ready), .data(data),
                                .data_accepted(data_accepted), .take_en(take_en),
                                .word(word), .word_valid(word_valid));

  always #5 clk = ~clk;
  always #7 eclk = ~eclk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && word_valid) begin
      logic [W-1:0] want;
      want = sent.pop_front();
      checks += 2;
      if (word !== want) begin failures++; $display("word %h want %h", word, want); end
      if (!take_en_q) begin failures++; $display("word taken while take_en low"); end
      received++;
    end
  end

  // take_en toggles slowly to exercise refusal
  always @(posedge clk) if (!rst && ($urandom % 40) == 0) take_en <= ~take_en;

  initial begin
    rst = 1; data_ready = 0; data = '0; take_en = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 100; k++) begin
      @(posedge eclk);
      data = W'($urandom); sent.push_back(data);
      @(posedge eclk);
      data_ready = 1;
      wait (data_accepted);
      @(posedge eclk);
      data_ready = 0;
      wait (!data_accepted);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (received != 100) begin failures++; $display("received %0d", received); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
