// Testbench for serial_receiver_alg2: sends 200 packages of random size
// (5..8, changed from package to package) and random contents. Each
// package occupies the last SIZE of the eight DATA samples of its frame;
// the earlier samples carry random bits that the receiver must drop. Checks
// each PKT (package bits with zeros above), the package interval of 18
// cycles, and that every size was received.
module tb_serial_receiver_alg2;
  logic clk = 0, rst, data, data_take, pkt_valid;
  logic [3:0] size, loop_i;
  logic [7:0] pkt;
  logic [1:0] state_no;
  int checks = 0, failures = 0;
  int sample, n_size [9];
  logic [7:0] frame;              // the eight samples of the current frame
  logic [7:0] want_q [$];

  serial_receiver_alg2 dut (.clk(clk), .rst(rst), .size_in(size), .data(data), .data_take(data_take),
                            .pkt(pkt), .pkt_valid(pkt_valid), .state_no(state_no), .loop_i(loop_i));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A new frame: random package v of s bits placed in samples 8-s..7,
  // random junk before it.
  task automatic new_frame();
    int s;
    logic [7:0] v, junk;
    s = 5 + int'($urandom_range(3));
    v = 8'($urandom) & 8'((1 << s) - 1);
    junk = 8'($urandom);
    size = 4'(s);
    frame = (v << (8 - s)) | (junk & 8'((1 << (8 - s)) - 1));
    want_q.push_back(v);
    n_size[s]++;
  endtask

  assign data = frame[sample];

  always @(posedge clk) begin
    if (!rst && data_take) begin
      if (sample == 7) begin
        sample <= 0;
        #1 new_frame();
      end else sample <= sample + 1;
    end
  end

  initial begin
    int last, t, got;
    rst = 1; sample = 0; last = -1; t = 0; got = 0;
    new_frame();
    repeat (2) @(posedge clk); #1;
    rst = 0;
    while (got < 200 && t < 10000) begin
      @(posedge clk); #1; t++;
      if (pkt_valid) begin
        logic [7:0] want;
        want = want_q.pop_front();
        checks++;
        if (pkt !== want) begin failures++; $display("pkt=%h want %h", pkt, want); end
        if (last >= 0) begin
          checks++;
          if (t - last != 18) begin failures++; $display("package interval %0d", t - last); end
        end
        last = t; got++;
      end
    end
    checks++;
    if (got != 200) begin failures++; $display("only %0d packages", got); end
    for (int s = 5; s <= 8; s++) begin
      checks++;
      if (n_size[s] == 0) begin failures++; $display("size %0d never sent", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
