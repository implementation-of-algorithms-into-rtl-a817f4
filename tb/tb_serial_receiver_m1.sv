// Testbench for serial_receiver_m1: for each package size 5..8 (the size
// is taken after reset) it sends random packages LSB first, one bit per
// DATA_TAKE, and checks each PKT against the sent bits with zeros above
// the package, and the package interval: 18 cycles for sizes 5..7, 20 for
// size 8, where the zero-fill loop has no iterations.
module tb_serial_receiver_m1;
  logic clk = 0, rst, data, data_take, pkt_valid;
  logic [3:0] size, loop_i;
  logic [7:0] pkt;
  logic [2:0] state_no;
  int checks = 0, failures = 0;
  logic [7:0] cur, sent [$];
  int bitpos;

  serial_receiver_m1 dut (.clk(clk), .rst(rst), .size_in(size), .data(data), .data_take(data_take),
                       .pkt(pkt), .pkt_valid(pkt_valid), .state_no(state_no), .loop_i(loop_i));

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign data = cur[bitpos];

  // Sender: next bit after each DATA_TAKE, next package after SIZE bits.
  always @(posedge clk) begin
    if (!rst && data_take) begin
      if (bitpos == int'(size) - 1) begin
        sent.push_back(cur & 8'((1 << size) - 1));
        cur    <= 8'($urandom);
        bitpos <= 0;
      end else bitpos <= bitpos + 1;
    end
  end

  initial begin
    cur = 8'($urandom); bitpos = 0;
    for (int sz = 5; sz <= 8; sz++) begin
      int last, t, got;
      last = -1; t = 0; got = 0;
      rst = 1; size = 4'(sz); sent.delete(); bitpos = 0;
      repeat (2) @(posedge clk); #1;
      rst = 0;
      while (got < 12 && t < 2000) begin
        @(posedge clk); #1; t++;
        if (pkt_valid) begin
          logic [7:0] want;
          #1;
          want = (sent.size() > 0) ? sent.pop_front() : 8'hxx;
          checks++;
          if (pkt !== want) begin failures++; $display("size %0d: pkt=%h want %h", sz, pkt, want); end
          if (last >= 0) begin
            checks++;
            if (t - last != ((sz == 8) ? 20 : 18)) begin failures++; $display("size %0d: package interval %0d", sz, t - last); end
          end
          last = t; got++;
        end
      end
      checks++;
      if (got != 12) begin failures++; $display("size %0d: only %0d packages", sz, got); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
