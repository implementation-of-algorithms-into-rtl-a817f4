// Testbench for video_controller at its full size (80 x 25 characters,
// 8 lines, 35-character ROM): loads the video RAM through the load port
// with random codes, runs two frames and checks every emitted pattern row,
// in scan order, against disp[video[x][y]][z] computed from the ROM
// formula; also the number of rows, FRAME_DONE once per frame and the
// frame time 1 + ROWS*(2 + LINES*(2 + 2*COLS)) cycles.
module tb_video_controller;
  localparam int COLS = 80, ROWS = 25, LINES = 8;
  logic clk = 0, rst, run, ld_write, ld_ready, out_valid, frame_done;
  logic [10:0] ld_addr;
  logic [5:0] ld_data;
  logic [7:0] out;
  logic [2:0] state_no;
  logic [5:0] vram [ROWS*COLS];
  int checks = 0, failures = 0;

  video_controller dut (.clk(clk), .rst(rst), .run(run), .ld_write(ld_write), .ld_addr(ld_addr),
                        .ld_data(ld_data), .ld_ready(ld_ready), .out(out), .out_valid(out_valid),
                        .frame_done(frame_done), .state_no(state_no));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame();
    int n = 0, cycles = 0, frames = 0, bad = 0;
    run = 1;
    @(posedge clk); #1;
    run = 0;
    while (state_no != 0 && cycles < 100000) begin
      if (out_valid) begin
        int x = n / (LINES * COLS), z = (n / COLS) % LINES, y = n % COLS;
        logic [7:0] want = 8'((int'(vram[x * COLS + y]) * LINES + z) ^ 'h5A);
        if (out !== want) begin
          bad++;
          if (bad < 5) $display("row %0d line %0d col %0d: %h want %h", x, z, y, out, want);
        end
        n++;
      end
      if (frame_done) frames++;
      @(posedge clk); #1; cycles++;
    end
    checks += 4;
    if (bad != 0) failures++;
    if (n != ROWS * LINES * COLS) begin failures++; $display("%0d rows emitted", n); end
    if (frames != 1) begin failures++; $display("%0d frame_done pulses", frames); end
    if (cycles != 1 + ROWS * (2 + LINES * (2 + 2 * COLS))) begin failures++; $display("frame %0d cycles", cycles); end
  endtask

  initial begin
    rst = 1; run = 0; ld_write = 0; ld_addr = '0; ld_data = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int k = 0; k < ROWS * COLS; k++) begin
      vram[k] = 6'($urandom % 35);
      ld_addr = 11'(k); ld_data = vram[k]; ld_write = 1;
      @(posedge clk); #1;
    end
    ld_write = 0;
    checks++;
    if (!ld_ready) failures++;
    frame();
    // change a few characters between frames
    for (int k = 0; k < 50; k++) begin
      automatic int a = $urandom % (ROWS * COLS);
      vram[a] = 6'($urandom % 35);
      ld_addr = 11'(a); ld_data = vram[a]; ld_write = 1;
      @(posedge clk); #1;
    end
    ld_write = 0;
    frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
