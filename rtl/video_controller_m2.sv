// video_controller_m2: the character display scanner of video_controller
// built the other way: each loop of
//   for x in 0..ROWS-1: for z in 0..LINES-1: for y in 0..COLS-1:
//     out = disp[video[x][y]][z]
// is its own FOR module (for_module), and the loops are nested by their
// enable / next / done signals instead of by one central state machine.
// Controller 1 runs the x loop (for1), whose body is "enable for2"; for2
// runs the z loop, whose body is "enable for3"; for3 runs the y loop, whose
// body is the output step. Each FOR module counts down from its loop
// length to 0, so the loop variables are x = ROWS - i1, z = LINES - i2,
// y = COLS - i3.
// Nesting needs synchronisation: an inner loop must be reloaded at the
// start of every iteration of the loop around it, and must report back
// when it has finished. For each inner level a flag ACT says that the
// inner loop is running: when the outer ENABLE goes high and ACT is low,
// the inner FOR module is loaded and ACT is set; the inner module runs
// (START = ACT); its DONE is the outer module's NEXT and clears ACT. The
// output step answers for3's ENABLE with NEXT in the same cycle.
// Interface and timing: as video_controller. The RAM can be loaded
// through LD_WRITE / LD_ADDR / LD_DATA while LD_READY (idle) is high; RUN
// starts a frame. OUT_VALID marks a pattern row in OUT, one every two
// cycles inside a line; FRAME_DONE pulses at the end of the frame. A frame
// takes 2 + ROWS*(3 + LINES*(3 + 2*COLS)) cycles from RUN.
// The three-controller structure (controller 1 enabling for2, for2
// enabling for3, for3 doing the output step) and the sizes are the
// document's; the ACT flags, the count-down indexing and the load port are
// this design's.
module video_controller_m2 #(
  parameter int unsigned COLS  = 80,
  parameter int unsigned ROWS  = 25,
  parameter int unsigned LINES = 8,
  parameter int unsigned NCHAR = 35,
  parameter int unsigned PW    = 8,
  parameter int unsigned AW    = $clog2(ROWS * COLS),
  parameter int unsigned CW    = $clog2(NCHAR)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          run,
  input  logic          ld_write,
  input  logic [AW-1:0] ld_addr,
  input  logic [CW-1:0] ld_data,
  output logic          ld_ready,
  output logic [PW-1:0] out,
  output logic          out_valid,
  output logic          frame_done
);
  localparam int unsigned XW = $clog2(ROWS + 1);
  localparam int unsigned YW = $clog2(COLS + 1);
  localparam int unsigned ZW = $clog2(LINES + 1);
  localparam int unsigned LW = $clog2(LINES);

  logic          act1, act2, act3;
  logic          en1, en2, en3, done1, done2, done3;
  logic [XW-1:0] i1, x;
  logic [ZW-1:0] i2;
  logic [LW-1:0] z;
  logic [YW-1:0] i3, y;
  logic [AW-1:0] ram_addr;
  logic [CW-1:0] code;
  logic [PW-1:0] pattern;

  // Controller 1 and the ACT flags of the two inner loops
  always_ff @(posedge clk) begin
    if (rst) begin
      act1 <= 1'b0;
      act2 <= 1'b0;
      act3 <= 1'b0;
    end else begin
      if (!act1 && run)  act1 <= 1'b1;
      else if (done1)    act1 <= 1'b0;
      if (en1 && !act2)  act2 <= 1'b1;
      else if (done2)    act2 <= 1'b0;
      if (en2 && !act3)  act3 <= 1'b1;
      else if (done3)    act3 <= 1'b0;
    end
  end

  for_module #(.W(XW)) u_for1 (
    .clk(clk), .rst(rst), .load(!act1 && run), .init(XW'(ROWS)), .end_val('0),
    .start(act1), .next(done2), .i(i1), .enable(en1), .done(done1)
  );

  for_module #(.W(ZW)) u_for2 (
    .clk(clk), .rst(rst), .load(en1 && !act2), .init(ZW'(LINES)), .end_val('0),
    .start(act2), .next(done3), .i(i2), .enable(en2), .done(done2)
  );

  for_module #(.W(YW)) u_for3 (
    .clk(clk), .rst(rst), .load(en2 && !act3), .init(YW'(COLS)), .end_val('0),
    .start(act3), .next(en3), .i(i3), .enable(en3), .done(done3)
  );

  assign x = XW'(ROWS) - i1;
  assign z = LW'(ZW'(LINES) - i2);
  assign y = YW'(COLS) - i3;

  assign ld_ready = !act1;
  assign ram_addr = act1 ? AW'(x * COLS) + AW'(y) : ld_addr;

  ram #(.K(AW), .N(CW)) u_vram (
    .clk  (clk),
    .a    (ram_addr),
    .read (en3),
    .write(ld_write && !act1),
    .din  (ld_data),
    .dout (code)
  );

  char_rom #(.NCHAR(NCHAR), .LINES(LINES), .PW(PW), .CW(CW), .LW(LW)) u_rom (
    .code(code),
    .line(z),
    .dout(pattern)
  );

  assign out        = en3 ? pattern : '0;
  assign out_valid  = en3;
  assign frame_done = done1;

  assert property (@(posedge clk) disable iff (rst) ld_write |-> !act1);
  assert property (@(posedge clk) disable iff (rst) en3 |-> (en2 && en1));
endmodule
