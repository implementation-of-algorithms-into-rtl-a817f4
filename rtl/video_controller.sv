// video_controller: character display scanner. A video RAM holds ROWS x COLS
// character codes; for every text row x, every pixel line z of the
// character cell and every column y it outputs the pattern row
//   out = disp[video[x][y]][z]
// read from the character ROM (char_rom), i.e. the loop nest
//   for x in 0..ROWS-1: for z in 0..LINES-1: for y in 0..COLS-1: emit.
// The loop counters are incremental registers and an eight-state Moore
// controller sequences them:
//   0  idle: the RAM may be loaded; leave when RUN is high
//   1  x = 0            5  if y == COLS: z++, go to 6; else go to 4
//   2  z = 0            6  if z == LINES: x++, go to 7; else go to 3
//   3  y = 0            7  if x == ROWS: go to 0; else go to 2
//   4  out = disp[video[x][y]][z]; y++
// OUT_VALID marks the cycle (state 4) in which OUT carries a pattern row;
// inside a line a row comes every two cycles. FRAME_DONE pulses when the
// last row has been scanned. The RAM is a single-port ram: in state 0 its
// address comes from the load port (LD_WRITE, LD_ADDR, LD_DATA, address =
// x*COLS + y), otherwise from the scan counters. LD_READY says the load
// port is open.
// The loop nest, the state table (transitions and actions of states 1-7)
// and the sizes (80 x 25 characters, 8 lines, 35 characters) are the
// document's. The document's loop runs y up to 80 inclusive and tests
// y == 81, which would read past an 80-column RAM; this design scans
// COLS = 80 columns. Waiting in state 0 for RUN (the document goes on at
// once), the load port and the address layout are this design's.
module video_controller #(
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
  output logic          frame_done,
  output logic [2:0]    state_no
);
  localparam int unsigned XW = $clog2(ROWS + 1);
  localparam int unsigned YW = $clog2(COLS + 1);
  localparam int unsigned ZW = $clog2(LINES + 1);

  typedef enum logic [2:0] {V0, V1, V2, V3, V4, V5, V6, V7} vstate_e;
  vstate_e state;

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [ZW-1:0] z;
  logic          c, d, e;
  logic [AW-1:0] scan_addr, ram_addr;
  logic [CW-1:0] code;
  logic [PW-1:0] pattern;

  assign c = (y == YW'(COLS));
  assign d = (z == ZW'(LINES));
  assign e = (x == XW'(ROWS));

  assign scan_addr = AW'(x * COLS) + AW'(y);
  assign ram_addr  = (state == V0) ? ld_addr : scan_addr;
  assign ld_ready  = (state == V0);

  ram #(.K(AW), .N(CW)) u_vram (
    .clk  (clk),
    .a    (ram_addr),
    .read (state == V4),
    .write(ld_write && state == V0),
    .din  (ld_data),
    .dout (code)
  );

  char_rom #(.NCHAR(NCHAR), .LINES(LINES), .PW(PW), .CW(CW), .LW($clog2(LINES))) u_rom (
    .code(code),
    .line(z[$clog2(LINES)-1:0]),
    .dout(pattern)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= V0;
      x     <= '0;
      y     <= '0;
      z     <= '0;
    end else begin
      unique case (state)
        V0: if (run) state <= V1;
        V1: begin x <= '0; state <= V2; end
        V2: begin z <= '0; state <= V3; end
        V3: begin y <= '0; state <= V4; end
        V4: begin y <= y + YW'(1); state <= V5; end
        V5: if (c) begin z <= z + ZW'(1); state <= V6; end
            else state <= V4;
        V6: if (d) begin x <= x + XW'(1); state <= V7; end
            else state <= V3;
        V7: state <= e ? V0 : V2;
        default: state <= V0;
      endcase
    end
  end

  assign out        = (state == V4) ? pattern : '0;
  assign out_valid  = (state == V4);
  assign frame_done = (state == V7) && e;
  assign state_no   = state;

  assert property (@(posedge clk) disable iff (rst) ld_write |-> state == V0);
endmodule
