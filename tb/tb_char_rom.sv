// Testbench for char_rom: every code and line of the default placeholder
// font against its formula, codes past the last character read zero, and
// an instance with an overriding FONT returns the given rows.
module tb_char_rom;
  localparam int NCHAR = 35, LINES = 8, PW = 8;
  logic [5:0] code;
  logic [2:0] line;
  logic [PW-1:0] dout, dout2;
  int checks = 0, failures = 0;

  localparam logic [2*4*PW-1:0] SMALL_FONT = 64'h0123_4567_89AB_CDEF;

  char_rom #(.NCHAR(NCHAR), .LINES(LINES), .PW(PW)) dut (.code(code), .line(line), .dout(dout));
  char_rom #(.NCHAR(2), .LINES(4), .PW(PW), .CW(1), .LW(2), .FONT(SMALL_FONT)) dut2 (
    .code(code[0]), .line(line[1:0]), .dout(dout2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 64; c++)
      for (int l = 0; l < LINES; l++) begin
        code = 6'(c); line = 3'(l);
        #1; checks++;
        if (dout !== ((c < NCHAR) ? PW'((c * LINES + l) ^ 'h5A) : '0)) begin
          failures++; $display("code %0d line %0d: %h", c, l, dout);
        end
        if (c < 2 && l < 4) begin
          checks++;
          if (dout2 !== SMALL_FONT[(c * 4 + l) * PW +: PW]) begin failures++; $display("font override %0d %0d", c, l); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
