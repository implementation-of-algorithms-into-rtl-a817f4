// char_rom: character-pattern ROM of the video controller. It holds LINES
// rows of PW pixels for each of NCHAR characters; DOUT is row LINE of
// character CODE (combinational read). The contents come from parameter
// FONT, laid out as FONT[(code*LINES + line)*PW +: PW]. The real glyph
// shapes are not part of this design: the default FONT is a placeholder
// whose row is the low PW bits of (code*LINES + line) XOR 'h5A, so that
// a display can be checked against a formula. Codes at or above NCHAR read as zero.
module char_rom #(
  parameter int unsigned NCHAR = 35,
  parameter int unsigned LINES = 8,
  parameter int unsigned PW    = 8,
  parameter int unsigned CW    = $clog2(NCHAR),
  parameter int unsigned LW    = $clog2(LINES),
  parameter logic [NCHAR*LINES*PW-1:0] FONT = default_font()
) (
  input  logic [CW-1:0] code,
  input  logic [LW-1:0] line,
  output logic [PW-1:0] dout
);
  function automatic logic [NCHAR*LINES*PW-1:0] default_font();
    logic [NCHAR*LINES*PW-1:0] f;
    f = '0;
    for (int c = 0; c < NCHAR; c++)
      for (int l = 0; l < LINES; l++)
        f[(c*LINES + l)*PW +: PW] = PW'((c * LINES + l) ^ 'h5A);
    return f;
  endfunction

  always_comb begin
    if (int'(code) < NCHAR) dout = FONT[(int'(code)*LINES + int'(line))*PW +: PW];
    else                    dout = '0;
  end
endmodule
