// handshake_slave: receives words from an environment that runs on its
// own clock, using the four-phase data ready / data accepted handshake.
// The environment puts a word on DATA and raises DATA_READY; the system
// synchronises DATA_READY into a flag (two flip-flops), copies DATA,
// presents it on WORD with WORD_VALID for one cycle, and raises
// DATA_ACCEPTED. The environment then lowers DATA_READY, and the system
// lowers DATA_ACCEPTED once the flag has followed; only then may a new
// word start. A word is taken only while TAKE_EN is high, so the system
// can refuse transfers while it is busy. The protocol and the flag are the
// document's; the two-stage synchroniser, TAKE_EN and the word width are
// this design's.
module handshake_slave #(
  parameter int unsigned W = 17
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         data_ready,
  input  logic [W-1:0] data,
  output logic         data_accepted,
  input  logic         take_en,
  output logic [W-1:0] word,
  output logic         word_valid
);
  logic sync1, flag;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1         <= 1'b0;
      flag          <= 1'b0;
      data_accepted <= 1'b0;
      word          <= '0;
      word_valid    <= 1'b0;
    end else begin
      sync1      <= data_ready;
      flag       <= sync1;
      word_valid <= 1'b0;
      if (!data_accepted) begin
        if (flag && take_en) begin
          word          <= data;
          word_valid    <= 1'b1;
          data_accepted <= 1'b1;
        end
      end else if (!flag) begin
        data_accepted <= 1'b0;
      end
    end
  end
endmodule
