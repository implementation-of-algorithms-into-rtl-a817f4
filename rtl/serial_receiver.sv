// serial_receiver: receives packages of 5, 6, 7 or 8 bits sent serially,
// least significant bit first, and delivers each as an 8-bit parallel
// word whose unused upper bits are zero. The algorithm is two loops over
// an 8-bit shift register reg (each iteration: reg >>= 1, then reg[7] gets
// the new bit):
//   for (i = size; i > 0; i--)     shift in a data bit
//   for (i = 8 - size; i > 0; i--) shift in a 0
// The two loops cannot run in parallel but have the same shape, so both
// run on one shared for_module. A five-state Moore controller sequences
// them:
//   S0  size = input        (only after reset)
//   S1  i = size            (load the FOR module: init size, end 0)
//   S2  enable for1         (wait for its DONE, "ready")
//   S3  i = 8 - size
//   S4  enable for2         (wait for DONE), then back to S1
// While a loop is enabled, each iteration shifts once and answers the FOR
// module's ENABLE with NEXT in the same cycle, so one bit is taken every two
// cycles. DATA_TAKE is high in the cycle in which the DATA input is
// sampled; the sender must present bit k of the package in that cycle.
// PKT_VALID is high for one cycle, when PKT holds the finished package.
// LOOP_I shows the FOR module's counter i.
// A package takes 20 clock cycles whatever its size (2*size + 2*(8-size)
// loop cycles plus S1, S3 and the two DONE cycles). SIZE must be 5..8.
// The controller's states and transitions, the shared FOR module and the
// shift algorithm are the document's; the bit timing (DATA_TAKE) and
// PKT_VALID are this design's.
module serial_receiver (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] size_in,
  input  logic       data,
  output logic       data_take,
  output logic [7:0] pkt,
  output logic       pkt_valid,
  output logic [2:0] state_no,
  output logic [3:0] loop_i
);
  typedef enum logic [2:0] {S0, S1, S2, S3, S4} rx_state_e;
  rx_state_e state;

  logic [3:0] size_q, for_init, for_i;
  logic       for_load, for_start, for_en, for_done, zero_fill;

  assign for_load  = (state == S1) || (state == S3);
  assign for_init  = (state == S3) ? 4'd8 - size_q : size_q;
  assign for_start = (state == S2) || (state == S4);
  assign zero_fill = (state == S4);

  for_module #(.W(4)) u_for (
    .clk    (clk),
    .rst    (rst),
    .load   (for_load),
    .init   (for_init),
    .end_val(4'd0),
    .start  (for_start),
    .next   (for_en),      // the shift finishes in one cycle
    .i      (for_i),
    .enable (for_en),
    .done   (for_done)
  );

  register_nbit #(.N(4)) u_size (
    .clk  (clk),
    .load (state == S0),
    .reset(rst),
    .x    (size_in),
    .y    (size_q)
  );

  // Serial-in, parallel-out register
  always_ff @(posedge clk) begin
    if (rst)         pkt <= '0;
    else if (for_en) pkt <= {zero_fill ? 1'b0 : data, pkt[7:1]};
  end

  // Controller (state table of the method-2 implementation)
  always_ff @(posedge clk) begin
    if (rst) state <= S0;
    else begin
      unique case (state)
        S0: state <= S1;
        S1: state <= S2;
        S2: if (for_done) state <= S3;
        S3: state <= S4;
        S4: if (for_done) state <= S1;
        default: state <= S0;
      endcase
    end
  end

  assign data_take = for_en && !zero_fill;
  assign pkt_valid = (state == S4) && for_done;
  assign state_no  = state;
  assign loop_i    = for_i;

  assert property (@(posedge clk) disable iff (rst)
                   (state == S0) |=> (size_q >= 4'd5 && size_q <= 4'd8));
endmodule
