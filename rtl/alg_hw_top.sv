// alg_hw_top: the example systems of the algorithm-to-hardware method,
// side by side. Each is a data unit steered by its own controller, and
// each has its own ports; they share only clock and reset.
//   abc_*   abc_processor: roots of a*x^2 + b*x + c with one ALU and four
//           registers, twelve-step control table.
//   abc2_*  abc_processor2: the same formula with two ALUs and five
//           registers in seven steps.
//   dp_*    dp_example: allocated data unit of the four-line looping code
//           sequence (three ALUs, four buses, eight registers).
//   rx_*    serial_receiver: 5..8-bit serial packages to parallel words,
//           two loops on one shared FOR module.
//   rx1_*   serial_receiver_m1: the same receiver as a compiled eight-state
//           program on a counter and one comparator.
//   rx2_*   serial_receiver_alg2: receiver of the second algorithm (eight
//           steps per package, insertion point set by the size).
//   vid_*   video_controller: 80 x 25 character display scanner. Its video
//           RAM is loaded through a handshake_slave (four-phase data ready /
//           data accepted) while the display is idle; the word carries
//           {RAM address, character code}.
//   vid2_*  video_controller_m2: the same scanner built from three nested
//           FOR modules, with its own video RAM and a direct load port.
//   wh_*    while_module: a WHILE loop token controller (4-step body).
//   ts_*    token_switch: CASE / if-then-else token routing (4 ways).
//   on_*    ops_network: two-register operational network with status.
//   dr_*    decr_reg_moore: decremental register.
// No logic is added here beyond the wiring of the load port.
module alg_hw_top #(
  parameter int unsigned ABC_W = 16,
  parameter int unsigned DP_W  = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  // abc formula processor
  input  logic                    abc_start,
  input  logic signed [ABC_W-1:0] abc_a,
  input  logic signed [ABC_W-1:0] abc_b,
  input  logic signed [ABC_W-1:0] abc_c,
  output logic signed [ABC_W-1:0] abc_x1,
  output logic signed [ABC_W-1:0] abc_x2,
  output logic                    abc_done,
  output logic                    abc_busy,
  output logic [3:0]              abc_step,
  // abc formula, two-ALU version
  input  logic                    abc2_start,
  input  logic signed [ABC_W-1:0] abc2_a,
  input  logic signed [ABC_W-1:0] abc2_b,
  input  logic signed [ABC_W-1:0] abc2_c,
  output logic signed [ABC_W-1:0] abc2_x1,
  output logic signed [ABC_W-1:0] abc2_x2,
  output logic                    abc2_done,
  output logic                    abc2_busy,
  output logic [2:0]              abc2_step,
  // code-sequence data unit
  input  logic                    dp_init,
  input  logic                    dp_run,
  input  logic [DP_W-1:0]         dp_init_r1,
  input  logic [DP_W-1:0]         dp_init_r2,
  input  logic [DP_W-1:0]         dp_init_r4,
  input  logic [DP_W-1:0]         dp_init_r6,
  input  logic [DP_W-1:0]         dp_init_r10,
  output logic [7:0][DP_W-1:0]    dp_regs,
  output logic [1:0]              dp_line,
  output logic                    dp_iter_done,
  // serial receiver
  input  logic [3:0]              rx_size,
  input  logic                    rx_data,
  output logic                    rx_data_take,
  output logic [7:0]              rx_pkt,
  output logic                    rx_pkt_valid,
  output logic [2:0]              rx_state,
  output logic [3:0]              rx_loop_i,
  // serial receiver, compiled-program version
  input  logic [3:0]              rx1_size,
  input  logic                    rx1_data,
  output logic                    rx1_data_take,
  output logic [7:0]              rx1_pkt,
  output logic                    rx1_pkt_valid,
  output logic [2:0]              rx1_state,
  output logic [3:0]              rx1_loop_i,
  // serial receiver, second algorithm
  input  logic [3:0]              rx2_size,
  input  logic                    rx2_data,
  output logic                    rx2_data_take,
  output logic [7:0]              rx2_pkt,
  output logic                    rx2_pkt_valid,
  output logic [1:0]              rx2_state,
  output logic [3:0]              rx2_loop_i,
  // video controller and its load handshake
  input  logic                    vid_run,
  input  logic                    vid_data_ready,
  input  logic [16:0]             vid_data,          // {address[16:6], code[5:0]}
  output logic                    vid_data_accepted,
  output logic [7:0]              vid_out,
  output logic                    vid_out_valid,
  output logic                    vid_frame_done,
  output logic [2:0]              vid_state,
  // video controller, nested FOR modules
  input  logic                    vid2_run,
  input  logic                    vid2_ld_write,
  input  logic [10:0]             vid2_ld_addr,
  input  logic [5:0]              vid2_ld_data,
  output logic                    vid2_ld_ready,
  output logic [7:0]              vid2_out,
  output logic                    vid2_out_valid,
  output logic                    vid2_frame_done,
  // WHILE module
  input  logic                    wh_start,
  input  logic                    wh_condition,
  output logic [3:0]              wh_en,
  output logic                    wh_next,
  output logic                    wh_busy,
  // token switch
  input  logic                    ts_token,
  input  logic [1:0]              ts_sel,
  input  logic                    ts_ack,
  output logic [3:0]              ts_en,
  output logic                    ts_busy,
  // operational network
  input  logic [1:0]              on_z,
  input  logic [7:0]              on_i,
  output logic [7:0]              on_a,
  output logic [7:0]              on_b,
  output logic [2:0]              on_x,
  // decremental register
  input  logic                    dr_l,
  input  logic                    dr_d,
  input  logic [3:0]              dr_in,
  output logic [3:0]              dr_q
);
  abc_processor #(.W(ABC_W)) u_abc (
    .clk(clk), .rst(rst), .start(abc_start),
    .a_in(abc_a), .b_in(abc_b), .c_in(abc_c),
    .x1(abc_x1), .x2(abc_x2), .done(abc_done), .busy(abc_busy), .step_no(abc_step)
  );

  abc_processor2 #(.W(ABC_W)) u_abc2 (
    .clk(clk), .rst(rst), .start(abc2_start),
    .a_in(abc2_a), .b_in(abc2_b), .c_in(abc2_c),
    .x1(abc2_x1), .x2(abc2_x2), .done(abc2_done), .busy(abc2_busy), .step_no(abc2_step)
  );

  dp_example #(.W(DP_W)) u_dp (
    .clk(clk), .rst(rst), .init(dp_init), .run(dp_run),
    .init_r1(dp_init_r1), .init_r2(dp_init_r2), .init_r4(dp_init_r4),
    .init_r6(dp_init_r6), .init_r10(dp_init_r10),
    .regs(dp_regs), .line(dp_line), .iter_done(dp_iter_done)
  );

  serial_receiver u_rx (
    .clk(clk), .rst(rst), .size_in(rx_size), .data(rx_data),
    .data_take(rx_data_take), .pkt(rx_pkt), .pkt_valid(rx_pkt_valid),
    .state_no(rx_state), .loop_i(rx_loop_i)
  );

  serial_receiver_m1 u_rx1 (
    .clk(clk), .rst(rst), .size_in(rx1_size), .data(rx1_data),
    .data_take(rx1_data_take), .pkt(rx1_pkt), .pkt_valid(rx1_pkt_valid),
    .state_no(rx1_state), .loop_i(rx1_loop_i)
  );

  serial_receiver_alg2 u_rx2 (
    .clk(clk), .rst(rst), .size_in(rx2_size), .data(rx2_data),
    .data_take(rx2_data_take), .pkt(rx2_pkt), .pkt_valid(rx2_pkt_valid),
    .state_no(rx2_state), .loop_i(rx2_loop_i)
  );

  logic        vid_ld_ready, vid_word_valid;
  logic [16:0] vid_word;

  handshake_slave #(.W(17)) u_hs (
    .clk(clk), .rst(rst),
    .data_ready(vid_data_ready), .data(vid_data), .data_accepted(vid_data_accepted),
    .take_en(vid_ld_ready & ~vid_run), .word(vid_word), .word_valid(vid_word_valid)
  );

  video_controller u_vid (
    .clk(clk), .rst(rst), .run(vid_run),
    .ld_write(vid_word_valid), .ld_addr(vid_word[16:6]), .ld_data(vid_word[5:0]),
    .ld_ready(vid_ld_ready),
    .out(vid_out), .out_valid(vid_out_valid), .frame_done(vid_frame_done),
    .state_no(vid_state)
  );

  video_controller_m2 u_vid2 (
    .clk(clk), .rst(rst), .run(vid2_run),
    .ld_write(vid2_ld_write), .ld_addr(vid2_ld_addr), .ld_data(vid2_ld_data),
    .ld_ready(vid2_ld_ready),
    .out(vid2_out), .out_valid(vid2_out_valid), .frame_done(vid2_frame_done)
  );

  while_module #(.NSTEPS(4)) u_while (
    .clk(clk), .rst(rst), .start(wh_start), .condition(wh_condition),
    .en(wh_en), .next(wh_next), .busy(wh_busy)
  );

  token_switch #(.N(4)) u_tswitch (
    .clk(clk), .rst(rst), .token_in(ts_token), .sel(ts_sel), .ack(ts_ack),
    .en(ts_en), .busy(ts_busy)
  );

  ops_network #(.W(8)) u_ops (
    .clk(clk), .rst(rst), .z(on_z), .i(on_i), .a(on_a), .b(on_b), .x(on_x)
  );

  decr_reg_moore #(.W(4)) u_decr (
    .clk(clk), .l(dr_l), .d(dr_d), .d_in(dr_in), .q(dr_q)
  );
endmodule
