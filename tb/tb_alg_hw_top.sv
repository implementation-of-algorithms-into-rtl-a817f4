// End-to-end testbench for alg_hw_top at its default parameters. All
// example systems run at the same time:
//   abc  - quadratics solved (with and without real roots); counts
//          divisions and square roots done by the processor
//   abc2 - the two-ALU version solves the same quadratics at the same
//          time; counts steps in which both ALUs work
//   dp   - the four-line code sequence iterated against a reference
//   rx   - 6-bit serial packages (data loop and zero-fill loop)
//   rx1  - 8-bit serial packages on the compiled-program receiver (the
//          zero-fill loop has no iterations and must be skipped)
//   rx2  - second-algorithm receiver, size changed from package to package
//   vid  - the full 80 x 25 video RAM loaded over the four-phase
//          handshake, then one frame scanned and checked
//   vid2 - the nested-FOR-module video controller: RAM loaded directly,
//          one frame scanned and checked
//   wh/ts/on/dr - WHILE loop, CASE token switch, operational network
//          status, decremental register
// Each mechanism is counted; one that never happened counts as a failure.
module tb_alg_hw_top;
  localparam int W = 16;
  localparam int COLS = 80, ROWS = 25, LINES = 8;
  logic clk = 0, rst;
  int checks = 0, failures = 0;

  // abc
  logic abc_start, abc_done, abc_busy;
  logic signed [W-1:0] abc_a, abc_b, abc_c, abc_x1, abc_x2;
  logic [3:0] abc_step;
  logic abc2_done, abc2_busy;
  logic signed [W-1:0] abc2_x1, abc2_x2;
  logic [2:0] abc2_step;
  // dp
  logic dp_init, dp_run, dp_iter_done;
  logic [W-1:0] dp_i1, dp_i2, dp_i4, dp_i6, dp_i10;
  logic [7:0][W-1:0] dp_regs;
  logic [1:0] dp_line;
  // rx
  logic [3:0] rx_size, rx_loop_i;
  logic rx_data, rx_data_take, rx_pkt_valid;
  logic [7:0] rx_pkt;
  logic [2:0] rx_state;
  logic [3:0] rx1_size, rx1_loop_i;
  logic rx1_data, rx1_data_take, rx1_pkt_valid;
  logic [7:0] rx1_pkt;
  logic [2:0] rx1_state;
  logic [3:0] rx2_size, rx2_loop_i;
  logic rx2_data, rx2_data_take, rx2_pkt_valid;
  logic [7:0] rx2_pkt;
  logic [1:0] rx2_state;
  // video
  logic vid_run, vid_data_ready, vid_data_accepted, vid_out_valid, vid_frame_done;
  logic [16:0] vid_data;
  logic [7:0] vid_out;
  logic [2:0] vid_state;
  logic vid2_run, vid2_ld_write, vid2_ld_ready, vid2_out_valid, vid2_frame_done;
  logic [10:0] vid2_ld_addr;
  logic [5:0] vid2_ld_data;
  logic [7:0] vid2_out;
  // small blocks
  logic wh_start, wh_condition, wh_next, wh_busy;
  logic [3:0] wh_en;
  logic ts_token, ts_ack, ts_busy;
  logic [1:0] ts_sel;
  logic [3:0] ts_en;
  logic [1:0] on_z;
  logic [7:0] on_i, on_a, on_b;
  logic [2:0] on_x;
  logic dr_l, dr_d;
  logic [3:0] dr_in, dr_q;

  alg_hw_top dut (
    .clk(clk), .rst(rst),
    .abc_start(abc_start), .abc_a(abc_a), .abc_b(abc_b), .abc_c(abc_c),
    .abc_x1(abc_x1), .abc_x2(abc_x2), .abc_done(abc_done), .abc_busy(abc_busy), .abc_step(abc_step),
    .abc2_start(abc_start), .abc2_a(abc_a), .abc2_b(abc_b), .abc2_c(abc_c),
    .abc2_x1(abc2_x1), .abc2_x2(abc2_x2), .abc2_done(abc2_done), .abc2_busy(abc2_busy), .abc2_step(abc2_step),
    .dp_init(dp_init), .dp_run(dp_run), .dp_init_r1(dp_i1), .dp_init_r2(dp_i2),
    .dp_init_r4(dp_i4), .dp_init_r6(dp_i6), .dp_init_r10(dp_i10),
    .dp_regs(dp_regs), .dp_line(dp_line), .dp_iter_done(dp_iter_done),
    .rx_size(rx_size), .rx_data(rx_data), .rx_data_take(rx_data_take), .rx_pkt(rx_pkt),
    .rx_pkt_valid(rx_pkt_valid), .rx_state(rx_state), .rx_loop_i(rx_loop_i),
    .rx1_size(rx1_size), .rx1_data(rx1_data), .rx1_data_take(rx1_data_take), .rx1_pkt(rx1_pkt),
    .rx1_pkt_valid(rx1_pkt_valid), .rx1_state(rx1_state), .rx1_loop_i(rx1_loop_i),
    .rx2_size(rx2_size), .rx2_data(rx2_data), .rx2_data_take(rx2_data_take), .rx2_pkt(rx2_pkt),
    .rx2_pkt_valid(rx2_pkt_valid), .rx2_state(rx2_state), .rx2_loop_i(rx2_loop_i),
    .vid_run(vid_run), .vid_data_ready(vid_data_ready), .vid_data(vid_data),
    .vid_data_accepted(vid_data_accepted), .vid_out(vid_out), .vid_out_valid(vid_out_valid),
    .vid_frame_done(vid_frame_done), .vid_state(vid_state),
    .vid2_run(vid2_run), .vid2_ld_write(vid2_ld_write), .vid2_ld_addr(vid2_ld_addr),
    .vid2_ld_data(vid2_ld_data), .vid2_ld_ready(vid2_ld_ready), .vid2_out(vid2_out),
    .vid2_out_valid(vid2_out_valid), .vid2_frame_done(vid2_frame_done),
    .wh_start(wh_start), .wh_condition(wh_condition), .wh_en(wh_en), .wh_next(wh_next), .wh_busy(wh_busy),
    .ts_token(ts_token), .ts_sel(ts_sel), .ts_ack(ts_ack), .ts_en(ts_en), .ts_busy(ts_busy),
    .on_z(on_z), .on_i(on_i), .on_a(on_a), .on_b(on_b), .on_x(on_x),
    .dr_l(dr_l), .dr_d(dr_d), .dr_in(dr_in), .dr_q(dr_q)
  );

  always #5 clk = ~clk;

  // mechanism counters
  int n_abc_solved, n_abc_div, n_abc_sqrt, n_abc_negdisc, n_abc2_solved, n_abc2_parallel;
  int n_dp_iter, n_rx_pkt, n_rx_zero_fill, n_rx1_pkt, n_rx1_empty_loop, n_rx2_pkt, n_rx2_size [4], n_vid_words, n_vid_refused, n_vid_rows, n_vid_frames, n_vid2_rows, n_vid2_frames;
  int n_wh_body, n_wh_exit, n_ts_branch [4], n_on_status [3], n_dr_load, n_dr_dec;

  task automatic report();
    int missing = 0;
    int counts [$] = '{n_abc_solved, n_abc_div, n_abc_sqrt, n_abc_negdisc, n_abc2_solved, n_abc2_parallel, n_dp_iter, n_rx_pkt,
                       n_rx_zero_fill, n_rx1_pkt, n_rx1_empty_loop, n_rx2_pkt,
                       n_rx2_size[0], n_rx2_size[1], n_rx2_size[2], n_rx2_size[3], n_vid_words, n_vid_refused, n_vid_rows, n_vid_frames,
                       n_vid2_rows, n_vid2_frames,
                       n_wh_body, n_wh_exit, n_ts_branch[0], n_ts_branch[1], n_ts_branch[2],
                       n_ts_branch[3], n_on_status[0], n_on_status[1], n_on_status[2],
                       n_dr_load, n_dr_dec};
    $display("abc: solved %0d, divisions %0d, square roots %0d, no real roots %0d",
             n_abc_solved, n_abc_div, n_abc_sqrt, n_abc_negdisc);
    $display("abc2: solved %0d, steps with both ALUs started %0d", n_abc2_solved, n_abc2_parallel);
    $display("dp: iterations %0d; rx: packages %0d, zero-fill shifts %0d", n_dp_iter, n_rx_pkt, n_rx_zero_fill);
    $display("rx1: packages %0d, skipped empty zero-fill loops %0d", n_rx1_pkt, n_rx1_empty_loop);
    $display("rx2: packages %0d, of size 5/6/7/8: %0d %0d %0d %0d", n_rx2_pkt,
             n_rx2_size[0], n_rx2_size[1], n_rx2_size[2], n_rx2_size[3]);
    $display("video: words loaded %0d, refused while running %0d, rows %0d, frames %0d",
             n_vid_words, n_vid_refused, n_vid_rows, n_vid_frames);
    $display("video (nested FOR modules): rows %0d, frames %0d", n_vid2_rows, n_vid2_frames);
    $display("while: body %0d exits %0d; case: %0d %0d %0d %0d; status X1 %0d X2 %0d X3 %0d; decr: load %0d dec %0d",
             n_wh_body, n_wh_exit, n_ts_branch[0], n_ts_branch[1], n_ts_branch[2], n_ts_branch[3],
             n_on_status[0], n_on_status[1], n_on_status[2], n_dr_load, n_dr_dec);
    foreach (counts[k]) begin
      checks++;
      if (counts[k] == 0) begin failures++; missing++; end
    end
    if (missing != 0) $display("%0d mechanisms never happened", missing);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
  end

  function automatic int isqrt(input int v);
    int r = 0;
    if (v <= 0) return 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  // ---------------- abc processor ----------------
  always @(posedge clk) if (!rst && dut.u_abc.u_alu.done && dut.u_abc.state == 2'd2) begin
    if (dut.u_abc.cw.op == alg_pkg::OP_DIV)  n_abc_div++;
    if (dut.u_abc.cw.op == alg_pkg::OP_SQRT) n_abc_sqrt++;
  end

  always @(posedge clk) if (!rst && dut.u_abc2.start1 && dut.u_abc2.start2) n_abc2_parallel++;

  task automatic abc_test();
    for (int k = 0; k < 40; k++) begin
      int av, bv, cv, d, s;
      av = 1 + $urandom % 6; if (k % 3 == 0) av = -av;
      bv = int'($urandom % 61) - 30; cv = int'($urandom % 61) - 30;
      d = bv * bv - 4 * av * cv; s = isqrt(d);
      abc_a = W'(av); abc_b = W'(bv); abc_c = W'(cv); abc_start = 1;
      @(posedge clk); #1;
      abc_start = 0;
      fork
        begin
          wait (abc2_done); #1;
          checks += 2;
          if (abc2_x1 !== W'((s - bv) / (2 * av))) begin failures++; $display("abc2 x1 %0d", abc2_x1); end
          if (abc2_x2 !== W'((-s - bv) / (2 * av))) begin failures++; $display("abc2 x2 %0d", abc2_x2); end
          n_abc2_solved++;
        end
      join_none
      wait (abc_done); #1;
      checks += 2;
      if (abc_x1 !== W'((s - bv) / (2 * av))) begin failures++; $display("abc x1 %0d", abc_x1); end
      if (abc_x2 !== W'((-s - bv) / (2 * av))) begin failures++; $display("abc x2 %0d", abc_x2); end
      n_abc_solved++;
      if (d < 0) n_abc_negdisc++;
      @(posedge clk); #1;
    end
  endtask

  // ---------------- data unit of the code sequence ----------------
  task automatic dp_test();
    logic [W-1:0] v1, v2, v3, v4, v5, v6, v7, v8, v9, v10, v11, v12;
    v1 = W'($urandom); v2 = W'($urandom); v4 = 3; v6 = W'($urandom); v10 = W'($urandom);
    dp_i1 = v1; dp_i2 = v2; dp_i4 = v4; dp_i6 = v6; dp_i10 = v10; dp_init = 1;
    @(posedge clk); #1;
    dp_init = 0; dp_run = 1;
    for (int n = 0; n < 50; n++) begin
      v3 = v1 + v2; v12 = v1; v5 = v3 - v4; v7 = W'(v3 * v6);
      v8 = v3 + v5; v9 = v1 + v7; v11 = (v5 == 0) ? '1 : v10 / v5;
      v1 = v11 & v8; v2 = v12 | v9;
      wait (dp_iter_done);
      @(posedge clk); #1;
      checks += 2;
      if (dp_regs[0] !== v1) begin failures++; $display("dp R1 %h want %h", dp_regs[0], v1); end
      if (dp_regs[1] !== v2) begin failures++; $display("dp R2 %h want %h", dp_regs[1], v2); end
      n_dp_iter++;
    end
    dp_run = 0;
  endtask

  // ---------------- serial receiver (size 6) ----------------
  logic [7:0] rx_cur;
  int rx_bit;
  logic [7:0] rx_sent [$];
  assign rx_data = rx_cur[rx_bit];
  always @(posedge clk) begin
    if (rst) begin rx_bit <= 0; rx_cur <= 8'h2D; end
    else if (rx_data_take) begin
      if (rx_bit == 5) begin
        rx_sent.push_back(rx_cur & 8'h3F);
        rx_cur <= 8'($urandom); rx_bit <= 0;
      end else rx_bit <= rx_bit + 1;
    end
    if (!rst && dut.u_rx.zero_fill && dut.u_rx.for_en) n_rx_zero_fill++;
    if (!rst && rx_pkt_valid) begin
      logic [7:0] want;
      #1;
      want = rx_sent.pop_front();
      checks++;
      if (rx_pkt !== want) begin failures++; $display("rx %h want %h", rx_pkt, want); end
      n_rx_pkt++;
    end
  end

  // ---------------- serial receiver, compiled program (size 8) ----------------
  logic [7:0] rx1_cur;
  int rx1_bit;
  logic [7:0] rx1_sent [$];
  assign rx1_data = rx1_cur[rx1_bit];
  always @(posedge clk) begin
    if (rst) begin rx1_bit <= 0; rx1_cur <= 8'hB4; end
    else if (rx1_data_take) begin
      if (rx1_bit == 7) begin
        rx1_sent.push_back(rx1_cur);
        rx1_cur <= 8'($urandom); rx1_bit <= 0;
      end else rx1_bit <= rx1_bit + 1;
    end
    if (!rst && rx1_state == 3'd6 && rx1_loop_i == 4'd0) n_rx1_empty_loop++;
    if (!rst && rx1_pkt_valid) begin
      logic [7:0] want;
      #1;
      want = rx1_sent.pop_front();
      checks++;
      if (rx1_pkt !== want) begin failures++; $display("rx1 %h want %h", rx1_pkt, want); end
      n_rx1_pkt++;
    end
  end

  // ---------------- serial receiver, second algorithm (size varies) ----------------
  // Each frame has eight samples; the package is in the last rx2_size ones.
  logic [7:0] rx2_frame;
  int rx2_sample;
  logic [7:0] rx2_sent [$];
  assign rx2_data = rx2_frame[rx2_sample];
  task automatic rx2_new_frame();
    int sz;
    logic [7:0] v;
    sz = 5 + int'($urandom_range(3));
    v = 8'($urandom) & 8'((1 << sz) - 1);
    rx2_size = 4'(sz);
    rx2_frame = (v << (8 - sz)) | (8'($urandom) & 8'((1 << (8 - sz)) - 1));
    rx2_sent.push_back(v);
    n_rx2_size[sz - 5]++;
  endtask
  always @(posedge clk) begin
    if (rst) rx2_sample <= 0;
    else if (rx2_data_take) begin
      if (rx2_sample == 7) begin
        rx2_sample <= 0;
        #1 rx2_new_frame();
      end else rx2_sample <= rx2_sample + 1;
    end
  end
  always @(posedge clk) begin
    if (!rst && rx2_pkt_valid) begin
      logic [7:0] want;
      #1;
      want = rx2_sent.pop_front();
      checks++;
      if (rx2_pkt !== want) begin failures++; $display("rx2 %h want %h", rx2_pkt, want); end
      n_rx2_pkt++;
    end
  end

  // ---------------- video controller loaded over the handshake ----------------
  logic [5:0] vram [ROWS*COLS];
  task automatic hs_send(input logic [16:0] w);
    vid_data = w;
    @(posedge clk); #1;
    vid_data_ready = 1;
    wait (vid_data_accepted); #1;
    vid_data_ready = 0;
    wait (!vid_data_accepted); #1;
  endtask

  task automatic vid_test();
    int n = 0, bad = 0, frames = 0, t;
    for (int k = 0; k < ROWS * COLS; k++) begin
      vram[k] = 6'($urandom % 35);
      hs_send({11'(k), vram[k]});
      n_vid_words++;
    end
    // start the display and at once offer a word, which must wait
    vid_run = 1;
    vid_data = {11'(0), 6'd1};
    vid_data_ready = 1;
    @(posedge clk); #1;
    vid_run = 0;
    t = 0;
    while (vid_state != 0) begin
      if (vid_out_valid) begin
        int x = n / (LINES * COLS), z = (n / COLS) % LINES, y = n % COLS;
        if (vid_out !== 8'((int'(vram[x * COLS + y]) * LINES + z) ^ 'h5A)) bad++;
        n++;
      end
      if (vid_frame_done) frames++;
      if (t == 20) begin
        checks++;
        if (vid_data_accepted) failures++; else n_vid_refused++;
      end
      t++;
      @(posedge clk); #1;
    end
    checks += 2;
    if (bad != 0) begin failures++; $display("%0d wrong video rows", bad); end
    if (n != ROWS * LINES * COLS) begin failures++; $display("%0d video rows", n); end
    n_vid_rows = n; n_vid_frames = frames;
    // the refused word goes in once the display is idle again
    wait (vid_data_accepted); #1;
    vid_data_ready = 0;
    wait (!vid_data_accepted); #1;
    vram[0] = 6'd1;
    checks++;
    if (dut.u_vid.u_vram.mem[0] !== 6'd1) failures++;
  endtask

  // ---------------- small control blocks ----------------
  logic [5:0] vram2 [ROWS*COLS];
  task automatic vid2_test();
    int n = 0, bad = 0, frames = 0;
    for (int k = 0; k < ROWS * COLS; k++) begin
      vram2[k] = 6'($urandom % 35);
      vid2_ld_addr = 11'(k); vid2_ld_data = vram2[k]; vid2_ld_write = 1;
      @(posedge clk); #1;
    end
    vid2_ld_write = 0;
    vid2_run = 1;
    @(posedge clk); #1;
    vid2_run = 0;
    while (!vid2_ld_ready) begin
      if (vid2_out_valid) begin
        int x = n / (LINES * COLS), z = (n / COLS) % LINES, y = n % COLS;
        if (vid2_out !== 8'((int'(vram2[x * COLS + y]) * LINES + z) ^ 'h5A)) bad++;
        n++;
      end
      if (vid2_frame_done) frames++;
      @(posedge clk); #1;
    end
    checks += 3;
    if (bad != 0) begin failures++; $display("%0d wrong rows (nested FOR video)", bad); end
    if (n != ROWS * LINES * COLS) begin failures++; $display("%0d rows (nested FOR video)", n); end
    if (frames != 1) begin failures++; $display("%0d frame_done pulses (nested FOR video)", frames); end
    n_vid2_rows = n; n_vid2_frames = frames;
  endtask

  task automatic small_test();
    logic [7:0] ma, mb;
    logic [3:0] mq;
    // WHILE: exit after 3 body passes
    begin
      int passes = 0;
      wh_condition = 0; wh_start = 1;
      @(posedge clk); #1;
      wh_start = 0;
      while (!wh_next) begin
        if (wh_en[3]) begin passes++; n_wh_body++; end
        wh_condition = (passes == 3);
        @(posedge clk); #1;
      end
      n_wh_exit++;
      checks++;
      if (passes != 3) failures++;
    end
    // CASE token switch, every branch
    for (int k = 0; k < 8; k++) begin
      ts_token = 1; ts_sel = 2'(k);
      @(posedge clk); #1;
      ts_token = 0;
      checks++;
      if (ts_en !== 4'(1 << (k % 4))) failures++; else n_ts_branch[k % 4]++;
      ts_ack = 1;
      @(posedge clk); #1;
      ts_ack = 0;
    end
    // operational network
    ma = 0; mb = 0;
    for (int k = 0; k < 60; k++) begin
      on_z = 2'(1 + $urandom % 2); on_i = 8'($urandom % 4);
      @(posedge clk); #1;
      if (on_z == 1) begin mb = ma; ma = on_i; end
      else begin logic [7:0] t; t = ma; ma = mb; mb = t - mb; end
      checks++;
      if (on_a !== ma || on_b !== mb || on_x !== {ma > mb, ma == mb, ma < mb}) failures++;
      if (ma < mb) n_on_status[0]++; else if (ma == mb) n_on_status[1]++; else n_on_status[2]++;
    end
    on_z = 0;
    // decremental register
    dr_l = 1; dr_d = 0; dr_in = 4'd11;
    @(posedge clk); #1;
    n_dr_load++; mq = 4'd11;
    dr_l = 0; dr_d = 1;
    repeat (7) begin @(posedge clk); #1; mq--; n_dr_dec++; end
    dr_d = 0;
    checks++;
    if (dr_q !== mq) failures++;
  endtask

  initial begin
    rst = 1;
    abc_start = 0; abc_a = '0; abc_b = '0; abc_c = '0;
    dp_init = 0; dp_run = 0; dp_i1 = '0; dp_i2 = '0; dp_i4 = '0; dp_i6 = '0; dp_i10 = '0;
    rx_size = 4'd6;
    rx1_size = 4'd8;
    rx2_new_frame();
    vid_run = 0; vid_data_ready = 0; vid_data = '0;
    vid2_run = 0; vid2_ld_write = 0; vid2_ld_addr = '0; vid2_ld_data = '0;
    wh_start = 0; wh_condition = 0; ts_token = 0; ts_sel = 0; ts_ack = 0;
    on_z = 0; on_i = 0; dr_l = 0; dr_d = 0; dr_in = 0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    fork
      abc_test();
      dp_test();
      vid_test();
      vid2_test();
      small_test();
    join
    report();
  end
endmodule
