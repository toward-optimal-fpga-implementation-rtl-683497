// hhr_top_env.svh: body shared by the end-to-end testbenches of hhr_top. The
// including module defines the T_* network sizes and WATCHDOG and then
// instantiates hhr_top as dut with ports connected by name.

  localparam int S1 = T_IMG - T_M1 + 1, S2 = S1 / 2, S3 = S2 - T_M3 + 1, S4 = S3 / 2;
  localparam int S5 = S4 - T_M5 + 1, S6 = S5 / 2, S7 = S6 - T_M7 + 1;
  localparam int IMGW = 0;                       // image at word 0
  localparam int RESW = T_IMG * T_IMG + 8;       // scores after it
  localparam int GW   = RESW + T_N10 + 8;

  logic clk = 0, rst_n = 1, start = 0, busy, done;
  logic [31:0] img_base = IMGW * 4, res_base = RESW * 4, cycles;
  logic [3:0] step;
  logic wl_valid = 0;
  logic [2:0] wl_layer = '0;
  fx_t wl_data = '0;
  logic ar_valid, ar_ready, r_valid, r_ready, r_last;
  logic [31:0] ar_addr, r_data;
  logic [7:0] ar_len;
  logic aw_valid, aw_ready, w_valid, w_ready, w_last;
  logic [31:0] aw_addr, w_data;
  logic [7:0] aw_len;
  int unsigned stall_cycles, bursts, gerr;

  int checks = 0, failures = 0;
  int cyc = 0, t_start = 0;
  int step_len [12];
  int step_t0 = 0;
  logic [3:0] prev_step = '0;
  int steps_seen = 0;
  int fwd [4];
  logic [3:0] c_prev_we;
  logic [31:0] c_prev_wa [4];

  gmem_model #(.WORDS(GW)) u_gm (.*, .errors(gerr));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  // step durations, seen through the step port
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (start && !busy) begin
      t_start <= cyc; step_t0 <= cyc; prev_step <= '0; steps_seen <= 1;
    end else if (busy && step != prev_step) begin
      step_len[prev_step] <= cyc - step_t0;
      step_t0 <= cyc; prev_step <= step; steps_seen <= steps_seen + 1;
    end
    if (done) step_len[prev_step] <= cyc - step_t0;
  end

  // back-to-back updates of one partial sum in each convolution
  always_ff @(posedge clk) begin
    c_prev_we <= {dut.u_c7.out_we, dut.u_c5.out_we, dut.u_c3.out_we, dut.u_c1.out_we};
    c_prev_wa[0] <= 32'(dut.u_c1.out_waddr);
    c_prev_wa[1] <= 32'(dut.u_c3.out_waddr);
    c_prev_wa[2] <= 32'(dut.u_c5.out_waddr);
    c_prev_wa[3] <= 32'(dut.u_c7.out_waddr);
    if (dut.u_c1.out_we && c_prev_we[0] && 32'(dut.u_c1.out_waddr) == c_prev_wa[0]) fwd[0] <= fwd[0] + 1;
    if (dut.u_c3.out_we && c_prev_we[1] && 32'(dut.u_c3.out_waddr) == c_prev_wa[1]) fwd[1] <= fwd[1] + 1;
    if (dut.u_c5.out_we && c_prev_we[2] && 32'(dut.u_c5.out_waddr) == c_prev_wa[2]) fwd[2] <= fwd[2] + 1;
    if (dut.u_c7.out_we && c_prev_we[3] && 32'(dut.u_c7.out_waddr) == c_prev_wa[3]) fwd[3] <= fwd[3] + 1;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  function automatic int rnd_w(int fanin);
    int r = int'(1741.0 / $sqrt(real'(fanin)));   // about 1.7 / sqrt(fan-in)
    return int'($urandom_range(2 * r)) - r;
  endfunction

  task automatic stream(input int layer, const ref arr_t w, const ref arr_t b);
    for (int i = 0; i < w.size(); i++) begin
      @(negedge clk); wl_valid = 1; wl_layer = 3'(layer); wl_data = w[i];
    end
    for (int i = 0; i < b.size(); i++) begin
      @(negedge clk); wl_valid = 1; wl_layer = 3'(layer); wl_data = b[i];
    end
    @(negedge clk); wl_valid = 0;
  endtask

  arr_t x0, w1, b1, w3, b3, w5, b5, w7, b7, w9, b9, w10, b10;
  arr_t a1, a2, a3, a4, a5, a6, a7, a8, a9, a10;

  initial begin
    int exp_len [12];
    fwd = '{default: 0};
    x0 = new[T_IMG * T_IMG];
    for (int i = 0; i < T_IMG * T_IMG; i++) begin
      logic [31:0] f = float_of_frac($urandom_range(65535));
      u_gm.mem[IMGW + i] = f;
      x0[i] = fix_of_float(f);
    end
    for (int i = RESW; i < GW; i++) u_gm.mem[i] = 32'hFFFF_FFFF;
    w1 = new[T_N1 * T_M1 * T_M1];        b1 = new[T_N1];
    w3 = new[T_N3 * T_N1 * T_M3 * T_M3]; b3 = new[T_N3];
    w5 = new[T_N5 * T_N3 * T_M5 * T_M5]; b5 = new[T_N5];
    w7 = new[T_N7 * T_N5 * T_M7 * T_M7]; b7 = new[T_N7];
    w9 = new[T_N9 * T_N7];               b9 = new[T_N9];
    w10 = new[T_N10 * T_N9];             b10 = new[T_N10];
    foreach (w1[i]) w1[i] = rnd_w(T_M1 * T_M1);
    foreach (w3[i]) w3[i] = rnd_w(T_N1 * T_M3 * T_M3);
    foreach (w5[i]) w5[i] = rnd_w(T_N3 * T_M5 * T_M5);
    foreach (w7[i]) w7[i] = rnd_w(T_N5 * T_M7 * T_M7);
    foreach (w9[i]) w9[i] = rnd_w(T_N7);
    foreach (w10[i]) w10[i] = rnd_w(T_N9);
    foreach (b1[i]) b1[i] = int'($urandom_range(256)) - 128;
    foreach (b3[i]) b3[i] = int'($urandom_range(256)) - 128;
    foreach (b5[i]) b5[i] = int'($urandom_range(256)) - 128;
    foreach (b7[i]) b7[i] = int'($urandom_range(256)) - 128;
    foreach (b9[i]) b9[i] = int'($urandom_range(256)) - 128;
    foreach (b10[i]) b10[i] = int'($urandom_range(256)) - 128;

    // golden model
    clips = 0;
    a1 = conv(x0, 1, T_IMG, w1, b1, T_N1, T_M1);
    a2 = pool(a1, T_N1, S1);
    a3 = conv(a2, T_N1, S2, w3, b3, T_N3, T_M3);
    a4 = pool(a3, T_N3, S3);
    a5 = conv(a4, T_N3, S4, w5, b5, T_N5, T_M5);
    a6 = pool(a5, T_N5, S5);
    a7 = conv(a6, T_N5, S6, w7, b7, T_N7, T_M7);
    a8 = pool(a7, T_N7, S7);
    a9 = fc(a8, T_N7, w9, b9, T_N9, 1'b1);
    a10 = fc(a9, T_N9, w10, b10, T_N10, 1'b0);

    repeat (3) @(negedge clk);
    rst_n = 1;
    stream(0, w1, b1);
    stream(1, w3, b3);
    stream(2, w5, b5);
    stream(3, w7, b7);
    stream(4, w9, b9);
    stream(5, w10, b10);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(posedge clk);
    @(negedge clk);

    // scores in global memory
    for (int i = 0; i < T_N10; i++) begin
      checks++;
      if (u_gm.mem[RESW + i] !== 32'(a10[i]))
        fail($sformatf("score %0d got %0d exp %0d", i, int'(u_gm.mem[RESW + i]), a10[i]));
    end
    checks++;
    if (u_gm.mem[RESW + T_N10] !== 32'hFFFF_FFFF) fail("write past the score vector");

    // step latencies: iterations + 3 cycles for every layer step
    exp_len[1]  = T_N1 * T_M1 * T_M1 * S1 * S1 + 3;
    exp_len[2]  = T_N1 * S2 * S2 * 4 + 3;
    exp_len[3]  = T_N3 * T_M3 * T_M3 * S3 * S3 * (T_N1 / T_U3) + 3;
    exp_len[4]  = T_N3 * S4 * S4 * 4 + 3;
    exp_len[5]  = T_N5 * T_M5 * T_M5 * S5 * S5 * (T_N3 / T_U5) + 3;
    exp_len[6]  = T_N5 * S6 * S6 * 4 + 3;
    exp_len[7]  = T_N7 * T_M7 * T_M7 * S7 * S7 * (T_N5 / T_U7) + 3;
    exp_len[8]  = T_N7 * 1 * 1 * 4 + 3;
    exp_len[9]  = T_N9 * (T_N7 / T_U9) + 3;
    exp_len[10] = T_N10 * (T_N9 / T_U10) + 3;
    for (int s = 1; s <= 10; s++) begin
      checks++;
      if (step_len[s] != exp_len[s])
        fail($sformatf("step %0d took %0d cycles, expected %0d", s, step_len[s], exp_len[s]));
    end
    checks++;
    begin
      int total = 0;
      for (int s = 0; s < 12; s++) total += step_len[s];
      if (int'(cycles) != total) fail($sformatf("reported latency %0d, steps add to %0d", cycles, total));
    end

    // mechanisms
    $display("latency %0d cycles; bursts %0d; stall cycles %0d; forwarded sums %0d/%0d/%0d/%0d; ReLU clips %0d; steps %0d",
             cycles, bursts, stall_cycles, fwd[0], fwd[1], fwd[2], fwd[3], clips, steps_seen);
    checks += 6;
    if (gerr != 0) fail("global-memory bus protocol errors");
    if (stall_cycles == 0) fail("the bus never stalled");
    if (bursts < 3) fail("transfers did not need several bursts");
    if ((T_N1 > T_U3 && fwd[1] == 0) || (T_N3 > T_U5 && fwd[2] == 0) || (T_N5 > T_U7 && fwd[3] == 0))
      fail("partial sums were never forwarded in a multi-group convolution");
    if (clips == 0) fail("ReLU never clipped");
    if (steps_seen != 12) fail($sformatf("%0d steps seen", steps_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
