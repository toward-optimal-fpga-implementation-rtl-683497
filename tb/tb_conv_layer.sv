// tb_conv_layer: runs a 4-input, 3-output, 7x7 input, 3x3 mask convolution with
// the input-plane loop unrolled twice (two plane groups, so partial sums are
// forwarded between back-to-back cycles). Weights and biases go in through the
// load stream; the buffers are modelled here. Every output is compared with a
// direct evaluation of the convolution equation, and the run must take exactly
// NOUT*MSK*MSK*OSZ*OSZ*(NIN/U) + 2 cycles from the clock edge that takes start to the one that
// sees done. The layer is run twice to check
// that a second start reuses the loaded weights.
module tb_conv_layer;
  import hhr_pkg::*;
  localparam int NIN = 4, NOUT = 3, ISZ = 7, MSK = 3, U = 2;
  localparam int OSZ = ISZ - MSK + 1, CH = NIN / U;
  localparam int IAW = idx_w(CH * ISZ * ISZ), OAW = idx_w(NOUT * OSZ * OSZ);

  logic clk = 0, rst_n = 1, start = 0, busy, done;
  logic wl_valid = 0;
  fx_t  wl_data = '0;
  logic in_re, out_re, out_we;
  logic [IAW-1:0] in_addr;
  logic [OAW-1:0] out_raddr, out_waddr;
  fx_t in_rdata [U];
  fx_t out_rdata, out_wdata;
  logic prev_we = 0;
  logic [OAW-1:0] prev_waddr = '0;

  fx_t x   [NIN][ISZ][ISZ];
  fx_t w   [NOUT][NIN][MSK][MSK];
  fx_t th  [NOUT];
  fx_t inmem [U][CH*ISZ*ISZ];
  fx_t outmem [NOUT*OSZ*OSZ];
  int checks = 0, failures = 0, busy_cycles = 0, cyc = 0, t0 = 0, t1 = 0, fwd_events = 0, relu_clips = 0;

  conv_layer #(.NIN(NIN), .NOUT(NOUT), .ISZ(ISZ), .MSK(MSK), .U(U)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  // buffer models: synchronous read, read-first
  always_ff @(posedge clk) begin
    if (in_re) for (int k = 0; k < U; k++) in_rdata[k] <= inmem[k][in_addr];
    if (out_re) out_rdata <= outmem[out_raddr];
    if (out_we) outmem[out_waddr] <= out_wdata;
    cyc <= cyc + 1;
    if (start && !busy) t0 <= cyc;
    if (done) t1 <= cyc;
    // back-to-back updates of one partial sum need the forwarding path
    prev_we <= out_we;
    prev_waddr <= out_waddr;
    if (out_we && prev_we && out_waddr == prev_waddr) fwd_events <= fwd_events + 1;
  end

  function automatic fx_t mul(fx_t a, fx_t b);
    longint pr = longint'(a) * longint'(b);
    return fx_t'(pr >>> FRAC);
  endfunction

  task automatic run_and_check(input int pass);
    int exp_cycles;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(posedge clk);
    @(negedge clk);
    busy_cycles = t1 - t0;
    exp_cycles = NOUT * MSK * MSK * OSZ * OSZ * CH + 2;
    checks++;
    if (busy_cycles != exp_cycles) begin
      failures++;
      $display("FAIL pass %0d: %0d busy cycles, expected %0d", pass, busy_cycles, exp_cycles);
    end
    for (int p = 0; p < NOUT; p++)
      for (int i = 0; i < OSZ; i++)
        for (int j = 0; j < OSZ; j++) begin
          fx_t s = th[p];
          for (int q = 0; q < NIN; q++)
            for (int u = 0; u < MSK; u++)
              for (int v = 0; v < MSK; v++)
                s += mul(w[p][q][u][v], x[q][i + u][j + v]);
          if (s < 0) begin s = 0; if (pass == 0) relu_clips++; end
          checks++;
          if (outmem[p * OSZ * OSZ + i * OSZ + j] !== s) begin
            failures++;
            $display("FAIL pass %0d out[%0d][%0d][%0d] got %0d exp %0d", pass, p, i, j,
                     outmem[p * OSZ * OSZ + i * OSZ + j], s);
          end
        end
  endtask

  initial begin
    for (int q = 0; q < NIN; q++)
      for (int r = 0; r < ISZ; r++)
        for (int c = 0; c < ISZ; c++) begin
          x[q][r][c] = fx_t'($urandom_range(4095)) - 2048;
          inmem[q % U][(q / U) * ISZ * ISZ + r * ISZ + c] = x[q][r][c];
        end
    for (int p = 0; p < NOUT; p++) begin
      th[p] = fx_t'($urandom_range(8191)) - 4096;
      for (int q = 0; q < NIN; q++)
        for (int u = 0; u < MSK; u++)
          for (int v = 0; v < MSK; v++) w[p][q][u][v] = fx_t'($urandom_range(1023)) - 512;
    end
    for (int a = 0; a < NOUT * OSZ * OSZ; a++) outmem[a] = fx_t'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // weight stream: w[op][ip][u][v], then biases
    for (int p = 0; p < NOUT; p++)
      for (int q = 0; q < NIN; q++)
        for (int u = 0; u < MSK; u++)
          for (int v = 0; v < MSK; v++) begin
            @(negedge clk); wl_valid = 1; wl_data = w[p][q][u][v];
          end
    for (int p = 0; p < NOUT; p++) begin
      @(negedge clk); wl_valid = 1; wl_data = th[p];
    end
    @(negedge clk); wl_valid = 0;
    run_and_check(0);
    for (int a = 0; a < NOUT * OSZ * OSZ; a++) outmem[a] = fx_t'($urandom);
    run_and_check(1);
    checks++;
    if (fwd_events == 0) begin failures++; $display("FAIL no partial sum was forwarded"); end
    checks++;
    if (relu_clips == 0) begin failures++; $display("FAIL no output was clipped by ReLU"); end
    $display("forwarded partial sums: %0d, ReLU clips: %0d", fwd_events, relu_clips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
