// tb_fc_layer: a 12-input, 7-output fully connected layer with the input loop
// unrolled 4 times (3 groups per output) and a 3-partition destination buffer.
// Run once with ReLU and once (second instance) without; outputs are compared
// with the dot product computed here, at partition p % 3, word p / 3, and each
// run must take NOUT*(NIN/U) + 2 cycles from start to done.
module tb_fc_layer;
  import hhr_pkg::*;
  localparam int NIN = 12, NOUT = 7, U = 4, OL = 3, CH = NIN / U, OCH = 3;

  logic clk = 0, rst_n = 1, start = 0;
  logic wl_valid = 0;
  fx_t  wl_data = '0;
  fx_t  xin [NIN];
  fx_t  w [NOUT][NIN];
  fx_t  th [NOUT];
  fx_t  inmem [U][CH];
  int checks = 0, failures = 0, cyc = 0, clips = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge
  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic fx_t mul(fx_t a, fx_t b);
    longint pr = longint'(a) * longint'(b);
    return fx_t'(pr >>> FRAC);
  endfunction

  for (genvar g = 0; g < 2; g++) begin : g_dut
    logic busy, done, in_re, out_we;
    logic [idx_w(CH)-1:0] in_addr;
    fx_t in_rdata [U];
    logic [1:0] out_lane;
    logic [idx_w(OCH)-1:0] out_addr;
    fx_t out_wdata;
    fx_t dst [OL][OCH];
    int  t0, t1;

    fc_layer #(.NIN(NIN), .NOUT(NOUT), .U(U), .OL(OL), .RELU(g == 0)) dut (
      .clk, .rst_n, .start, .busy, .done, .wl_valid, .wl_data,
      .in_re, .in_addr, .in_rdata, .out_we, .out_lane, .out_addr, .out_wdata);

    always_ff @(posedge clk) begin
      if (in_re) for (int k = 0; k < U; k++) in_rdata[k] <= inmem[k][in_addr];
      if (out_we) dst[out_lane][out_addr] <= out_wdata;
      if (start && !busy) t0 <= cyc;
      if (done) t1 <= cyc;
    end
  end

  task automatic check_dut(input int g, input int t0, input int t1);
    checks++;
    if (t1 - t0 != NOUT * CH + 2) begin
      failures++; $display("FAIL dut %0d latency %0d", g, t1 - t0);
    end
    for (int p = 0; p < NOUT; p++) begin
      fx_t s = th[p], got;
      for (int q = 0; q < NIN; q++) s += mul(w[p][q], xin[q]);
      if (g == 0 && s < 0) begin s = 0; clips++; end
      got = (g == 0) ? g_dut[0].dst[p % OL][p / OL] : g_dut[1].dst[p % OL][p / OL];
      checks++;
      if (got !== s) begin
        failures++; $display("FAIL dut %0d node %0d got %0d exp %0d", g, p, got, s);
      end
    end
  endtask

  initial begin
    for (int q = 0; q < NIN; q++) begin
      xin[q] = fx_t'($urandom_range(8191)) - 4096;
      inmem[q % U][q / U] = xin[q];
    end
    for (int p = 0; p < NOUT; p++) begin
      th[p] = fx_t'($urandom_range(8191)) - 4096;
      for (int q = 0; q < NIN; q++) w[p][q] = fx_t'($urandom_range(4095)) - 2048;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NOUT; p++)
      for (int q = 0; q < NIN; q++) begin
        @(negedge clk); wl_valid = 1; wl_data = w[p][q];
      end
    for (int p = 0; p < NOUT; p++) begin
      @(negedge clk); wl_valid = 1; wl_data = th[p];
    end
    @(negedge clk); wl_valid = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (g_dut[0].done);
    repeat (3) @(posedge clk);
    @(negedge clk);
    check_dut(0, g_dut[0].t0, g_dut[0].t1);
    check_dut(1, g_dut[1].t0, g_dut[1].t1);
    checks++;
    if (clips == 0) begin failures++; $display("FAIL ReLU never clipped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
