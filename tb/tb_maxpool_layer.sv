// tb_maxpool_layer: pools 5 planes of 6x6 with a 2x2 window, stride 2, into a
// destination buffer split into 2 partitions. Each written word is checked
// against max-then-ReLU of its window, at partition p % 2 and word
// (p / 2)*9 + y*3 + x; every output must be written exactly once and the run
// must take NPL*OSZ*OSZ*4 + 2 cycles from start to done.
module tb_maxpool_layer;
  import hhr_pkg::*;
  localparam int NPL = 5, ISZ = 6, OL = 2, OSZ = 3, OCH = 3;
  localparam int IAW = idx_w(NPL * ISZ * ISZ), OAW = idx_w(OCH * OSZ * OSZ);

  logic clk = 0, rst_n = 1, start = 0, busy, done;
  logic in_re, out_we;
  logic [IAW-1:0] in_addr;
  fx_t in_rdata, out_wdata;
  logic [0:0] out_lane;
  logic [OAW-1:0] out_addr;

  fx_t x [NPL][ISZ][ISZ];
  fx_t src [NPL*ISZ*ISZ];
  fx_t dst [OL][OCH*OSZ*OSZ];
  int  hits [OL][OCH*OSZ*OSZ];
  int checks = 0, failures = 0, cyc = 0, t0 = 0, t1 = 0, clips = 0;

  maxpool_layer #(.NPL(NPL), .ISZ(ISZ), .OL(OL)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  always_ff @(posedge clk) begin
    if (in_re) in_rdata <= src[in_addr];
    if (out_we) begin
      dst[out_lane][out_addr] <= out_wdata;
      hits[out_lane][out_addr] <= hits[out_lane][out_addr] + 1;
    end
    cyc <= cyc + 1;
    if (start && !busy) t0 <= cyc;
    if (done) t1 <= cyc;
  end

  initial begin
    for (int p = 0; p < NPL; p++)
      for (int r = 0; r < ISZ; r++)
        for (int c = 0; c < ISZ; c++) begin
          x[p][r][c] = fx_t'($urandom_range(20000)) - 12000;
          src[p * ISZ * ISZ + r * ISZ + c] = x[p][r][c];
        end
    for (int l = 0; l < OL; l++) for (int a = 0; a < OCH*OSZ*OSZ; a++) hits[l][a] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (t1 - t0 != NPL * OSZ * OSZ * 4 + 2) begin
      failures++; $display("FAIL latency %0d", t1 - t0);
    end
    for (int p = 0; p < NPL; p++)
      for (int i = 0; i < OSZ; i++)
        for (int j = 0; j < OSZ; j++) begin
          fx_t m;
          int a;
          m = x[p][2*i][2*j];
          a = (p / OL) * OSZ * OSZ + i * OSZ + j;
          for (int u = 0; u < 2; u++) for (int v = 0; v < 2; v++)
            if (x[p][2*i+u][2*j+v] > m) m = x[p][2*i+u][2*j+v];
          if (m < 0) begin m = 0; clips++; end
          checks += 2;
          if (dst[p % OL][a] !== m) begin
            failures++; $display("FAIL p%0d (%0d,%0d) got %0d exp %0d", p, i, j, dst[p % OL][a], m);
          end
          if (hits[p % OL][a] != 1) begin
            failures++; $display("FAIL p%0d (%0d,%0d) written %0d times", p, i, j, hits[p % OL][a]);
          end
        end
    checks++;
    if (clips == 0) begin failures++; $display("FAIL no negative maximum seen"); end
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
