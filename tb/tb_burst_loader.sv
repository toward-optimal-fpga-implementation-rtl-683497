// tb_burst_loader: fetches 37 float words in bursts of at most 8 from a global
// memory model that stalls at random. Checks each buffer word against the
// float value scaled by 2^10 (computed here through a double), that the words
// land in order at consecutive addresses, that 5 bursts were issued and that
// stalls occurred. The run is repeated from a second base address.
module tb_burst_loader;
  import hhr_pkg::*;
  localparam int N = 37, MAXB = 8, GW = 128;

  logic clk = 0, rst_n = 1, start = 0, busy, done;
  logic [31:0] base;
  logic ar_valid, ar_ready, r_valid, r_ready, r_last;
  logic [31:0] ar_addr, r_data;
  logic [7:0] ar_len;
  logic mem_we;
  logic [idx_w(N)-1:0] mem_addr;
  fx_t mem_wdata;
  logic aw_valid = 0, w_valid = 0, w_last = 0, aw_ready, w_ready;
  logic [31:0] aw_addr = 0, w_data = 0;
  logic [7:0] aw_len = 0;
  int unsigned stall_cycles, bursts, gerr;
  fx_t buffer [N];
  int  writes = 0, order_err = 0;
  int checks = 0, failures = 0;

  burst_loader #(.NWORDS(N), .MAXB(MAXB)) dut (.*);
  gmem_model #(.WORDS(GW)) u_gm (.*, .errors(gerr));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  always_ff @(posedge clk) if (mem_we) begin
    buffer[mem_addr] <= mem_wdata;
    if (32'(mem_addr) != writes % N) order_err <= order_err + 1;
    writes <= writes + 1;
  end

  function automatic fx_t ref_fix(real v);
    return fx_t'($rtoi(v * 1024.0));
  endfunction

  task automatic run(input int word0);
    real vals [N];
    for (int i = 0; i < N; i++) begin
      logic [63:0] d;
      logic [31:0] f;
      vals[i] = (real'($urandom_range(200000)) - 100000.0) / 3000.0;
      // round to single precision by hand: keep 23 fraction bits of the double
      d = $realtobits(vals[i]);
      f = {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
      if (vals[i] == 0.0) f = 32'd0;
      vals[i] = $bitstoreal({d[63:29], 29'd0});
      u_gm.mem[word0 + i] = f;
    end
    base = 32'(word0 * 4);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (buffer[i] !== ref_fix(vals[i])) begin
        failures++; $display("FAIL word %0d got %0d exp %0d", i, buffer[i], ref_fix(vals[i]));
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0);
    checks++;
    if (bursts != 5) begin failures++; $display("FAIL %0d bursts, expected 5", bursts); end
    run(70);
    checks += 3;
    if (stall_cycles == 0) begin failures++; $display("FAIL no stall happened"); end
    if (order_err != 0 || writes != 2 * N) begin failures++; $display("FAIL write order"); end
    if (gerr != 0) begin failures++; $display("FAIL bus errors %0d", gerr); end
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
