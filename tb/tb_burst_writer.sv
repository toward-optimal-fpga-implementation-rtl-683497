// tb_burst_writer: writes 19 buffer words to global memory in bursts of at most
// 8 (8, 8, 3) through a memory model that stalls at random. Checks every word
// in memory, that words outside the target range are untouched, that w_last
// marks burst ends (the model counts violations) and that 3 bursts were used.
module tb_burst_writer;
  import hhr_pkg::*;
  localparam int N = 19, MAXB = 8, GW = 64, BASEW = 20;

  logic clk = 0, rst_n = 1, start = 0, busy, done;
  logic [31:0] base = BASEW * 4;
  logic mem_re;
  logic [idx_w(N)-1:0] mem_addr;
  fx_t mem_rdata;
  logic aw_valid, aw_ready, w_valid, w_ready, w_last;
  logic [31:0] aw_addr, w_data;
  logic [7:0] aw_len;
  logic ar_valid = 0, ar_ready, r_valid, r_ready = 0, r_last;
  logic [31:0] ar_addr = 0, r_data;
  logic [7:0] ar_len = 0;
  int unsigned stall_cycles, bursts, gerr;
  fx_t src [N];
  int checks = 0, failures = 0;

  burst_writer #(.NWORDS(N), .MAXB(MAXB)) dut (.*);
  gmem_model #(.WORDS(GW)) u_gm (.*, .errors(gerr));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge
  always_ff @(posedge clk) if (mem_re) mem_rdata <= src[mem_addr];

  initial begin
    for (int i = 0; i < N; i++) src[i] = fx_t'($urandom);
    for (int i = 0; i < GW; i++) u_gm.mem[i] = 32'h5A5A_0000 + 32'(i);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    for (int i = 0; i < GW; i++) begin
      logic [31:0] e;
      e = (i >= BASEW && i < BASEW + N) ? 32'(src[i - BASEW]) : 32'h5A5A_0000 + 32'(i);
      checks++;
      if (u_gm.mem[i] !== e) begin
        failures++; $display("FAIL mem[%0d] got %h exp %h", i, u_gm.mem[i], e);
      end
    end
    checks += 3;
    if (bursts != 3) begin failures++; $display("FAIL %0d bursts", bursts); end
    if (gerr != 0) begin failures++; $display("FAIL bus errors %0d", gerr); end
    if (stall_cycles == 0) begin failures++; $display("FAIL no stall happened"); end
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
