// tb_layer_sequencer: five dummy steps with random run times answer the
// sequencer's go pulses. Checks that steps start in order, one at a time, each
// only after the previous one finished, that done follows the last step and
// that the reported latency equals the measured start-to-done cycle count.
// Three runs.
module tb_layer_sequencer;
  localparam int NST = 5;
  logic clk = 0, rst_n = 1, start = 0, busy, done;
  logic [NST-1:0] go, done_i;
  logic [2:0] step;
  logic [31:0] cycles;
  int remaining [NST];
  int order [$];
  int active = 0, overlap = 0, cyc = 0, t0 = 0, t1 = 0;
  int checks = 0, failures = 0;

  layer_sequencer #(.NST(NST)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_i <= '0;
      for (int k = 0; k < NST; k++) remaining[k] <= -1;
    end else begin
      cyc <= cyc + 1;
      if (start && !busy) t0 <= cyc;
      if (done) t1 <= cyc;
      done_i <= '0;
      for (int k = 0; k < NST; k++) begin
        if (go[k]) begin
          remaining[k] <= int'($urandom_range(6));
          order.push_back(k);
          if (active != 0) overlap <= overlap + 1;
          active <= active + 1;
        end else if (remaining[k] == 0) begin
          done_i[k] <= 1'b1; remaining[k] <= -1; active <= active - 1;
        end else if (remaining[k] > 0) remaining[k] <= remaining[k] - 1;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      order.delete();
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      wait (done);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (order.size() != NST) begin failures++; $display("FAIL %0d steps ran", order.size()); end
      for (int k = 0; k < order.size(); k++) begin
        checks++;
        if (order[k] != k) begin failures++; $display("FAIL step %0d ran as %0d", order[k], k); end
      end
      checks++;
      if (cycles != 32'(t1 - t0)) begin
        failures++; $display("FAIL latency %0d, measured %0d", cycles, t1 - t0);
      end
    end
    checks++;
    if (overlap != 0) begin failures++; $display("FAIL steps overlapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
