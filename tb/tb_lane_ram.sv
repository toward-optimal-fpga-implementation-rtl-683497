// tb_lane_ram: writes random words to random partitions of a 4-partition,
// 13-word buffer, keeps a shadow copy, and checks that every read returns all
// partitions of the addressed word exactly one cycle after re, that a
// simultaneous write is not yet visible (read-first) and that data hold while
// re is low.
module tb_lane_ram;
  localparam int L = 4, D = 13;
  logic clk = 0, we, re;
  logic [1:0] wlane;
  logic [3:0] waddr, raddr;
  logic signed [31:0] wdata;
  logic signed [31:0] rdata [L];
  logic signed [31:0] shadow [L][D];
  logic signed [31:0] expv [L];
  int checks = 0, failures = 0;

  lane_ram #(.LANES(L), .DEPTH(D)) dut (.clk, .we, .wlane, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    we = 0; re = 0; wlane = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill everything
    for (int a = 0; a < D; a++)
      for (int l = 0; l < L; l++) begin
        @(negedge clk);
        we = 1; wlane = 2'(l); waddr = 4'(a); wdata = $urandom; shadow[l][a] = wdata;
      end
    @(negedge clk); we = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      re = 1; raddr = 4'($urandom_range(D - 1));
      we = ($urandom_range(1) == 1); wlane = 2'($urandom_range(L - 1));
      waddr = ($urandom_range(2) == 0) ? raddr : 4'($urandom_range(D - 1));
      wdata = $urandom;
      for (int l = 0; l < L; l++) expv[l] = shadow[l][raddr];   // read-first
      if (we) shadow[wlane][waddr] = wdata;
      @(negedge clk);
      re = 0; we = 0;
      for (int l = 0; l < L; l++) begin
        checks++;
        if (rdata[l] !== expv[l]) begin
          failures++;
          $display("FAIL lane %0d addr %0d got %h exp %h", l, raddr, rdata[l], expv[l]);
        end
      end
      @(negedge clk);   // re low: output holds
      for (int l = 0; l < L; l++) begin
        checks++;
        if (rdata[l] !== expv[l]) failures++;
      end
    end
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
