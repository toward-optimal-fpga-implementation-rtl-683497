// tb_fp2fix: checks float-to-fixed conversion. Random single-precision fields
// are turned into a double by hand, scaled by 2^10 and truncated toward zero
// with saturation to the 32-bit range; the converter must give the same code.
module tb_fp2fix;
  logic [31:0]        f;
  logic signed [31:0] x;
  int checks = 0, failures = 0;

  fp2fix dut (.f, .x);

  function automatic longint expect_of(logic [31:0] fb);
    logic [63:0] d;
    real v;
    if (fb[30:23] == 8'h00) return 0;
    if (fb[30:23] == 8'hFF) return fb[31] ? -64'sd2147483648 : 64'sd2147483647;
    d = {fb[31], 11'(int'(fb[30:23]) - 127 + 1023), fb[22:0], 29'd0};
    v = $bitstoreal(d) * 1024.0;
    if (v >= 2147483647.0) return 64'sd2147483647;
    if (v <= -2147483648.0) return -64'sd2147483648;
    return longint'($rtoi(v));
  endfunction

  task automatic check(input logic [31:0] fb);
    longint e;
    f = fb;
    #1;
    e = expect_of(fb);
    checks++;
    if (x !== 32'(e)) begin
      failures++;
      $display("FAIL f=%h got %0d exp %0d", fb, x, e);
    end
  endtask

  initial begin
    check(32'h3F80_0000);   // 1.0 -> 1024
    check(32'hBF00_0000);   // -0.5 -> -512
    check(32'h3A80_0000);   // 2^-10 -> 1
    check(32'h3A00_0000);   // 2^-11 -> 0
    check(32'h0000_0000);
    check(32'h8000_0001);   // subnormal
    check(32'h7F80_0000);   // +inf
    check(32'h4B00_0000);   // 2^23 -> saturate
    check(32'hC9FF_FFFF);   // about -2^20
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] r;
      r = $urandom;
      // keep most exponents in the interesting range 2^-14 .. 2^22
      if (i % 4 != 0) r[30:23] = 8'(113 + $urandom_range(36));
      check(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
