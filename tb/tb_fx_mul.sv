// tb_fx_mul: checks the fixed-point multiplier against floor(a*b / 2^10)
// computed in real arithmetic, for signed operands whose product is exact in a
// double, plus corner cases.
module tb_fx_mul;
  logic signed [31:0] a, b, p;
  int checks = 0, failures = 0;

  fx_mul dut (.a, .b, .p);

  task automatic check(input int aa, input int bb);
    real r;
    longint e;
    a = aa; b = bb;
    #1;
    r = $floor((real'(aa) * real'(bb)) / 1024.0);
    e = longint'(r);
    checks++;
    if (p !== 32'(e)) begin
      failures++;
      $display("FAIL a=%0d b=%0d got %0d exp %0d", aa, bb, p, 32'(e));
    end
  endtask

  initial begin
    check(1024, 1024);      // 1.0 * 1.0
    check(-1024, 512);      // -1.0 * 0.5
    check(3, 5);            // 15/1024 -> 0
    check(-3, 5);           // -15/1024 -> -1 (floor)
    check(0, -777);
    check(2047, -2047);
    for (int i = 0; i < 2000; i++)
      check(int'($urandom_range(2000000)) - 1000000, int'($urandom_range(2000000)) - 1000000);
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
