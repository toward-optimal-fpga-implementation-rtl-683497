// tb_hhr_full: end-to-end test of the recognizer at its full size (64x64 image,
// 64/64/128/256 planes, 512 and 2,350 fc nodes, default unroll factors): loads
// all 2.1 million weights, recognises one random image and compares all 2,350
// scores with the golden model, with the same latency and mechanism checks as
// tb_hhr_top. It takes several million clock cycles.
module tb_hhr_full;
  import hhr_pkg::*;
  import hhr_ref_pkg::*;

  localparam int T_IMG = IMG, T_N1 = N1, T_N3 = N3, T_N5 = N5, T_N7 = N7, T_N9 = N9, T_N10 = N10;
  localparam int T_M1 = M1, T_M3 = M3, T_M5 = M5, T_M7 = M7;
  localparam int T_U3 = U3, T_U5 = U5, T_U7 = U7, T_U9 = U9, T_U10 = U10, T_MAXB = 256;
  localparam int WATCHDOG = 20_000_000;

  `include "hhr_top_env.svh"

  hhr_top dut (.*);
endmodule
