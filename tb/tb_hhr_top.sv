// tb_hhr_top: end-to-end test of the recognizer on a reduced network
// (36x36 image, 4/4/8/8 planes, 5x5/3x3/2x2/2x2 masks, 16 and 20 fc nodes,
// unroll factors 2/2/4/4/8 so every unrolled loop runs over two groups).
// A random image in [0,1) is placed in the global-memory model as floats and
// random weights are streamed in; after start the 20 scores read back from
// global memory must equal the golden model. Also checked: the latency of
// every layer step (iterations + 3 cycles), the reported total latency, and
// that each mechanism occurred: bus stalls, multi-burst transfers, partial-sum
// forwarding in each convolution, ReLU clipping and all twelve steps.
module tb_hhr_top;
  import hhr_pkg::*;
  import hhr_ref_pkg::*;

  localparam int T_IMG = 36, T_N1 = 4, T_N3 = 4, T_N5 = 8, T_N7 = 8, T_N9 = 16, T_N10 = 20;
  localparam int T_M1 = 5, T_M3 = 3, T_M5 = 2, T_M7 = 2;
  localparam int T_U3 = 2, T_U5 = 2, T_U7 = 4, T_U9 = 4, T_U10 = 8, T_MAXB = 16;
  localparam int WATCHDOG = 2_000_000;

  `include "hhr_top_env.svh"

  hhr_top #(
    .P_IMG(T_IMG), .P_N1(T_N1), .P_N3(T_N3), .P_N5(T_N5), .P_N7(T_N7), .P_N9(T_N9),
    .P_N10(T_N10), .P_M1(T_M1), .P_M3(T_M3), .P_M5(T_M5), .P_M7(T_M7),
    .P_U3(T_U3), .P_U5(T_U5), .P_U7(T_U7), .P_U9(T_U9), .P_U10(T_U10), .MAXB(T_MAXB)
  ) dut (.*);
endmodule
