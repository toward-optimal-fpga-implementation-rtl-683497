// hhr_top: CNN accelerator kernel for handwritten Hangul character recognition.
//
// The network is four convolution / max-pooling pairs followed by two fully
// connected layers: C1 (1 -> 64 planes, 5x5, 64x64 -> 60x60), P2 (2x2/2),
// C3 (64 -> 64, 5x5, 30x30 -> 26x26), P4, C5 (64 -> 128, 4x4, 13x13 -> 10x10), P6,
// C7 (128 -> 256, 4x4, 5x5 -> 2x2), P8 (-> 1x1), F9 (256 -> 512), F10 (512 -> 2350
// class scores). All arithmetic is 32-bit fixed point with 10 fractional bits.
//
// Every layer has its own hardware unit and works out of on-chip buffers: the
// input image is first copied from global memory in bursts (and converted from
// float to fixed point), each layer reads the buffer the previous layer wrote,
// and the final 2,350 scores are copied back in bursts. Weights and biases of
// all layers are embedded on chip; they are written once, before use, through
// the wl_* stream (wl_layer: 0 C1, 1 C3, 2 C5, 3 C7, 4 F9, 5 F10; order as in
// conv_layer / fc_layer). Each convolution and fully connected unit unrolls its
// innermost loop U times over a buffer split into U partitions.
// A step sequencer runs the twelve steps (load, ten layers, store) one after
// another; cycles reports the start-to-done latency of the last run.
//
// Interface: start (pulse) with img_base / res_base byte addresses of the
// IMG*IMG float image and the N10-word score vector in global memory; done
// pulses when the scores are written. Global memory is reached through a
// valid/ready read bus (ar_*, r_*) and write bus (aw_*, w_*).
// The layer shapes come from the network definition; the per-layer unroll
// factors, buffer organisation, buses and load stream are this design's.
module hhr_top
  import hhr_pkg::*;
#(
  parameter int unsigned P_IMG = IMG,
  parameter int unsigned P_N1  = N1,
  parameter int unsigned P_N3  = N3,
  parameter int unsigned P_N5  = N5,
  parameter int unsigned P_N7  = N7,
  parameter int unsigned P_N9  = N9,
  parameter int unsigned P_N10 = N10,
  parameter int unsigned P_M1  = M1,
  parameter int unsigned P_M3  = M3,
  parameter int unsigned P_M5  = M5,
  parameter int unsigned P_M7  = M7,
  parameter int unsigned P_U3  = U3,
  parameter int unsigned P_U5  = U5,
  parameter int unsigned P_U7  = U7,
  parameter int unsigned P_U9  = U9,
  parameter int unsigned P_U10 = U10,
  parameter int unsigned MAXB  = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // kernel control
  input  logic        start,
  input  logic [31:0] img_base,
  input  logic [31:0] res_base,
  output logic        busy,
  output logic        done,
  output logic [31:0] cycles,
  output logic [3:0]  step,      // step now running (0 load .. 11 store)
  // weight / bias load stream
  input  logic        wl_valid,
  input  logic [2:0]  wl_layer,
  input  fx_t         wl_data,
  // global memory read bus
  output logic        ar_valid,
  input  logic        ar_ready,
  output logic [31:0] ar_addr,
  output logic [7:0]  ar_len,
  input  logic        r_valid,
  output logic        r_ready,
  input  logic [31:0] r_data,
  input  logic        r_last,
  // global memory write bus
  output logic        aw_valid,
  input  logic        aw_ready,
  output logic [31:0] aw_addr,
  output logic [7:0]  aw_len,
  output logic        w_valid,
  input  logic        w_ready,
  output logic [31:0] w_data,
  output logic        w_last
);
  // plane sizes along the network
  localparam int unsigned S1 = P_IMG - P_M1 + 1;   // C1 output
  localparam int unsigned S2 = S1 / 2;             // P2 output
  localparam int unsigned S3 = S2 - P_M3 + 1;
  localparam int unsigned S4 = S3 / 2;
  localparam int unsigned S5 = S4 - P_M5 + 1;
  localparam int unsigned S6 = S5 / 2;
  localparam int unsigned S7 = S6 - P_M7 + 1;
  localparam int unsigned S8 = S7 / 2;             // must be 1

  // buffer depths (words per partition)
  localparam int unsigned D0  = P_IMG * P_IMG;
  localparam int unsigned D1  = P_N1 * S1 * S1;
  localparam int unsigned D3I = (P_N1 / P_U3) * S2 * S2;
  localparam int unsigned D3  = P_N3 * S3 * S3;
  localparam int unsigned D5I = (P_N3 / P_U5) * S4 * S4;
  localparam int unsigned D5  = P_N5 * S5 * S5;
  localparam int unsigned D7I = (P_N5 / P_U7) * S6 * S6;
  localparam int unsigned D7  = P_N7 * S7 * S7;
  localparam int unsigned D9I = P_N7 / P_U9;
  localparam int unsigned D10I = P_N9 / P_U10;
  localparam int unsigned D10 = P_N10;

  initial begin
    assert (S8 == 1) else $fatal(1, "hhr_top: the last pooling layer must produce 1x1 planes");
  end

  // ---------------- sequencer ----------------
  localparam int unsigned NST = 12;
  logic [NST-1:0] go, fin;

  layer_sequencer #(.NST(NST)) u_seq (
    .clk, .rst_n, .start, .busy, .done, .go, .done_i(fin), .step, .cycles
  );

  // weight-load stream decode
  logic [5:0] wlv;
  always_comb for (int k = 0; k < 6; k++) wlv[k] = wl_valid && (wl_layer == 3'(k));

  // ---------------- step 0: image load ----------------
  logic                  b0_we;
  logic [idx_w(D0)-1:0]  b0_wa, b0_ra;
  fx_t                   b0_wd;
  logic                  b0_re;
  fx_t                   b0_rd [1];
  logic                  ld_busy;

  burst_loader #(.NWORDS(D0), .MAXB(MAXB), .CONVERT(1'b1)) u_load (
    .clk, .rst_n, .start(go[0]), .base(img_base), .busy(ld_busy), .done(fin[0]),
    .ar_valid, .ar_ready, .ar_addr, .ar_len, .r_valid, .r_ready, .r_data, .r_last,
    .mem_we(b0_we), .mem_addr(b0_wa), .mem_wdata(b0_wd)
  );

  lane_ram #(.LANES(1), .DEPTH(D0)) u_buf0 (
    .clk, .we(b0_we), .wlane(1'b0), .waddr(b0_wa), .wdata(b0_wd),
    .re(b0_re), .raddr(b0_ra), .rdata(b0_rd)
  );

  // ---------------- C1 / P2 ----------------
  logic                  c1_busy, c1_ore, c1_owe, p2_re, p2_busy;
  logic [idx_w(D1)-1:0]  c1_ora, c1_owa, p2_ra;
  fx_t                   c1_owd;
  fx_t                   o1_rd [1];

  conv_layer #(.NIN(1), .NOUT(P_N1), .ISZ(P_IMG), .MSK(P_M1), .U(1)) u_c1 (
    .clk, .rst_n, .start(go[1]), .busy(c1_busy), .done(fin[1]),
    .wl_valid(wlv[0]), .wl_data,
    .in_re(b0_re), .in_addr(b0_ra), .in_rdata(b0_rd),
    .out_re(c1_ore), .out_raddr(c1_ora), .out_rdata(o1_rd[0]),
    .out_we(c1_owe), .out_waddr(c1_owa), .out_wdata(c1_owd)
  );

  lane_ram #(.LANES(1), .DEPTH(D1)) u_buf1 (
    .clk, .we(c1_owe), .wlane(1'b0), .waddr(c1_owa), .wdata(c1_owd),
    .re(c1_ore || p2_re), .raddr(c1_busy ? c1_ora : p2_ra), .rdata(o1_rd)
  );

  logic                      p2_we;
  logic [idx_w(P_U3)-1:0]    p2_wl;
  logic [idx_w(D3I)-1:0]     p2_wa, c3_ra;
  fx_t                       p2_wd;
  logic                      c3_re;
  fx_t                       i3_rd [P_U3];

  maxpool_layer #(.NPL(P_N1), .ISZ(S1), .OL(P_U3)) u_p2 (
    .clk, .rst_n, .start(go[2]), .busy(p2_busy), .done(fin[2]),
    .in_re(p2_re), .in_addr(p2_ra), .in_rdata(o1_rd[0]),
    .out_we(p2_we), .out_lane(p2_wl), .out_addr(p2_wa), .out_wdata(p2_wd)
  );

  lane_ram #(.LANES(P_U3), .DEPTH(D3I)) u_buf3i (
    .clk, .we(p2_we), .wlane(p2_wl), .waddr(p2_wa), .wdata(p2_wd),
    .re(c3_re), .raddr(c3_ra), .rdata(i3_rd)
  );

  // ---------------- C3 / P4 ----------------
  logic                  c3_busy, c3_ore, c3_owe, p4_re, p4_busy;
  logic [idx_w(D3)-1:0]  c3_ora, c3_owa, p4_ra;
  fx_t                   c3_owd;
  fx_t                   o3_rd [1];

  conv_layer #(.NIN(P_N1), .NOUT(P_N3), .ISZ(S2), .MSK(P_M3), .U(P_U3)) u_c3 (
    .clk, .rst_n, .start(go[3]), .busy(c3_busy), .done(fin[3]),
    .wl_valid(wlv[1]), .wl_data,
    .in_re(c3_re), .in_addr(c3_ra), .in_rdata(i3_rd),
    .out_re(c3_ore), .out_raddr(c3_ora), .out_rdata(o3_rd[0]),
    .out_we(c3_owe), .out_waddr(c3_owa), .out_wdata(c3_owd)
  );

  lane_ram #(.LANES(1), .DEPTH(D3)) u_buf3 (
    .clk, .we(c3_owe), .wlane(1'b0), .waddr(c3_owa), .wdata(c3_owd),
    .re(c3_ore || p4_re), .raddr(c3_busy ? c3_ora : p4_ra), .rdata(o3_rd)
  );

  logic                      p4_we;
  logic [idx_w(P_U5)-1:0]    p4_wl;
  logic [idx_w(D5I)-1:0]     p4_wa, c5_ra;
  fx_t                       p4_wd;
  logic                      c5_re;
  fx_t                       i5_rd [P_U5];

  maxpool_layer #(.NPL(P_N3), .ISZ(S3), .OL(P_U5)) u_p4 (
    .clk, .rst_n, .start(go[4]), .busy(p4_busy), .done(fin[4]),
    .in_re(p4_re), .in_addr(p4_ra), .in_rdata(o3_rd[0]),
    .out_we(p4_we), .out_lane(p4_wl), .out_addr(p4_wa), .out_wdata(p4_wd)
  );

  lane_ram #(.LANES(P_U5), .DEPTH(D5I)) u_buf5i (
    .clk, .we(p4_we), .wlane(p4_wl), .waddr(p4_wa), .wdata(p4_wd),
    .re(c5_re), .raddr(c5_ra), .rdata(i5_rd)
  );

  // ---------------- C5 / P6 ----------------
  logic                  c5_busy, c5_ore, c5_owe, p6_re, p6_busy;
  logic [idx_w(D5)-1:0]  c5_ora, c5_owa, p6_ra;
  fx_t                   c5_owd;
  fx_t                   o5_rd [1];

  conv_layer #(.NIN(P_N3), .NOUT(P_N5), .ISZ(S4), .MSK(P_M5), .U(P_U5)) u_c5 (
    .clk, .rst_n, .start(go[5]), .busy(c5_busy), .done(fin[5]),
    .wl_valid(wlv[2]), .wl_data,
    .in_re(c5_re), .in_addr(c5_ra), .in_rdata(i5_rd),
    .out_re(c5_ore), .out_raddr(c5_ora), .out_rdata(o5_rd[0]),
    .out_we(c5_owe), .out_waddr(c5_owa), .out_wdata(c5_owd)
  );

  lane_ram #(.LANES(1), .DEPTH(D5)) u_buf5 (
    .clk, .we(c5_owe), .wlane(1'b0), .waddr(c5_owa), .wdata(c5_owd),
    .re(c5_ore || p6_re), .raddr(c5_busy ? c5_ora : p6_ra), .rdata(o5_rd)
  );

  logic                      p6_we;
  logic [idx_w(P_U7)-1:0]    p6_wl;
  logic [idx_w(D7I)-1:0]     p6_wa, c7_ra;
  fx_t                       p6_wd;
  logic                      c7_re;
  fx_t                       i7_rd [P_U7];

  maxpool_layer #(.NPL(P_N5), .ISZ(S5), .OL(P_U7)) u_p6 (
    .clk, .rst_n, .start(go[6]), .busy(p6_busy), .done(fin[6]),
    .in_re(p6_re), .in_addr(p6_ra), .in_rdata(o5_rd[0]),
    .out_we(p6_we), .out_lane(p6_wl), .out_addr(p6_wa), .out_wdata(p6_wd)
  );

  lane_ram #(.LANES(P_U7), .DEPTH(D7I)) u_buf7i (
    .clk, .we(p6_we), .wlane(p6_wl), .waddr(p6_wa), .wdata(p6_wd),
    .re(c7_re), .raddr(c7_ra), .rdata(i7_rd)
  );

  // ---------------- C7 / P8 ----------------
  logic                  c7_busy, c7_ore, c7_owe, p8_re, p8_busy;
  logic [idx_w(D7)-1:0]  c7_ora, c7_owa, p8_ra;
  fx_t                   c7_owd;
  fx_t                   o7_rd [1];

  conv_layer #(.NIN(P_N5), .NOUT(P_N7), .ISZ(S6), .MSK(P_M7), .U(P_U7)) u_c7 (
    .clk, .rst_n, .start(go[7]), .busy(c7_busy), .done(fin[7]),
    .wl_valid(wlv[3]), .wl_data,
    .in_re(c7_re), .in_addr(c7_ra), .in_rdata(i7_rd),
    .out_re(c7_ore), .out_raddr(c7_ora), .out_rdata(o7_rd[0]),
    .out_we(c7_owe), .out_waddr(c7_owa), .out_wdata(c7_owd)
  );

  lane_ram #(.LANES(1), .DEPTH(D7)) u_buf7 (
    .clk, .we(c7_owe), .wlane(1'b0), .waddr(c7_owa), .wdata(c7_owd),
    .re(c7_ore || p8_re), .raddr(c7_busy ? c7_ora : p8_ra), .rdata(o7_rd)
  );

  logic                      p8_we;
  logic [idx_w(P_U9)-1:0]    p8_wl;
  logic [idx_w(D9I)-1:0]     p8_wa, f9_ra;
  fx_t                       p8_wd;
  logic                      f9_re;
  fx_t                       i9_rd [P_U9];

  maxpool_layer #(.NPL(P_N7), .ISZ(S7), .OL(P_U9)) u_p8 (
    .clk, .rst_n, .start(go[8]), .busy(p8_busy), .done(fin[8]),
    .in_re(p8_re), .in_addr(p8_ra), .in_rdata(o7_rd[0]),
    .out_we(p8_we), .out_lane(p8_wl), .out_addr(p8_wa), .out_wdata(p8_wd)
  );

  lane_ram #(.LANES(P_U9), .DEPTH(D9I)) u_buf9i (
    .clk, .we(p8_we), .wlane(p8_wl), .waddr(p8_wa), .wdata(p8_wd),
    .re(f9_re), .raddr(f9_ra), .rdata(i9_rd)
  );

  // ---------------- F9 / F10 ----------------
  logic                      f9_busy, f9_we;
  logic [idx_w(P_U10)-1:0]   f9_wl;
  logic [idx_w(D10I)-1:0]    f9_wa, f10_ra;
  fx_t                       f9_wd;
  logic                      f10_re;
  fx_t                       i10_rd [P_U10];

  fc_layer #(.NIN(P_N7), .NOUT(P_N9), .U(P_U9), .OL(P_U10), .RELU(1'b1)) u_f9 (
    .clk, .rst_n, .start(go[9]), .busy(f9_busy), .done(fin[9]),
    .wl_valid(wlv[4]), .wl_data,
    .in_re(f9_re), .in_addr(f9_ra), .in_rdata(i9_rd),
    .out_we(f9_we), .out_lane(f9_wl), .out_addr(f9_wa), .out_wdata(f9_wd)
  );

  lane_ram #(.LANES(P_U10), .DEPTH(D10I)) u_buf10i (
    .clk, .we(f9_we), .wlane(f9_wl), .waddr(f9_wa), .wdata(f9_wd),
    .re(f10_re), .raddr(f10_ra), .rdata(i10_rd)
  );

  logic                      f10_busy, f10_we;
  logic                      f10_wl;
  logic [idx_w(D10)-1:0]     f10_wa, st_ra;
  fx_t                       f10_wd;
  logic                      st_re, st_busy;
  fx_t                       o10_rd [1];

  fc_layer #(.NIN(P_N9), .NOUT(P_N10), .U(P_U10), .OL(1), .RELU(1'b0)) u_f10 (
    .clk, .rst_n, .start(go[10]), .busy(f10_busy), .done(fin[10]),
    .wl_valid(wlv[5]), .wl_data,
    .in_re(f10_re), .in_addr(f10_ra), .in_rdata(i10_rd),
    .out_we(f10_we), .out_lane(f10_wl), .out_addr(f10_wa), .out_wdata(f10_wd)
  );

  lane_ram #(.LANES(1), .DEPTH(D10)) u_buf10 (
    .clk, .we(f10_we), .wlane(f10_wl), .waddr(f10_wa), .wdata(f10_wd),
    .re(st_re), .raddr(st_ra), .rdata(o10_rd)
  );

  // ---------------- step 11: store scores ----------------
  burst_writer #(.NWORDS(D10), .MAXB(MAXB)) u_store (
    .clk, .rst_n, .start(go[11]), .base(res_base), .busy(st_busy), .done(fin[11]),
    .mem_re(st_re), .mem_addr(st_ra), .mem_rdata(o10_rd[0]),
    .aw_valid, .aw_ready, .aw_addr, .aw_len, .w_valid, .w_ready, .w_data, .w_last
  );

  // only one step is active at a time
  always_ff @(posedge clk) begin
    if (busy)
      assert ($countones({ld_busy, c1_busy, p2_busy, c3_busy, p4_busy, c5_busy, p6_busy,
                          c7_busy, p8_busy, f9_busy, f10_busy, st_busy}) <= 1)
      else $error("hhr_top: two steps active at once");
  end
endmodule
