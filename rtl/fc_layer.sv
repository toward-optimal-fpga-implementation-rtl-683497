// fc_layer: fully connected layer, X(p) = f( sum_q w(q,p) * X(q) + theta_p ).
//
// Loop nest: output node p, input group c. The input loop is unrolled U times:
// the input vector and the weights are each split into U partitions (input q in
// partition q % U, word q / U; weight w(q,p) in partition q % U, word
// p*(NIN/U) + q / U), so each cycle forms U fixed-point products, adds them in a
// tree and accumulates them in a register that starts from the bias. After the
// last group f(acc) is written to the destination buffer, split into OL
// partitions (node p in partition p % OL, word p / OL). f is ReLU when RELU=1 and
// the identity otherwise (used for the class scores).
// Unrolling the input loop with an equal memory partition factor follows the
// accelerator's fully connected scheme; ReLU, the identity on the last layer
// and the register accumulation are this design's choices.
//
// Weights are embedded on chip and written once through the wl_* stream:
// NOUT*NIN weights in the order w[p][q], then NOUT biases; it then wraps.
//
// Timing: NOUT*(NIN/U) iterations, one per cycle after start; done pulses 2
// cycles after the last is issued. Input buffer reads have one cycle latency.
module fc_layer
  import hhr_pkg::*;
#(
  parameter int unsigned NIN  = 8,
  parameter int unsigned NOUT = 4,
  parameter int unsigned U    = 4,    // unroll / partition factor, divides NIN
  parameter int unsigned OL   = 1,    // partitions of the destination buffer
  parameter bit          RELU = 1'b1,
  localparam int unsigned CH  = NIN / U,
  localparam int unsigned IAW = idx_w(CH),
  localparam int unsigned OCH = (NOUT + OL - 1) / OL,
  localparam int unsigned OAW = idx_w(OCH),
  localparam int unsigned LW  = idx_w(OL)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // weight / bias load stream
  input  logic           wl_valid,
  input  fx_t            wl_data,
  // input vector buffer (U partitions)
  output logic           in_re,
  output logic [IAW-1:0] in_addr,
  input  fx_t            in_rdata [U],
  // destination buffer (OL partitions)
  output logic           out_we,
  output logic [LW-1:0]  out_lane,
  output logic [OAW-1:0] out_addr,
  output fx_t            out_wdata
);
  localparam int unsigned WDEPTH = NOUT * CH;
  localparam int unsigned WAW = idx_w(WDEPTH);
  localparam int unsigned PW  = idx_w(NOUT);
  localparam int unsigned CW  = idx_w(CH);
  localparam int unsigned ULW = idx_w(U);

  initial begin
    assert (NIN % U == 0) else $fatal(1, "fc_layer: U must divide NIN");
  end

  logic run;

  // ---------------- weight memory and its load stream ----------------
  logic           w_we;
  logic [WAW-1:0] w_waddr, w_raddr;
  fx_t            w_rdata [U];
  fx_t            bias [NOUT];
  logic [PW-1:0]  l_p;
  logic [CW-1:0]  l_c;
  logic [ULW-1:0] l_lane;
  logic           l_bias;

  lane_ram #(.LANES(U), .DEPTH(WDEPTH)) u_wmem (
    .clk, .we(w_we), .wlane(l_lane), .waddr(w_waddr), .wdata(wl_data),
    .re(run), .raddr(w_raddr), .rdata(w_rdata)
  );

  always_comb begin
    w_we    = wl_valid && !l_bias;
    w_waddr = WAW'(32'(l_p) * CH + 32'(l_c));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_p <= '0; l_c <= '0; l_lane <= '0; l_bias <= 1'b0;
    end else if (wl_valid) begin
      if (l_bias) begin
        if (32'(l_p) == NOUT - 1) begin
          l_p <= '0; l_bias <= 1'b0;
        end else l_p <= l_p + 1'b1;
      end else if (32'(l_lane) != U - 1) l_lane <= l_lane + 1'b1;
      else begin
        l_lane <= '0;
        if (32'(l_c) != CH - 1) l_c <= l_c + 1'b1;
        else begin
          l_c <= '0;
          if (32'(l_p) != NOUT - 1) l_p <= l_p + 1'b1;
          else begin
            l_p <= '0; l_bias <= 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wl_valid && l_bias) bias[l_p] <= wl_data;
  end

  // ---------------- stage A: loop counters ----------------
  logic [PW-1:0]  p;
  logic [LW-1:0]  p_lane;   // p % OL
  logic [OAW-1:0] p_chunk;  // p / OL
  logic [CW-1:0]  c;
  logic           a_first, a_last, a_final;

  always_comb begin
    a_first = (c == '0);
    a_last  = (32'(c) == CH - 1);
    a_final = a_last && (32'(p) == NOUT - 1);
    in_re   = run;
    in_addr = IAW'(c);
    w_raddr = WAW'(32'(p) * CH + 32'(c));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; p <= '0; p_lane <= '0; p_chunk <= '0; c <= '0;
    end else if (!run) begin
      if (start && !busy) begin
        run <= 1'b1; p <= '0; p_lane <= '0; p_chunk <= '0; c <= '0;
      end
    end else begin
      if (a_final) run <= 1'b0;
      if (32'(c) != CH - 1) c <= c + 1'b1;
      else begin
        c <= '0;
        p <= p + 1'b1;
        if (32'(p_lane) != OL - 1) p_lane <= p_lane + 1'b1;
        else begin
          p_lane  <= '0;
          p_chunk <= p_chunk + 1'b1;
        end
      end
    end
  end

  // ---------------- stage B: products, adder tree, accumulator ----------------
  logic           b_valid, b_first, b_last, b_final;
  logic [PW-1:0]  b_p;
  logic [LW-1:0]  b_lane;
  logic [OAW-1:0] b_addr;
  fx_t            prod [U];
  fx_t            psum, acc, nxt;

  for (genvar k = 0; k < U; k++) begin : g_lane
    fx_mul u_mul (.a(in_rdata[k]), .b(w_rdata[k]), .p(prod[k]));
  end

  always_comb begin
    psum = '0;
    for (int k = 0; k < U; k++) psum = psum + prod[k];
    nxt       = (b_first ? bias[b_p] : acc) + psum;
    out_we    = b_valid && b_last;
    out_lane  = b_lane;
    out_addr  = b_addr;
    out_wdata = RELU ? relu_f(nxt) : nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid <= 1'b0; b_first <= 1'b0; b_last <= 1'b0; b_final <= 1'b0;
      b_p <= '0; b_lane <= '0; b_addr <= '0; acc <= '0; done <= 1'b0;
    end else begin
      b_valid <= run;
      b_first <= a_first;
      b_last  <= a_last;
      b_final <= run && a_final;
      b_p     <= p;
      b_lane  <= p_lane;
      b_addr  <= p_chunk;
      if (b_valid) acc <= nxt;
      done    <= b_valid && b_final;
    end
  end

  assign busy = run || b_valid || done;
endmodule
