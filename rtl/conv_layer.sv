// conv_layer: one convolution layer, X(p,i,j) = f( sum_q sum_u,v w(q,p,u,v) *
// X(q,i+u,j+v) + theta_p ), stride 1, every output plane fed by every input plane.
//
// Loop nest (outermost first): output plane op, mask position (u,v), output
// position (y,x), input-plane group ipc. The input-plane loop is innermost and
// unrolled U times: the input feature maps and the weights are each split into
// U partitions (plane ip in partition ip % U), so one cycle reads U pixels and U
// weights, forms U fixed-point products and adds them in a tree. Partial sums
// live in the output buffer (outside this module) and are read, updated and
// written back every cycle; the first visit of an output starts from the bias,
// the last applies the activation f (ReLU when RELU=1). A partial sum written in
// one cycle and read in the next is forwarded around the buffer.
// Loop order, innermost unrolled input-plane loop and equal unroll/partition
// factors follow the accelerator's convolution scheme; ReLU, the bias-first
// accumulation and the two-stage pipeline are this design's choices.
//
// Weights are held on chip ("embedded") and are written once through the wl_*
// stream: NOUT*NIN*MSK*MSK weights in the order w[op][ip][u][v], then NOUT
// biases; the stream then wraps to the start.
//
// Timing: after start, one loop iteration is issued per cycle,
// NOUT*MSK*MSK*OSZ*OSZ*(NIN/U) in all; done pulses 2 cycles after the last is
// issued. Input buffer read: in_addr = ipc*ISZ*ISZ + (y+u)*ISZ + (x+v), data one
// cycle later. Output buffer address = op*OSZ*OSZ + y*OSZ + x.
module conv_layer
  import hhr_pkg::*;
#(
  parameter int unsigned NIN  = 4,   // input planes
  parameter int unsigned NOUT = 4,   // output planes
  parameter int unsigned ISZ  = 8,   // input plane is ISZ x ISZ
  parameter int unsigned MSK  = 3,   // mask is MSK x MSK
  parameter int unsigned U    = 2,   // unroll / partition factor, divides NIN
  parameter bit          RELU = 1'b1,
  localparam int unsigned OSZ = ISZ - MSK + 1,
  localparam int unsigned CH  = NIN / U,
  localparam int unsigned MM  = MSK * MSK,
  localparam int unsigned IAW = idx_w(CH * ISZ * ISZ),
  localparam int unsigned OAW = idx_w(NOUT * OSZ * OSZ)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // weight / bias load stream
  input  logic           wl_valid,
  input  fx_t            wl_data,
  // input feature-map buffer (U partitions)
  output logic           in_re,
  output logic [IAW-1:0] in_addr,
  input  fx_t            in_rdata [U],
  // output buffer, read-modify-write
  output logic           out_re,
  output logic [OAW-1:0] out_raddr,
  input  fx_t            out_rdata,
  output logic           out_we,
  output logic [OAW-1:0] out_waddr,
  output fx_t            out_wdata
);
  localparam int unsigned WDEPTH = NOUT * CH * MM;
  localparam int unsigned WAW = idx_w(WDEPTH);
  localparam int unsigned OPW = idx_w(NOUT);
  localparam int unsigned MW  = idx_w(MSK);
  localparam int unsigned SW  = idx_w(OSZ);
  localparam int unsigned CW  = idx_w(CH);
  localparam int unsigned LW  = idx_w(U);
  localparam int unsigned MMW = idx_w(MM);

  initial begin
    assert (NIN % U == 0) else $fatal(1, "conv_layer: U must divide NIN");
    assert (ISZ >= MSK) else $fatal(1, "conv_layer: mask larger than input");
  end

  logic           run;   // stage A holds a valid loop iteration

  // ---------------- weight memory and its load stream ----------------
  logic           w_we;
  logic [LW-1:0]  w_wlane;
  logic [WAW-1:0] w_waddr;
  logic [WAW-1:0] w_raddr;
  fx_t            w_rdata [U];
  fx_t            bias [NOUT];

  logic [OPW-1:0] l_op;
  logic [CW-1:0]  l_ipc;
  logic [LW-1:0]  l_lane;
  logic [MMW-1:0] l_m;
  logic           l_bias;

  lane_ram #(.LANES(U), .DEPTH(WDEPTH)) u_wmem (
    .clk, .we(w_we), .wlane(w_wlane), .waddr(w_waddr), .wdata(wl_data),
    .re(run), .raddr(w_raddr), .rdata(w_rdata)
  );

  always_comb begin
    w_we    = wl_valid && !l_bias;
    w_wlane = l_lane;
    w_waddr = WAW'((32'(l_op) * CH + 32'(l_ipc)) * MM + 32'(l_m));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_op <= '0; l_ipc <= '0; l_lane <= '0; l_m <= '0; l_bias <= 1'b0;
    end else if (wl_valid) begin
      if (l_bias) begin
        if (32'(l_op) == NOUT - 1) begin
          l_op <= '0; l_bias <= 1'b0;
        end else l_op <= l_op + 1'b1;
      end else if (32'(l_m) != MM - 1) l_m <= l_m + 1'b1;
      else begin
        l_m <= '0;
        if (32'(l_lane) != U - 1) l_lane <= l_lane + 1'b1;
        else begin
          l_lane <= '0;
          if (32'(l_ipc) != CH - 1) l_ipc <= l_ipc + 1'b1;
          else begin
            l_ipc <= '0;
            if (32'(l_op) != NOUT - 1) l_op <= l_op + 1'b1;
            else begin
              l_op <= '0; l_bias <= 1'b1;
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wl_valid && l_bias) bias[l_op] <= wl_data;
  end

  // ---------------- stage A: loop counters and buffer addresses ----------------
  logic [OPW-1:0] op;
  logic [MW-1:0]  u, v;
  logic [SW-1:0]  y, x;
  logic [CW-1:0]  ipc;
  logic           a_first, a_last, a_final;
  logic [OAW-1:0] a_oaddr;

  always_comb begin
    a_first = (u == '0) && (v == '0) && (ipc == '0);
    a_last  = (32'(u) == MSK - 1) && (32'(v) == MSK - 1) && (32'(ipc) == CH - 1);
    a_final = a_last && (32'(op) == NOUT - 1) && (32'(y) == OSZ - 1) && (32'(x) == OSZ - 1);
    a_oaddr = OAW'(32'(op) * OSZ * OSZ + 32'(y) * OSZ + 32'(x));
    in_re   = run;
    in_addr = IAW'(32'(ipc) * ISZ * ISZ + (32'(y) + 32'(u)) * ISZ + 32'(x) + 32'(v));
    w_raddr = WAW'((32'(op) * CH + 32'(ipc)) * MM + 32'(u) * MSK + 32'(v));
    out_re    = run;
    out_raddr = a_oaddr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      op <= '0; u <= '0; v <= '0; y <= '0; x <= '0; ipc <= '0;
    end else if (!run) begin
      if (start && !busy) begin
        run <= 1'b1;
        op <= '0; u <= '0; v <= '0; y <= '0; x <= '0; ipc <= '0;
      end
    end else begin
      if (a_final) run <= 1'b0;
      // innermost first: ipc, x, y, v, u, op
      if (32'(ipc) != CH - 1) ipc <= ipc + 1'b1;
      else begin
        ipc <= '0;
        if (32'(x) != OSZ - 1) x <= x + 1'b1;
        else begin
          x <= '0;
          if (32'(y) != OSZ - 1) y <= y + 1'b1;
          else begin
            y <= '0;
            if (32'(v) != MSK - 1) v <= v + 1'b1;
            else begin
              v <= '0;
              if (32'(u) != MSK - 1) u <= u + 1'b1;
              else begin
                u <= '0;
                op <= op + 1'b1;
              end
            end
          end
        end
      end
    end
  end

  // ---------------- stage B: products, adder tree, accumulate ----------------
  logic           b_valid, b_first, b_last, b_final;
  logic [OAW-1:0] b_oaddr;
  logic [OPW-1:0] b_op;
  logic           c_valid;
  logic [OAW-1:0] c_oaddr;
  fx_t            c_wdata;
  fx_t            prod [U];
  fx_t            psum, old, acc;
  logic           fwd;

  for (genvar k = 0; k < U; k++) begin : g_lane
    fx_mul u_mul (.a(in_rdata[k]), .b(w_rdata[k]), .p(prod[k]));
  end

  always_comb begin
    psum = '0;
    for (int k = 0; k < U; k++) psum = psum + prod[k];
    fwd = c_valid && (c_oaddr == b_oaddr);
    if (b_first)  old = bias[b_op];
    else if (fwd) old = c_wdata;
    else          old = out_rdata;
    acc = old + psum;
    out_we    = b_valid;
    out_waddr = b_oaddr;
    out_wdata = (b_last && RELU) ? relu_f(acc) : acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid <= 1'b0; b_first <= 1'b0; b_last <= 1'b0; b_final <= 1'b0;
      b_oaddr <= '0; b_op <= '0;
      c_valid <= 1'b0; c_oaddr <= '0; c_wdata <= '0;
      done <= 1'b0;
    end else begin
      b_valid <= run;
      b_first <= a_first;
      b_last  <= a_last;
      b_final <= run && a_final;
      b_oaddr <= a_oaddr;
      b_op    <= op;
      c_valid <= b_valid;
      c_oaddr <= b_oaddr;
      c_wdata <= out_wdata;
      done    <= b_valid && b_final;
    end
  end

  assign busy = run || b_valid || done;
endmodule
