// maxpool_layer: max-pooling layer, X(p,i,j) = f( max_u,v X(p, i*STR+u, j*STR+v) )
// over a WIN x WIN window.
//
// Loop nest: plane p, output row y, output column x, window position (u,v). One
// input word is read per cycle from a single-partition buffer (the output buffer
// of the preceding convolution); a running maximum is kept in a register and,
// on the last window position, f(max) is written to the next layer's input
// buffer. That buffer is split into OL partitions, so plane p goes to partition
// p % OL at word (p / OL)*OSZ*OSZ + y*OSZ + x; for a 1x1 output this is the
// partitioning a fully connected layer expects.
// Window, stride and the equation follow the network definition; the
// one-read-per-cycle schedule, the ReLU used as f and the output partition
// mapping are this design's choices.
//
// Timing: NPL*OSZ*OSZ*WIN*WIN iterations, one per cycle after start; done
// pulses 2 cycles after the last read is issued.
module maxpool_layer
  import hhr_pkg::*;
#(
  parameter int unsigned NPL  = 4,   // planes
  parameter int unsigned ISZ  = 8,   // input plane is ISZ x ISZ
  parameter int unsigned WIN  = 2,   // window size
  parameter int unsigned STR  = 2,   // stride
  parameter int unsigned OL   = 2,   // partitions of the destination buffer
  parameter bit          RELU = 1'b1,
  localparam int unsigned OSZ = (ISZ - WIN) / STR + 1,
  localparam int unsigned IAW = idx_w(NPL * ISZ * ISZ),
  localparam int unsigned OCH = (NPL + OL - 1) / OL,
  localparam int unsigned OAW = idx_w(OCH * OSZ * OSZ),
  localparam int unsigned LW  = idx_w(OL)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // source buffer (one partition)
  output logic           in_re,
  output logic [IAW-1:0] in_addr,
  input  fx_t            in_rdata,
  // destination buffer (OL partitions)
  output logic           out_we,
  output logic [LW-1:0]  out_lane,
  output logic [OAW-1:0] out_addr,
  output fx_t            out_wdata
);
  localparam int unsigned PW = idx_w(NPL);
  localparam int unsigned SW = idx_w(OSZ);
  localparam int unsigned WW = idx_w(WIN);
  localparam int unsigned CW = idx_w(OCH);

  // stage A
  logic           run;
  logic [PW-1:0]  p;
  logic [LW-1:0]  p_lane;   // p % OL
  logic [CW-1:0]  p_chunk;  // p / OL
  logic [SW-1:0]  y, x;
  logic [WW-1:0]  u, v;
  logic           a_first, a_last, a_final;

  always_comb begin
    a_first = (u == '0) && (v == '0);
    a_last  = (32'(u) == WIN - 1) && (32'(v) == WIN - 1);
    a_final = a_last && (32'(p) == NPL - 1) && (32'(y) == OSZ - 1) && (32'(x) == OSZ - 1);
    in_re   = run;
    in_addr = IAW'(32'(p) * ISZ * ISZ + (32'(y) * STR + 32'(u)) * ISZ + 32'(x) * STR + 32'(v));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      p <= '0; p_lane <= '0; p_chunk <= '0; y <= '0; x <= '0; u <= '0; v <= '0;
    end else if (!run) begin
      if (start && !busy) begin
        run <= 1'b1;
        p <= '0; p_lane <= '0; p_chunk <= '0; y <= '0; x <= '0; u <= '0; v <= '0;
      end
    end else begin
      if (a_final) run <= 1'b0;
      if (32'(v) != WIN - 1) v <= v + 1'b1;
      else begin
        v <= '0;
        if (32'(u) != WIN - 1) u <= u + 1'b1;
        else begin
          u <= '0;
          if (32'(x) != OSZ - 1) x <= x + 1'b1;
          else begin
            x <= '0;
            if (32'(y) != OSZ - 1) y <= y + 1'b1;
            else begin
              y <= '0;
              p <= p + 1'b1;
              if (32'(p_lane) != OL - 1) p_lane <= p_lane + 1'b1;
              else begin
                p_lane  <= '0;
                p_chunk <= p_chunk + 1'b1;
              end
            end
          end
        end
      end
    end
  end

  // stage B: running maximum
  logic           b_valid, b_first, b_last, b_final;
  logic [LW-1:0]  b_lane;
  logic [OAW-1:0] b_addr;
  fx_t            cur, nxt;

  always_comb begin
    nxt       = b_first ? in_rdata : max_f(cur, in_rdata);
    out_we    = b_valid && b_last;
    out_lane  = b_lane;
    out_addr  = b_addr;
    out_wdata = RELU ? relu_f(nxt) : nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid <= 1'b0; b_first <= 1'b0; b_last <= 1'b0; b_final <= 1'b0;
      b_lane <= '0; b_addr <= '0; cur <= '0; done <= 1'b0;
    end else begin
      b_valid <= run;
      b_first <= a_first;
      b_last  <= a_last;
      b_final <= run && a_final;
      b_lane  <= p_lane;
      b_addr  <= OAW'(32'(p_chunk) * OSZ * OSZ + 32'(y) * OSZ + 32'(x));
      if (b_valid) cur <= nxt;
      done    <= b_valid && b_final;
    end
  end

  assign busy = run || b_valid || done;
endmodule
