// burst_writer: copies the class scores from the on-chip result buffer back to
// off-chip global memory, where the host reads them.
//
// NWORDS words go to byte address base onward in bursts of at most MAXB beats
// over a simple valid/ready write bus (address channel aw_*, data channel w_*
// with w_last on the final beat of each burst; aw_len is beats-1). The buffer
// has one cycle read latency and is read one word ahead of each beat, so a
// beat takes two cycles when the bus does not stall. Writing results back in
// bursts mirrors the input side of the accelerator's memory scheme; the bus,
// the one-burst-at-a-time protocol and the two-cycle beat are this design's.
//
// Timing: done pulses the cycle after the last beat is accepted.
module burst_writer
  import hhr_pkg::*;
#(
  parameter int unsigned NWORDS = 2350,
  parameter int unsigned MAXB   = 256,
  localparam int unsigned MAW = idx_w(NWORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [31:0]    base,
  output logic           busy,
  output logic           done,
  // on-chip buffer read port (one cycle latency)
  output logic           mem_re,
  output logic [MAW-1:0] mem_addr,
  input  fx_t            mem_rdata,
  // global-memory write bus
  output logic           aw_valid,
  input  logic           aw_ready,
  output logic [31:0]    aw_addr,
  output logic [7:0]     aw_len,
  output logic           w_valid,
  input  logic           w_ready,
  output logic [31:0]    w_data,
  output logic           w_last
);
  typedef enum logic [1:0] {W_IDLE, W_ADDR, W_READ, W_BEAT} wstate_e;
  wstate_e st;

  logic [31:0] issued;   // words covered by bursts announced so far
  logic [31:0] sent;     // words accepted so far
  logic [8:0]  blen;

  always_comb begin
    blen     = ((NWORDS - issued) > MAXB) ? 9'(MAXB) : 9'(NWORDS - issued);
    aw_valid = (st == W_ADDR);
    aw_addr  = base + (issued << 2);
    aw_len   = 8'(blen - 9'd1);
    mem_re   = (st == W_READ);
    mem_addr = MAW'(sent);
    w_valid  = (st == W_BEAT);
    w_data   = 32'(mem_rdata);
    w_last   = (sent + 1 == issued);
    busy     = (st != W_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= W_IDLE; issued <= '0; sent <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        W_IDLE: if (start) begin
          issued <= '0; sent <= '0; st <= W_ADDR;
        end
        W_ADDR: if (aw_ready) begin
          issued <= issued + 32'(blen);
          st <= W_READ;
        end
        W_READ: st <= W_BEAT;
        W_BEAT: if (w_ready) begin
          sent <= sent + 1;
          if (sent + 1 == NWORDS) begin
            st <= W_IDLE; done <= 1'b1;
          end else if (sent + 1 == issued) st <= W_ADDR;
          else st <= W_READ;
        end
        default: st <= W_IDLE;
      endcase
    end
  end

  // assertions are checked from the first cycle after reset
  logic chk_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chk_en <= 1'b0;
    else        chk_en <= 1'b1;
  end

  property p_w_hold;
    @(posedge clk) disable iff (!chk_en) w_valid && !w_ready |=> w_valid && $stable(w_data) && $stable(w_last);
  endproperty
  a_w_hold: assert property (p_w_hold);

  property p_aw_hold;
    @(posedge clk) disable iff (!chk_en) aw_valid && !aw_ready |=> aw_valid && $stable(aw_addr);
  endproperty
  a_aw_hold: assert property (p_aw_hold);
endmodule
