// lane_ram: on-chip buffer split into LANES independent partitions.
//
// A large array is cut into LANES smaller memories (one block-RAM group each)
// so that an unrolled loop can read LANES words in the same cycle. Element e of
// the logical array lives in partition e % LANES at word e / LANES; the caller
// computes that mapping. Reads are synchronous: all partitions are read at the
// same word address and the data appear one cycle after re. Writes go to a
// single partition selected by wlane. A read and a write of the same word in
// one cycle return the old contents (read-first). Partitioning an array to
// match the unroll factor follows the accelerator's memory scheme; the single
// write port and the shared read address are this design's choices.
module lane_ram
  import hhr_pkg::*;
#(
  parameter int unsigned LANES = 4,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LW = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic          clk,
  // write port
  input  logic          we,
  input  logic [LW-1:0] wlane,
  input  logic [AW-1:0] waddr,
  input  fx_t           wdata,
  // read port, all lanes at one address, one cycle latency
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output fx_t           rdata [LANES]
);
  for (genvar l = 0; l < LANES; l++) begin : g_part
    fx_t mem [DEPTH];

    always_ff @(posedge clk) begin
      if (we && wlane == LW'(l)) mem[waddr] <= wdata;
      if (re) rdata[l] <= mem[raddr];
    end
  end

  always_ff @(posedge clk) begin
    if (we) begin
      assert (32'(wlane) < LANES) else $error("lane_ram: write lane %0d out of range", wlane);
      assert (32'(waddr) < DEPTH) else $error("lane_ram: write address %0d out of range", waddr);
    end
    if (re) assert (32'(raddr) < DEPTH) else $error("lane_ram: read address %0d out of range", raddr);
  end
endmodule
