// burst_loader: copies the input image from off-chip global memory into the
// on-chip input buffer before any computation starts ("memory localization").
//
// NWORDS 32-bit words starting at byte address base are fetched in bursts of at
// most MAXB beats over a simple valid/ready read bus (address channel ar_*, data
// channel r_*; ar_len is beats-1, consecutive words are 4 bytes apart). One
// burst is outstanding at a time. Each arriving word is optionally converted
// from IEEE-754 single precision to fixed point (CONVERT=1, see fp2fix) and
// written to the buffer at the next word address. Fetching the whole input in
// bursts ahead of computation follows the accelerator's memory scheme; the bus
// and the in-line conversion are this design's.
//
// Timing: done pulses the cycle after the last word is written. The bus may
// stall (r_valid low, ar_ready low) for any number of cycles.
module burst_loader
  import hhr_pkg::*;
#(
  parameter int unsigned NWORDS  = 4096,
  parameter int unsigned MAXB    = 256,   // beats per burst, at most 256
  parameter bit          CONVERT = 1'b1,
  localparam int unsigned MAW = idx_w(NWORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [31:0]    base,
  output logic           busy,
  output logic           done,
  // global-memory read bus
  output logic           ar_valid,
  input  logic           ar_ready,
  output logic [31:0]    ar_addr,
  output logic [7:0]     ar_len,
  input  logic           r_valid,
  output logic           r_ready,
  input  logic [31:0]    r_data,
  input  logic           r_last,
  // on-chip buffer write port
  output logic           mem_we,
  output logic [MAW-1:0] mem_addr,
  output fx_t            mem_wdata
);
  typedef enum logic [1:0] {L_IDLE, L_ADDR, L_DATA} lstate_e;
  lstate_e st;

  logic [31:0] issued;    // words requested so far
  logic [31:0] recvd;     // words received so far
  logic [8:0]  blen;      // beats in the current burst
  fx_t         conv;

  fp2fix u_conv (.f(r_data), .x(conv));

  always_comb begin
    blen     = ((NWORDS - issued) > MAXB) ? 9'(MAXB) : 9'(NWORDS - issued);
    ar_valid = (st == L_ADDR);
    ar_addr  = base + (issued << 2);
    ar_len   = 8'(blen - 9'd1);
    r_ready  = (st == L_DATA);
    mem_we   = r_valid && r_ready;
    mem_addr = MAW'(recvd);
    mem_wdata = CONVERT ? conv : fx_t'(r_data);
    busy     = (st != L_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= L_IDLE; issued <= '0; recvd <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        L_IDLE: if (start) begin
          issued <= '0; recvd <= '0; st <= L_ADDR;
        end
        L_ADDR: if (ar_ready) begin
          issued <= issued + 32'(blen);
          st <= L_DATA;
        end
        L_DATA: if (r_valid) begin
          recvd <= recvd + 1;
          if (recvd + 1 == NWORDS) begin
            st <= L_IDLE; done <= 1'b1;
          end else if (recvd + 1 == issued) st <= L_ADDR;
        end
        default: st <= L_IDLE;
      endcase
    end
  end

  // assertions are checked from the first cycle after reset
  logic chk_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chk_en <= 1'b0;
    else        chk_en <= 1'b1;
  end

  // the last beat of a burst must be flagged, and only that one
  always_ff @(posedge clk) begin
    if (chk_en && mem_we)
      assert (r_last == (recvd + 1 == issued)) else $error("burst_loader: r_last misplaced");
  end

  // an address request is held until accepted
  property p_ar_hold;
    @(posedge clk) disable iff (!chk_en) ar_valid && !ar_ready |=> ar_valid && $stable(ar_addr);
  endproperty
  a_ar_hold: assert property (p_ar_hold);
endmodule
