// gmem_model: behavioural model of the off-chip global memory (testbench only).
//
// WORDS 32-bit words, byte-addressed (word = addr/4). Serves the read bus
// (ar_*, r_*) and the write bus (aw_*, w_*) used by the accelerator, one burst
// at a time per bus. When STALL is set, ready and valid are withheld at random
// (about one cycle in four) to exercise back-pressure; stall_cycles counts the
// cycles a beat was held back. The testbench reaches the array mem directly.
module gmem_model #(
  parameter int unsigned WORDS = 1024,
  parameter bit          STALL = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ar_valid,
  output logic        ar_ready,
  input  logic [31:0] ar_addr,
  input  logic [7:0]  ar_len,
  output logic        r_valid,
  input  logic        r_ready,
  output logic [31:0] r_data,
  output logic        r_last,
  input  logic        aw_valid,
  output logic        aw_ready,
  input  logic [31:0] aw_addr,
  input  logic [7:0]  aw_len,
  input  logic        w_valid,
  output logic        w_ready,
  input  logic [31:0] w_data,
  input  logic        w_last,
  output int unsigned stall_cycles,
  output int unsigned bursts,
  output int unsigned errors
);
  logic [31:0] mem [WORDS];

  logic        rd_act, wr_act;
  logic [31:0] rd_word, wr_word;
  int unsigned rd_left, wr_left;
  logic        gate_ar, gate_r, gate_aw, gate_w;

  always_ff @(posedge clk) begin
    gate_ar <= !STALL || ($urandom_range(3) != 0);
    gate_r  <= !STALL || ($urandom_range(3) != 0);
    gate_aw <= !STALL || ($urandom_range(3) != 0);
    gate_w  <= !STALL || ($urandom_range(3) != 0);
  end

  always_comb begin
    ar_ready = !rd_act && gate_ar;
    r_valid  = rd_act && gate_r;
    r_data   = (rd_word < WORDS) ? mem[rd_word] : 32'hDEAD_BEEF;
    r_last   = (rd_left == 1);
    aw_ready = !wr_act && gate_aw;
    w_ready  = wr_act && gate_w;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_act <= 1'b0; wr_act <= 1'b0; rd_word <= '0; wr_word <= '0;
      rd_left <= 0; wr_left <= 0; stall_cycles <= 0; bursts <= 0; errors <= 0;
    end else begin
      if ((rd_act && !gate_r) || (wr_act && w_valid && !gate_w)) stall_cycles <= stall_cycles + 1;
      if (ar_valid && ar_ready) begin
        rd_act <= 1'b1; rd_word <= ar_addr >> 2; rd_left <= int'(ar_len) + 1;
        bursts <= bursts + 1;
        if (ar_addr[1:0] != 2'b00) errors <= errors + 1;
      end else if (r_valid && r_ready) begin
        rd_word <= rd_word + 1;
        rd_left <= rd_left - 1;
        if (rd_left == 1) rd_act <= 1'b0;
      end
      if (aw_valid && aw_ready) begin
        wr_act <= 1'b1; wr_word <= aw_addr >> 2; wr_left <= int'(aw_len) + 1;
        bursts <= bursts + 1;
      end else if (w_valid && w_ready) begin
        if (wr_word < WORDS) mem[wr_word] <= w_data;
        else errors <= errors + 1;
        if (w_last != (wr_left == 1)) errors <= errors + 1;
        wr_word <= wr_word + 1;
        wr_left <= wr_left - 1;
        if (wr_left == 1) wr_act <= 1'b0;
      end
    end
  end
endmodule
