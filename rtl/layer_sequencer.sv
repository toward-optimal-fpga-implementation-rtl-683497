// layer_sequencer: control unit of the recognizer kernel.
//
// On start it runs NST processing steps strictly one after another: it pulses
// go[k] for one cycle, waits for done_i[k], then moves to step k+1. In the
// recognizer the steps are: load the image, C1, P2, C3, P4, C5, P6, C7, P8, F9,
// F10, store the scores. After the last step it pulses done and reports in
// cycles the number of cycles from start to done, which is the recognition
// latency of one character. Running the layers one after another matches a
// kernel that calls the layer functions in order; the step handshake and the
// latency counter are this design's.
module layer_sequencer
  import hhr_pkg::*;
#(
  parameter int unsigned NST = 12,
  localparam int unsigned SW = idx_w(NST)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [NST-1:0] go,       // one-cycle start of each step
  input  logic [NST-1:0] done_i,   // one-cycle completion of each step
  output logic [SW-1:0] step,      // step now running
  output logic [31:0]   cycles     // latency of the last complete run
);
  logic        active;
  logic [31:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; step <= '0; go <= '0; done <= 1'b0; cnt <= '0; cycles <= '0;
    end else begin
      go   <= '0;
      done <= 1'b0;
      if (!active) begin
        if (start) begin
          active <= 1'b1; step <= '0; go[0] <= 1'b1; cnt <= 32'd1;
        end
      end else begin
        cnt <= cnt + 1;
        if (done_i[step]) begin
          if (32'(step) == NST - 1) begin
            active <= 1'b0; done <= 1'b1; cycles <= cnt + 1;
          end else begin
            step <= step + 1'b1;
            go[step + 1'b1] <= 1'b1;
          end
        end
      end
    end
  end

  assign busy = active;
endmodule
