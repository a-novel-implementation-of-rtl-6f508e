// sample_counter - free-running sample-number counter.
//
// Counts sample numbers 0, 1, ..., 2**W - 1, 0, ... advancing once per cycle in
// which the sample strobe fs_en is high. The count is the phase of the
// unshifted carrier in samples: one wrap is one carrier period. In the top the
// strobe is tied high, so the sample rate Fs equals the clock rate.
//
// Timing: registered count, synchronous active-high reset to 0. The published
// design clocks this counter with Fs; the strobe input is this design's way of
// keeping one clock domain.
module sample_counter #(
  parameter int unsigned W = qpsk_pkg::PHASE_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         fs_en,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst)        count <= '0;
    else if (fs_en) count <= count + 1'b1;
  end

endmodule
