// phase_adder - adds the phase number to the sample number.
//
// sum = (sample + phase) mod 2**W. Because the sine table holds exactly one
// carrier period of 2**W samples, dropping the carry is the wrap-around of the
// carrier phase. The sum is the table address of the phase-shifted carrier.
//
// Timing: registered output, one cycle of latency; synchronous active-high
// reset clears it. The output register is one of the pipeline registers of
// the proposed system.
module phase_adder #(
  parameter int unsigned W = qpsk_pkg::PHASE_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] sample,
  input  logic [W-1:0] phase,
  output logic [W-1:0] sum
);

  always_ff @(posedge clk) begin
    if (rst) sum <= '0;
    else     sum <= sample + phase;
  end

endmodule
