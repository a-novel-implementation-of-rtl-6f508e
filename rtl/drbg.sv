// drbg - deterministic random bit generator, the serial data source.
//
// A Fibonacci linear-feedback shift register with the PRBS7 polynomial
// x^7 + x^6 + 1 (period 127). Each time en is high the register shifts by one
// and the feedback bit becomes the new data bit. The published design names a
// DRBG as its bit source but does not say how it is built; the LFSR, its
// polynomial and its seed are this design's choices.
//
// Interface: bit_o is the most recent data bit, valid_o is high for the one
// cycle after each en pulse in which a new bit_o appeared.
// Timing: registered outputs, one cycle from en to bit_o/valid_o. The
// synchronous active-high reset loads SEED (which must be non-zero).
module drbg #(
  parameter logic [6:0] SEED = 7'h7F
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic bit_o,
  output logic valid_o
);

  logic [6:0] state;
  logic       fb;

  assign fb = state[6] ^ state[5];

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= SEED;
      bit_o   <= 1'b0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= en;
      if (en) begin
        state <= {state[5:0], fb};
        bit_o <= fb;
      end
    end
  end

endmodule
