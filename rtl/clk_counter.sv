// clk_counter - bit-rate enable generator.
//
// Divides the system (sample) clock by DIV and emits a one-cycle pulse, bit_en,
// once every DIV cycles. The data source and the serial-to-parallel register
// advance on this pulse, so one data bit lasts DIV sample clocks and one QPSK
// symbol (two bits) lasts 2*DIV sample clocks.
//
// The block is the "Clk_counter" that feeds the bit source in the published
// schematics; how it divides is not specified there. This design uses a clock
// enable rather than a divided clock, so the whole modulator stays in one clock
// domain. DIV = 512 is this design's choice: with a 1024-sample carrier period
// one symbol then spans exactly one carrier period.
//
// Timing: counter cleared by the synchronous, active-high reset; bit_en is
// registered and is high in the cycle after the counter reaches DIV-1, i.e.
// after clock edges DIV, 2*DIV, 3*DIV, ... counted from reset release.
module clk_counter #(
  parameter int unsigned DIV = 512  // sample clocks per data bit, >= 2
) (
  input  logic clk,
  input  logic rst,
  output logic bit_en
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;
  logic          last;

  assign last = (cnt == CW'(DIV - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      bit_en <= 1'b0;
    end else begin
      cnt    <= last ? '0 : cnt + 1'b1;
      bit_en <= last;
    end
  end

endmodule
