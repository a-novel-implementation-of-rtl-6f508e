// sipo - serial-in parallel-out shift register that forms QPSK symbols.
//
// Data bits arrive one at a time with a valid strobe. Bits are shifted into a
// W-bit shift register; after every W bits the register is copied to the
// parallel output par_o, which then holds steady until the next W bits are
// complete, and par_valid pulses for one cycle. The first bit received lands in
// the most significant position, so for W = 2 par_o = {I, Q}: the first bit of
// the pair is the in-phase bit and the second the quadrature bit.
//
// The published design uses a SIPO to turn the serial data into the two bits of
// a symbol; the bit order and the holding output register are this design's
// choices.
//
// Timing: par_o and par_valid update on the clock edge that accepts the W-th
// bit. Synchronous active-high reset clears everything (par_o = 0).
module sipo #(
  parameter int unsigned W = 2  // bits per symbol, >= 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         valid_i,
  input  logic         bit_i,
  output logic [W-1:0] par_o,
  output logic         par_valid
);

  localparam int unsigned NW = $clog2(W);

  // The first W-1 bits of a symbol wait here; the W-th goes straight to par_o.
  logic [W-2:0]  shreg;
  logic [NW-1:0] nbits;
  logic [W-1:0]  shreg_next;

  assign shreg_next = {shreg, bit_i};

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '0;
      nbits     <= '0;
      par_o     <= '0;
      par_valid <= 1'b0;
    end else begin
      par_valid <= 1'b0;
      if (valid_i) begin
        shreg <= shreg_next[W-2:0];
        if (nbits == NW'(W - 1)) begin
          nbits     <= '0;
          par_o     <= shreg_next;
          par_valid <= 1'b1;
        end else begin
          nbits <= nbits + 1'b1;
        end
      end
    end
  end

endmodule
