// pipe_reg - pipeline register of configurable width and depth.
//
// Delays its input by DEPTH clock cycles (DEPTH = 0 is a wire). The proposed
// modulator places such registers between its stages (bit source, SIPO,
// multiplexer, counter) to shorten the combinational paths and raise the clock
// rate. Synchronous active-high reset clears every stage to RST_VAL.
module pipe_reg #(
  parameter int unsigned W       = 1,
  parameter int unsigned DEPTH   = 1,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < DEPTH; i++) stage[i] <= RST_VAL;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[DEPTH-1];
  end

endmodule
