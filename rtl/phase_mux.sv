// phase_mux - the 4:1 multiplexer that applies the QPSK phase shift.
//
// Selects one of the four phase numbers with the current symbol (dibit). This
// multiplexer replaces the two multipliers of an I/Q modulator: the phase shift
// is applied as an address offset into the carrier table instead of by mixing.
// Purely combinational; in the top it is followed by a pipeline register.
module phase_mux
  import qpsk_pkg::*;
(
  input  phase_t phase_num [4],  // phase numbers, indexed by dibit value
  input  dibit_t sel,            // current symbol {I, Q}
  output phase_t phase_o
);

  always_comb begin
    unique case (sel)
      2'd0: phase_o = phase_num[0];
      2'd1: phase_o = phase_num[1];
      2'd2: phase_o = phase_num[2];
      2'd3: phase_o = phase_num[3];
    endcase
  end

endmodule
