// qpsk_pkg - widths, types and constants shared by the digitized-carrier QPSK
// modulator.
//
// The modulator forms every output sample by adding a phase number to a
// free-running sample number and looking the sum up in a one-period sine table.
// One carrier period is 2**PHASE_W samples, so a phase number is a phase shift
// expressed in samples: a quarter period (PHASE_N/4) is 90 degrees.
//
// PHASE_W = 10 and SAMPLE_W = 10 follow the 10-bit modulator output seen in the
// published simulation. The symbol-to-phase map is this design's own choice:
// Gray-coded, with the four phases at 45, 135, 225 and 315 degrees, so that
// neighbouring phases differ in one bit.
//
//   dibit {I,Q}   phase    phase number (PHASE_N = 1024)
//      00          45 deg      128
//      01         135 deg      384
//      11         225 deg      640
//      10         315 deg      896
package qpsk_pkg;

  // Width of a sample number / table address: one carrier period is 2**PHASE_W samples.
  parameter int unsigned PHASE_W  = 10;
  parameter int unsigned PHASE_N  = 2 ** PHASE_W;
  // Width of one carrier sample handed to the DAC (offset binary).
  parameter int unsigned SAMPLE_W = 10;

  typedef logic [1:0]          dibit_t;   // {first bit (I), second bit (Q)}
  typedef logic [PHASE_W-1:0]  phase_t;   // sample number or phase in samples
  typedef logic [SAMPLE_W-1:0] sample_t;  // carrier amplitude, offset binary

  typedef phase_t phase_table_t [4];

  // Phase number for dibit d: the Gray-mapped phase (2*k+1)*45 degrees,
  // k = 0,1,2,3 for d = 00,01,11,10.
  function automatic phase_t phase_number(input dibit_t d);
    int unsigned k;
    case (d)
      2'b00:   k = 0;
      2'b01:   k = 1;
      2'b11:   k = 2;
      default: k = 3;
    endcase
    return phase_t'(((2 * k + 1) * PHASE_N) / 8);
  endfunction

  // The four phase numbers, indexed by the dibit value.
  parameter phase_table_t PHASE_NUMBERS = '{
    phase_number(2'b00), phase_number(2'b01), phase_number(2'b10), phase_number(2'b11)
  };

endpackage
