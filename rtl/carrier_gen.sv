// carrier_gen - digitized carrier generator: a one-period sine look-up table.
//
// The table holds 2**AW samples of one carrier period,
//   TABLE[i] = round((2**(DW-1) - 1) * sin(2*pi*i / 2**AW)) + 2**(DW-1),
// in offset binary (mid-scale 2**(DW-1) is zero amplitude), ready for a
// unipolar DAC. It is computed at elaboration, so changing AW or DW needs no
// data file. Addressing it with the sample number plus a phase number gives the
// carrier shifted by that phase.
//
// The published design names this block and a look-up table but gives neither
// its contents nor its sizes; the sine shape, the offset-binary format and the
// sizes are this design's choices.
//
// Timing: registered read, one cycle from addr to sample; the synchronous
// active-high reset sets the output to mid-scale.
module carrier_gen #(
  parameter int unsigned AW = qpsk_pkg::PHASE_W,
  parameter int unsigned DW = qpsk_pkg::SAMPLE_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] sample
);

  typedef logic [DW-1:0] table_t [2**AW];

  function automatic table_t make_table();
    table_t t;
    real    amp;
    real    mid;
    amp = real'(2 ** (DW - 1)) - 1.0;
    mid = real'(2 ** (DW - 1));
    for (int i = 0; i < 2 ** AW; i++) begin
      real s;
      s    = $sin(2.0 * 3.14159265358979323846 * real'(i) / real'(2 ** AW));
      t[i] = DW'($rtoi(amp * s + mid + 0.5));
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  always_ff @(posedge clk) begin
    if (rst) sample <= DW'(2 ** (DW - 1));
    else     sample <= TABLE[addr];
  end

endmodule
