// qpsk_top - digitized-carrier QPSK modulator without multipliers.
//
// Instead of multiplying I and Q bits onto two quadrature carriers and summing
// them, this modulator reads a single sine table and applies the QPSK phase
// shift as an address offset:
//
//   clk_counter -> drbg -> [reg] -> sipo -> [reg] -> phase_mux -> [reg] -+
//                                                  (PHASE_NUMBERS)        |
//   sample_counter ---------------------------------------> [reg] -> phase_adder
//                                                                         |
//                                                     carrier_gen (sine table)
//                                                                         |
//                                                       qpsk_sample -> external DAC
//
// clk_counter slows the clock to the bit rate; drbg supplies pseudo-random
// data bits; sipo groups them into dibits {I,Q}; phase_mux picks the phase
// number of the dibit; sample_counter counts samples of the carrier; the adder
// forms sample + phase modulo one carrier period; carrier_gen turns that into
// the carrier amplitude. The [reg] stages are the pipeline registers the
// proposed system adds between the blocks to shorten its critical paths.
// The block structure follows the published design; bit source, phase map,
// sizes and the pipeline placement details are this design's choices.
//
// Ports: clk is the sample clock (one output sample per cycle, Fs = clk);
// rst is synchronous and active high. qpsk_phase is the phase-shifted sample
// number (the table address), qpsk_sample the 10-bit offset-binary carrier
// sample for the DAC, one cycle after qpsk_phase.
//
// Timing, counting clock edges t = 1, 2, ... after rst falls, with
// SYM = 2*BIT_DIV and b1, b2, ... the data bits in the order drbg makes them:
//   qpsk_phase(t) = (t - 2 + PHASE_NUMBERS[sym(t)]) mod 2**PHASE_W   for t >= 2
//   sym(t) = {b(2k+1), b(2k+2)} for SYM*(k+1) + 6 <= t < SYM*(k+2) + 6,
//            00 before the first symbol.
//   qpsk_sample(t) = TABLE[qpsk_phase(t-1)].
// One symbol lasts SYM = 1024 clocks by default, i.e. one carrier period.
module qpsk_top
  import qpsk_pkg::*;
#(
  parameter int unsigned BIT_DIV = 512,     // sample clocks per data bit
  parameter logic [6:0]  SEED    = 7'h7F    // drbg start state
) (
  input  logic    clk,
  input  logic    rst,
  output phase_t  qpsk_phase,
  output sample_t qpsk_sample
);

  logic   bit_en;
  logic   data_bit, data_valid;
  logic   data_bit_r, data_valid_r;
  dibit_t sym, sym_r;
  logic   sym_valid;
  phase_t phase_sel, phase_r;
  phase_t count, count_r;

  // ---- data path: bit source, serial-to-parallel, phase selection ----
  clk_counter #(.DIV(BIT_DIV)) u_clk_counter (
    .clk, .rst, .bit_en
  );

  drbg #(.SEED(SEED)) u_drbg (
    .clk, .rst, .en(bit_en), .bit_o(data_bit), .valid_o(data_valid)
  );

  pipe_reg #(.W(2)) u_reg_bit (
    .clk, .rst, .d({data_valid, data_bit}), .q({data_valid_r, data_bit_r})
  );

  sipo #(.W(2)) u_sipo (
    .clk, .rst, .valid_i(data_valid_r), .bit_i(data_bit_r),
    .par_o(sym), .par_valid(sym_valid)
  );

  pipe_reg #(.W(2)) u_reg_sym (
    .clk, .rst, .d(sym), .q(sym_r)
  );

  phase_mux u_phase_mux (
    .phase_num(PHASE_NUMBERS), .sel(sym_r), .phase_o(phase_sel)
  );

  pipe_reg #(.W(PHASE_W), .RST_VAL(PHASE_NUMBERS[0])) u_reg_phase (
    .clk, .rst, .d(phase_sel), .q(phase_r)
  );

  // ---- carrier path: sample numbers, phase shift, carrier table ----
  sample_counter #(.W(PHASE_W)) u_sample_counter (
    .clk, .rst, .fs_en(1'b1), .count
  );

  pipe_reg #(.W(PHASE_W)) u_reg_count (
    .clk, .rst, .d(count), .q(count_r)
  );

  phase_adder #(.W(PHASE_W)) u_phase_adder (
    .clk, .rst, .sample(count_r), .phase(phase_r), .sum(qpsk_phase)
  );

  carrier_gen #(.AW(PHASE_W), .DW(SAMPLE_W)) u_carrier_gen (
    .clk, .rst, .addr(qpsk_phase), .sample(qpsk_sample)
  );

  // sym_valid marks each new symbol; the SIPO holds its output between
  // symbols, so the strobe is only used for checking here.
  property p_symbol_period;
    @(posedge clk) disable iff (rst) sym_valid |-> ##1 !sym_valid [* (2*BIT_DIV - 1)];
  endproperty
  a_symbol_period: assert property (p_symbol_period)
    else $error("qpsk_top: symbols closer than 2*BIT_DIV clocks");

endmodule
