// tb_qpsk_top - end-to-end check of the QPSK modulator at its default sizes
// (1024-sample carrier period, 512 clocks per bit, 1024 clocks per symbol).
//
// An independent reference generates the PRBS7 data bits (recurrence
// a(n+7) = a(n) xor a(n+1) from the seed), pairs them into Gray-mapped
// symbols, and predicts for every clock edge t after reset
//   qpsk_phase(t)  = (t - 2 + phase of the current symbol) mod 1024
//   qpsk_sample(t) = round(511*sin(2*pi*qpsk_phase(t-1)/1024)) + 512
// with symbol k in force from edge 1024*(k+1) + 6 on. It runs 260 symbols
// (two full periods of the bit sequence) and counts the mechanisms the
// design relies on: serial-to-parallel symbol formation, each of the four
// phases selected, phase jumps at symbol changes and carrier wrap-arounds.
// A mechanism that never occurs counts as a failure.
module tb_qpsk_top;
  localparam int N       = 1024;   // samples per carrier period
  localparam int BIT_DIV = 512;    // default of qpsk_top
  localparam int SYM     = 2 * BIT_DIV;
  localparam int LAT     = 6;      // data path latency to qpsk_phase
  localparam int NSYM    = 260;
  localparam logic [6:0] SEED = 7'h7F;

  logic clk = 1'b0, rst = 1'b1;
  logic [9:0] qpsk_phase, qpsk_sample;

  qpsk_top dut (.clk, .rst, .qpsk_phase, .qpsk_sample);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int sym_seen [4] = '{0, 0, 0, 0};
  int jumps = 0, wraps = 0, symbols = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Gray map: 00 -> 45, 01 -> 135, 11 -> 225, 10 -> 315 degrees
  function automatic int phase_of(input int s);
    case (s)
      0: return N / 8;
      1: return 3 * N / 8;
      3: return 5 * N / 8;
      default: return 7 * N / 8;
    endcase
  endfunction

  function automatic int sine(input int i);
    return $rtoi(511.0 * $sin(6.283185307179586 * real'(i) / real'(N)) + 512.0 + 0.5);
  endfunction

  bit a [$];

  initial begin
    int t, k, s, want, prev_phase, prev_sym;
    for (int i = 6; i >= 0; i--) a.push_back(SEED[i]);
    for (int n = 0; n < 2 * NSYM + 16; n++) a.push_back(a[n] ^ a[n+1]);

    repeat (4) @(negedge clk);
    rst = 1'b0;
    prev_phase = -1;
    prev_sym   = 0;
    for (t = 1; t <= SYM * (NSYM + 1) + LAT - 1; t++) begin
      @(negedge clk);
      // current symbol index k: symbol k (bits b(2k+1), b(2k+2)) from edge SYM*(k+1)+LAT
      k = (t >= SYM + LAT) ? (t - LAT) / SYM - 1 : -1;
      s = (k < 0) ? 0 : 2 * int'(a[7 + 2*k]) + int'(a[8 + 2*k]);
      if (t >= 2) begin
        want = (t - 2 + phase_of(s)) % N;
        check(qpsk_phase == 10'(want),
              $sformatf("t=%0d phase=%0d expected %0d (symbol %0d = %b)", t, qpsk_phase, want, k, 2'(s)));
      end
      if (t >= 3 && prev_phase >= 0) begin
        check(qpsk_sample == 10'(sine(prev_phase)),
              $sformatf("t=%0d sample=%0d expected %0d", t, qpsk_sample, sine(prev_phase)));
      end
      // mechanisms
      if (k >= 0 && t == SYM * (k + 1) + LAT) begin
        symbols++;
        sym_seen[s]++;
        if (s != prev_sym) jumps++;
        prev_sym = s;
      end
      if (prev_phase == N - 1 && qpsk_phase == 10'd0) wraps++;
      prev_phase = int'(qpsk_phase);
    end
    $display("symbols=%0d (00:%0d 01:%0d 10:%0d 11:%0d) phase_jumps=%0d carrier_wraps=%0d cycles=%0d",
             symbols, sym_seen[0], sym_seen[1], sym_seen[2], sym_seen[3], jumps, wraps, t - 1);
    check(symbols == NSYM, "one symbol every 1024 clocks");
    for (int i = 0; i < 4; i++) check(sym_seen[i] > 0, $sformatf("phase %0d never selected", i));
    check(jumps > 0, "no phase jump at a symbol change");
    check(wraps > 0, "no carrier wrap-around");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SYM * (NSYM + 4)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
