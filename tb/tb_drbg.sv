// tb_drbg - checks the bit source against the PRBS7 recurrence
// a(n+7) = a(n) xor a(n+1), started from the seed, with enable pulses at
// random intervals; checks that valid_o follows en by one cycle, that the
// output holds without en, and that the sequence repeats after 127 bits.
module tb_drbg;
  localparam logic [6:0] SEED = 7'h5A;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, bit_o, valid_o;
  int checks = 0, failures = 0;
  bit a [$];      // reference sequence a(0), a(1), ...
  bit got [$];    // bits produced by the DUT

  drbg #(.SEED(SEED)) dut (.clk, .rst, .en, .bit_o, .valid_o);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic last_bit;
    int   same;
    // a(0) is the oldest bit of the seed (its MSB)
    for (int i = 6; i >= 0; i--) a.push_back(SEED[i]);
    for (int n = 0; n < 400; n++) a.push_back(a[n] ^ a[n+1]);

    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(valid_o == 1'b0, "valid_o without en");
    while (got.size() < 300) begin
      en = ($urandom_range(0, 2) == 0);
      last_bit = bit_o;
      @(negedge clk);
      if (en) begin
        en = 1'b0;
        check(valid_o == 1'b1, "valid_o one cycle after en");
        check(bit_o == a[7 + got.size()],
              $sformatf("bit %0d: got %0b expected %0b", got.size(), bit_o, a[7 + got.size()]));
        got.push_back(bit_o);
      end else begin
        check(valid_o == 1'b0, "valid_o without en");
        check(bit_o == last_bit, "bit_o changed without en");
      end
    end
    // maximal length: the sequence has period 127 and not less
    for (int n = 0; n < 100; n++) check(got[n] == got[n + 127], "period 127");
    same = 1;
    for (int n = 0; n < 127; n++) if (got[n] != got[n + 63]) same = 0;
    check(same == 0, "sequence must not repeat after 63 bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
