// tb_carrier_gen - reads every address of the 1024 x 10-bit sine table and
// compares it with round(511*sin(2*pi*i/1024)) + 512 computed here, plus the
// four quadrant points (512, 1023, 512, 1) and the one-cycle read latency.
module tb_carrier_gen;
  logic clk = 1'b0, rst = 1'b1;
  logic [9:0] addr = '0, sample;
  int checks = 0, failures = 0;

  carrier_gen #(.AW(10), .DW(10)) dut (.clk, .rst, .addr, .sample);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int expected(input int i);
    real v;
    v = 511.0 * $sin(6.283185307179586 * real'(i) / 1024.0) + 512.0;
    return $rtoi(v + 0.5);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    check(sample == 10'd512, "reset to mid-scale");
    rst = 1'b0;
    for (int i = 0; i < 1024; i++) begin
      addr = 10'(i);
      @(negedge clk);
      check(sample == 10'(expected(i)), $sformatf("addr %0d: %0d expected %0d", i, sample, expected(i)));
    end
    addr = 10'd0;   @(negedge clk); check(sample == 10'd512,  "sin 0");
    addr = 10'd256; @(negedge clk); check(sample == 10'd1023, "sin 90");
    addr = 10'd512; @(negedge clk); check(sample == 10'd512,  "sin 180");
    addr = 10'd768; @(negedge clk); check(sample == 10'd1,    "sin 270");
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
