// tb_phase_adder - random operands; the registered sum must equal
// (sample + phase) mod 1024 one cycle later. Overflowing sums are counted.
module tb_phase_adder;
  logic clk = 1'b0, rst = 1'b1;
  logic [9:0] sample = '0, phase = '0, sum;
  int checks = 0, failures = 0, overflows = 0;

  phase_adder #(.W(10)) dut (.clk, .rst, .sample, .phase, .sum);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int s, p;
    repeat (3) @(negedge clk);
    check(sum == '0, "reset value");
    rst = 1'b0;
    repeat (500) begin
      s = $urandom_range(0, 1023);
      p = $urandom_range(0, 1023);
      sample = 10'(s);
      phase  = 10'(p);
      @(negedge clk);
      if (s + p >= 1024) overflows++;
      check(sum == 10'((s + p) % 1024), $sformatf("%0d+%0d gave %0d", s, p, sum));
    end
    check(overflows > 0, "wrap-around exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
