// tb_sample_counter - drives the sample strobe at random and checks the count
// against a modulo-2**W reference, including several wrap-arounds.
module tb_sample_counter;
  localparam int unsigned W = 6;
  logic clk = 1'b0, rst = 1'b1, fs_en = 1'b0;
  logic [W-1:0] count;
  int checks = 0, failures = 0, ref_count = 0, wraps = 0;

  sample_counter #(.W(W)) dut (.clk, .rst, .fs_en, .count);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(count == '0, "reset value");
    repeat (600) begin
      fs_en = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (fs_en) begin
        ref_count = (ref_count + 1) % (2 ** W);
        if (ref_count == 0) wraps++;
      end
      check(count == W'(ref_count), $sformatf("count=%0d expected %0d", count, ref_count));
    end
    check(wraps >= 3, "wrapped");
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
