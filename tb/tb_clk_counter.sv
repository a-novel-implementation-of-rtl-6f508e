// tb_clk_counter - checks that bit_en pulses for exactly one cycle every DIV
// clocks, first after clock edge DIV counted from reset release, and that a
// reset in mid-count restarts the division.
module tb_clk_counter;
  localparam int unsigned DIV = 7;
  logic clk = 1'b0, rst = 1'b1, bit_en;
  int checks = 0, failures = 0, t = 0, pulses = 0;

  clk_counter #(.DIV(DIV)) dut (.clk, .rst, .bit_en);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0d: %s", t, what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // edges t = 1 .. 10*DIV
    for (t = 1; t <= 10 * DIV; t++) begin
      @(negedge clk);
      check(bit_en == ((t % DIV) == 0), $sformatf("bit_en=%0b", bit_en));
      pulses += int'(bit_en);
    end
    check(pulses == 10, $sformatf("pulses=%0d, expected 10", pulses));
    // reset in the middle of a bit period restarts the count
    repeat (3) @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    check(bit_en == 1'b0, "bit_en during reset");
    rst = 1'b0;
    for (t = 1; t <= 2 * DIV; t++) begin
      @(negedge clk);
      check(bit_en == ((t % DIV) == 0), $sformatf("after re-reset bit_en=%0b", bit_en));
    end
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
