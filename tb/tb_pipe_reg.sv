// tb_pipe_reg - random data through a 3-deep, 8-bit pipeline register: the
// output must equal the input of three cycles earlier, and the reset value
// must appear until the first data has passed.
module tb_pipe_reg;
  localparam int unsigned DEPTH = 3;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] d = '0, q;
  int checks = 0, failures = 0;
  logic [7:0] hist [$];

  pipe_reg #(.W(8), .DEPTH(DEPTH), .RST_VAL(8'hA5)) dut (.clk, .rst, .d, .q);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(q == 8'hA5, "reset value");
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      d = 8'($urandom);
      hist.push_back(d);
      @(negedge clk);
      if (n < DEPTH - 1) check(q == 8'hA5, "reset value still in pipe");
      else check(q == hist[n - (DEPTH - 1)], $sformatf("n=%0d q=%h", n, q));
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
