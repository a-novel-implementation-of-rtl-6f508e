// tb_sipo - feeds random bits with random gaps and checks that every pair of
// bits appears as {first, second} on par_o with a one-cycle par_valid on the
// edge that takes the second bit, and that par_o holds in between.
module tb_sipo;
  logic clk = 1'b0, rst = 1'b1, valid_i = 1'b0, bit_i = 1'b0, par_valid;
  logic [1:0] par_o;
  int checks = 0, failures = 0, nbits = 0, nsym = 0;
  logic first;
  logic [1:0] expect_par = 2'b00;

  sipo #(.W(2)) dut (.clk, .rst, .valid_i, .bit_i, .par_o, .par_valid);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic sent_valid, sent_bit;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(par_o == 2'b00 && !par_valid, "reset state");
    repeat (400) begin
      valid_i = ($urandom_range(0, 1) == 1);
      bit_i   = 1'($urandom);
      sent_valid = valid_i;
      sent_bit   = bit_i;
      @(negedge clk);
      valid_i = 1'b0;
      if (sent_valid) begin
        nbits++;
        if (nbits % 2 == 1) begin
          first = sent_bit;
          check(!par_valid, "par_valid after first bit");
        end else begin
          expect_par = {first, sent_bit};
          nsym++;
          check(par_valid, "par_valid after second bit");
        end
      end else begin
        check(!par_valid, "par_valid without input");
      end
      check(par_o == expect_par, $sformatf("par_o=%b expected %b", par_o, expect_par));
    end
    check(nsym > 50, "enough symbols");
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
