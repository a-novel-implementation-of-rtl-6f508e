// tb_phase_mux - checks the 4:1 selection for every select value, with the
// design's phase numbers (expected 128, 384, 896, 640 for dibits 00, 01, 10,
// 11) and with random tables.
module tb_phase_mux;
  import qpsk_pkg::*;
  phase_t tbl [4];
  dibit_t sel;
  phase_t phase_o;
  int checks = 0, failures = 0;

  phase_mux dut (.phase_num(tbl), .sel, .phase_o);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    phase_t want [4];
    want = '{10'd128, 10'd384, 10'd896, 10'd640};
    tbl = PHASE_NUMBERS;
    for (int s = 0; s < 4; s++) begin
      sel = dibit_t'(s);
      #1;
      check(phase_o == want[s], $sformatf("sel=%0d phase=%0d expected %0d", s, phase_o, want[s]));
    end
    repeat (200) begin
      for (int i = 0; i < 4; i++) tbl[i] = phase_t'($urandom);
      sel = dibit_t'($urandom);
      #1;
      check(phase_o == tbl[sel], $sformatf("random sel=%0d", sel));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
