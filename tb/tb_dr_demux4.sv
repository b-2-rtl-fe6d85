// Test of the four-valued 1:4 demultiplexer with enable.
module tb_dr_demux4;
  import dr_pkg::*;
  int checks = 0;
  int failures = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  q4_t d, s, e;
  q4_t y [4];
  dr_demux4 dut (.*);
  initial begin
    for (int v = 0; v < 64; v++) begin
      {d, s, e} = 6'(v); #1;
      for (int i = 0; i < 4; i++)
        check($sformatf("y%0d", i), int'(y[i]), (e != 0 && int'(s) == i) ? int'(d) : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
