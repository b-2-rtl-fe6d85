// Test of the 256 x 8 binary memory: fill every word with a pattern, read all
// back, then random writes and reads against a scoreboard.
module tb_dr_b2_ram;
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

  logic clk = 0, we = 0;
  logic [7:0] addr, wdata, rdata;
  logic [7:0] sb [256];
  dr_b2_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    process::self().srandom(32'd1981);  // fixed seed: repeatable stimulus
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); we = 1; addr = 8'(a); wdata = 8'(a * 7 + 3); sb[a] = 8'(a * 7 + 3);
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a); #1; check($sformatf("rd %0d", a), int'(rdata), int'(sb[a]));
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      addr = 8'($urandom); we = 1'($urandom);
      wdata = 8'($urandom);
      #1 check("async rd", int'(rdata), int'(sb[addr]));
      if (we) sb[addr] = wdata;
    end
    @(negedge clk); we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
