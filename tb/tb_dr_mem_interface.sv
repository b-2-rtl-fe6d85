// Test of the binary memory on four-valued buses: write every one of the 256
// four-digit addresses through the P(4) buses, read them back digit by digit
// and check that address and data digits land on the right binary bits.
module tb_dr_mem_interface;
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

  logic clk = 0;
  q4_t we;
  q4_t addr  [4];
  q4_t wdata [4];
  q4_t rdata [4];
  int  sb [256];
  dr_mem_interface dut (.*);
  always #5 clk = ~clk;

  function automatic int digit(int v, int i); return (v >> (2 * i)) & 3; endfunction

  initial begin
    we = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 3;
      sb[a] = (a * 37 + 11) % 256;
      for (int i = 0; i < 4; i++) begin
        addr[i] = q4_t'(digit(a, i)); wdata[i] = q4_t'(digit(sb[a], i));
      end
      // digit 0 is the least significant pair of binary lines
      #1;
      check("binary address", int'(dut.addr_b), a);
      check("binary write data", int'(dut.wdata_b), sb[a]);
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 256; a++) begin
      for (int i = 0; i < 4; i++) addr[i] = q4_t'(digit(a, i));
      #1;
      for (int i = 0; i < 4; i++)
        check($sformatf("rd %0d digit %0d", a, i), int'(rdata[i]), digit(sb[a], i));
    end
    // binary view: the underlying word equals the base-4 value of the digits
    for (int i = 0; i < 4; i++) addr[i] = q4_t'(digit(8'hC5, i));
    #1 check("binary word", int'(dut.rdata_b), sb[8'hC5]);
    // we at level 1 must not write (0,3 mapping control, level 1 reads as 0)
    @(negedge clk); we = 1;
    for (int i = 0; i < 4; i++) wdata[i] = ~rdata[i];
    @(negedge clk); we = 0; #1;
    check("no write at level 1", int'(dut.rdata_b), sb[8'hC5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
