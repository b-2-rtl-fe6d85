// dr_mem_interface: a binary 256 x 8 memory attached to four-valued address
// and data buses.
//
// An 8-bit binary address is four P(4) digits and a byte is four P(4) digits,
// so the memory hangs on a 4-line P(4) address bus and a 4-line P(4) data bus.
// Each P(4) line is split into two binary lines A (msb) and B (lsb) on the way
// in (P(4) -> B(2) decoder: 0=00, 1=01, 2=10, 3=11) and the binary read data is
// merged back two bits per line (B(2) -> P(4) encoder). Because a P(4) digit
// is carried here as its own two binary lines, the decoders and encoders are
// plain wiring. Digit 0 is the least significant. The write strobe we is a
// P(4) control line in the 0,3 mapping (level 2 or more writes).
// Timing is that of dr_b2_ram: write on the rising clock edge, asynchronous
// read.
module dr_mem_interface
  import dr_pkg::*;
#(
  parameter int unsigned AW = 8,      // binary address bits
  parameter int unsigned DW = 8,      // binary data bits
  parameter int unsigned AD = AW / DR_N,  // P(4) address lines
  parameter int unsigned DD = DW / DR_N   // P(4) data lines
) (
  input  logic clk,
  input  q4_t  we,
  input  q4_t  addr  [AD],
  input  q4_t  wdata [DD],
  output q4_t  rdata [DD]
);
  logic [AW-1:0] addr_b;
  logic [DW-1:0] wdata_b, rdata_b;

  always_comb begin
    for (int unsigned i = 0; i < AD; i++)
      addr_b[DR_N*i +: DR_N] = addr[i];        // P(4) -> B(2) decode
    for (int unsigned i = 0; i < DD; i++) begin
      wdata_b[DR_N*i +: DR_N] = wdata[i];      // P(4) -> B(2) decode
      rdata[i] = rdata_b[DR_N*i +: DR_N];      // B(2) -> P(4) encode
    end
  end

  dr_b2_ram #(.AW(AW), .DW(DW)) u_ram (
    .clk(clk), .we(bs_binary(we)), .addr(addr_b), .wdata(wdata_b), .rdata(rdata_b)
  );
endmodule
