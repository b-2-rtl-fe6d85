// dr_b2_ram: binary static memory, DEPTH words of DW bits (256 x 8 by
// default), the kind of ordinary B(2) part a P(4) machine can borrow.
//
// Writes on the rising clock edge when we is high; reads are asynchronous
// (rdata follows addr combinationally), as in a static RAM of the period.
// The memory contents are not reset. The document only names the part; the
// timing and the port set are this design's choices.
module dr_b2_ram #(
  parameter int unsigned AW    = 8,
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 1 << AW
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  always_comb rdata = mem[addr];
endmodule
