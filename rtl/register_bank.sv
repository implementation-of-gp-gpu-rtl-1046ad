// register_bank: one bank of a stream processor's register file.
//
// The paper splits the register file into four banks, each with a single read port, so
// that operands in different banks can be read in the same cycle while two operands in the
// same bank conflict. This bank has one asynchronous read port and NWP write ports written
// at the clock edge; where two ports write the same row, the higher-numbered port wins.
// The number of write ports (two for the two ALU results of a warp's instruction pair, one
// for returning load data) and the flip-flop implementation are this design's own choices.
// Contents are not reset: registers hold whatever a kernel wrote to them.
module register_bank #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned W     = 32,
  parameter int unsigned NWP   = 3,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic [AW-1:0]          raddr,
  output logic [W-1:0]           rdata,
  input  logic [NWP-1:0]         we,
  input  logic [NWP-1:0][AW-1:0] waddr,
  input  logic [NWP-1:0][W-1:0]  wdata
);
  logic [W-1:0] mem [DEPTH];

  assign rdata = mem[raddr];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NWP; p++)
      if (we[p]) mem[waddr[p]] <= wdata[p];
  end
endmodule
