// icache: instruction store of the core, read by the warp scheduler.
//
// The paper shows an instruction cache feeding the warp scheduler but does not describe
// it. Here it is the simplest thing that serves the scheduler: an on-chip array holding the
// whole kernel, loaded through a write port before the kernel starts, with NRP asynchronous
// read ports so that the two instructions of an even warp and of an odd warp are fetched in
// the same cycle. There is no miss path; its size is this design's own choice.
module icache #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned NRP   = 4,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [AW-1:0]           waddr,
  input  logic [31:0]             wdata,
  input  logic [NRP-1:0][AW-1:0]  raddr,
  output logic [NRP-1:0][31:0]    rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_comb
    for (int p = 0; p < NRP; p++) rdata[p] = mem[raddr[p]];
endmodule
