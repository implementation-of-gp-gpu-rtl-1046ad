// sp_interconnect: interconnection network between the stream processors and the L1 cache.
//
// The paper places an interconnection network between the SPs and the L1 cache without
// describing it. This one is a round-robin arbiter that lets one lane request at a time
// through to the cache's single port and routes the acknowledge and read data back to that
// lane. A granted request stays on the cache port until the cache acknowledges it.
// Timing: one cycle to grant, then the cache's latency; a new grant follows the cycle after
// an acknowledge, so an access takes at least two cycles.
module sp_interconnect
  import gpgpu_pkg::*;
#(
  parameter int unsigned N   = 16,
  parameter int unsigned N_W = $clog2(N)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N-1:0]                  req,
  input  logic [N-1:0]                  req_we,
  input  logic [N-1:0][ADDR_W-1:0]      req_addr,
  input  logic [N-1:0][DATA_W-1:0]      req_wdata,
  output logic [N-1:0]                  ack,
  output logic [DATA_W-1:0]             ack_rdata,
  // to the L1 cache
  output logic                          c_req,
  output logic                          c_we,
  output logic [ADDR_W-1:0]             c_addr,
  output logic [DATA_W-1:0]             c_wdata,
  input  logic                          c_ack,
  input  logic [DATA_W-1:0]             c_rdata
);
  logic           busy_q;
  logic [N_W-1:0] gnt_q, last_q;
  logic           found;
  logic [N_W-1:0] pick;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int d = 1; d <= int'(N); d++) begin
      automatic logic [N_W-1:0] k = last_q + N_W'(d);
      if (!found && req[k]) begin
        found = 1'b1;
        pick  = k;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      gnt_q  <= '0;
      last_q <= '1;
    end else if (busy_q) begin
      if (c_ack) busy_q <= 1'b0;
    end else if (found) begin
      busy_q <= 1'b1;
      gnt_q  <= pick;
      last_q <= pick;
    end
  end

  assign c_req     = busy_q;
  assign c_we      = req_we[gnt_q];
  assign c_addr    = req_addr[gnt_q];
  assign c_wdata   = req_wdata[gnt_q];
  assign ack_rdata = c_rdata;
  always_comb begin
    ack = '0;
    ack[gnt_q] = busy_q && c_ack;
  end

  assert property (@(posedge clk) disable iff (!rst_n) c_req |-> req[gnt_q]);
endmodule
