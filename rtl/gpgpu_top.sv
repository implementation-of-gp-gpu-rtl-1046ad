// gpgpu_top: one core of the SIMT GP-GPU.
//
// The core follows the paper's block diagram: an instruction cache feeds the warp
// scheduler, which issues up to four instructions per cycle (two of an even warp and two of
// an odd warp, at most three ALU and one LD/ST) to 16 stream processors. One SP control unit
// steers all 16 SPs in lockstep through the 4-stage operand collector, execution and write
// back. The SPs' LD/ST units reach the L1 cache through an interconnection network, and the
// L1 cache reaches external memory (DDR3 in the paper) through the mem_* port.
//
// Use: hold start low, write the kernel into the instruction cache with prog_we/prog_addr/
// prog_wdata, then pulse start with warp_mask naming the warps to run. All warps begin at
// pc 0. busy stays high until every enabled warp has executed EXIT and all its instructions
// have completed. The memory port is a plain request/acknowledge port (held until mem_ack,
// read data valid with mem_ack); a DDR3 controller is not part of this design. evt reports,
// each cycle, the issue width and the arbitration, stall, branch and cache events.
module gpgpu_top
  import gpgpu_pkg::*;
#(
  parameter int unsigned IC_DEPTH   = 1 << PC_W,
  parameter int unsigned L1_SETS    = 64,
  parameter int unsigned L1_LINE    = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // kernel loading and launch
  input  logic                  prog_we,
  input  logic [PC_W-1:0]       prog_addr,
  input  logic [31:0]           prog_wdata,
  input  logic                  start,
  input  logic [NUM_WARPS-1:0]  warp_mask,
  output logic                  busy,
  output core_evt_t             evt,
  // external memory
  output logic                  mem_req,
  output logic                  mem_we,
  output logic [ADDR_W-1:0]     mem_addr,
  output logic [DATA_W-1:0]     mem_wdata,
  input  logic                  mem_ack,
  input  logic [DATA_W-1:0]     mem_rdata
);
  logic [3:0][PC_W-1:0]   ic_raddr;
  logic [3:0][31:0]       ic_rdata;
  bundle_t [1:0]          bundle;
  logic                   accept, ldst_busy, running, conflict;
  logic [NUM_WARPS-1:0]   clear_busy;
  logic [1:0]             br_valid;
  logic [1:0][WARP_W-1:0] br_warp;
  logic [1:0][PC_W-1:0]   br_target;
  logic                   arb_alu_limit, arb_ldst_limit, arb_dep_split;
  sp_ctrl_t               ctrl;

  logic [NUM_SP-1:0][NUM_ALU-1:0][DATA_W-1:0] alu_res;
  logic [NUM_SP-1:0]                 ldst_done;
  logic [NUM_SP-1:0]                 lreq, lreq_we, lack;
  logic [NUM_SP-1:0][ADDR_W-1:0]     lreq_addr;
  logic [NUM_SP-1:0][DATA_W-1:0]     lreq_wdata;
  logic [DATA_W-1:0]                 lack_rdata;

  logic              c_req, c_we, c_ack;
  logic [ADDR_W-1:0] c_addr;
  logic [DATA_W-1:0] c_wdata, c_rdata;
  logic              l1_hit, l1_miss;

  icache #(.DEPTH(IC_DEPTH), .NRP(4)) u_icache (
    .clk   (clk),
    .we    (prog_we),
    .waddr (prog_addr),
    .wdata (prog_wdata),
    .raddr (ic_raddr),
    .rdata (ic_rdata)
  );

  warp_scheduler u_sched (
    .clk            (clk),
    .rst_n          (rst_n),
    .start          (start),
    .warp_mask      (warp_mask),
    .ic_raddr       (ic_raddr),
    .ic_rdata       (ic_rdata),
    .bundle         (bundle),
    .accept         (accept),
    .ldst_busy      (ldst_busy),
    .clear_busy     (clear_busy),
    .br_valid       (br_valid),
    .br_warp        (br_warp),
    .br_target      (br_target),
    .running        (running),
    .arb_alu_limit  (arb_alu_limit),
    .arb_ldst_limit (arb_ldst_limit),
    .arb_dep_split  (arb_dep_split)
  );

  sp_control_unit u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_bundle     (bundle),
    .accept        (accept),
    .ctrl          (ctrl),
    .lane0_alu_res (alu_res[0]),
    .lanes_done    (&ldst_done),
    .ldst_busy     (ldst_busy),
    .clear_busy    (clear_busy),
    .br_valid      (br_valid),
    .br_warp       (br_warp),
    .br_target     (br_target),
    .conflict      (conflict)
  );

  for (genvar l = 0; l < NUM_SP; l++) begin : g_sp
    stream_processor #(.LANE(l)) u_sp (
      .clk        (clk),
      .rst_n      (rst_n),
      .ctrl       (ctrl),
      .alu_res    (alu_res[l]),
      .ldst_done  (ldst_done[l]),
      .mreq       (lreq[l]),
      .mreq_we    (lreq_we[l]),
      .mreq_addr  (lreq_addr[l]),
      .mreq_wdata (lreq_wdata[l]),
      .mack       (lack[l]),
      .mack_rdata (lack_rdata)
    );
  end

  sp_interconnect #(.N(NUM_SP)) u_noc (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (lreq),
    .req_we    (lreq_we),
    .req_addr  (lreq_addr),
    .req_wdata (lreq_wdata),
    .ack       (lack),
    .ack_rdata (lack_rdata),
    .c_req     (c_req),
    .c_we      (c_we),
    .c_addr    (c_addr),
    .c_wdata   (c_wdata),
    .c_ack     (c_ack),
    .c_rdata   (c_rdata)
  );

  l1_cache #(.SETS(L1_SETS), .LINE_WORDS(L1_LINE)) u_l1 (
    .clk       (clk),
    .rst_n     (rst_n),
    .c_req     (c_req),
    .c_we      (c_we),
    .c_addr    (c_addr),
    .c_wdata   (c_wdata),
    .c_ack     (c_ack),
    .c_rdata   (c_rdata),
    .mem_req   (mem_req),
    .mem_we    (mem_we),
    .mem_addr  (mem_addr),
    .mem_wdata (mem_wdata),
    .mem_ack   (mem_ack),
    .mem_rdata (mem_rdata),
    .hit_evt   (l1_hit),
    .miss_evt  (l1_miss)
  );

  assign busy = running;

  always_comb begin
    evt              = '0;
    if (accept)
      for (int h = 0; h < 2; h++)
        evt.issued = evt.issued + 3'(bundle[h].slot[0].valid) + 3'(bundle[h].slot[1].valid);
    evt.conflict     = conflict;
    evt.alu_limit    = accept && arb_alu_limit;
    evt.ldst_limit   = accept && arb_ldst_limit;
    evt.dep_split    = accept && arb_dep_split;
    evt.branch_taken = |br_valid;
    evt.l1_hit       = l1_hit;
    evt.l1_miss      = l1_miss;
  end
endmodule
