// warp_scheduler: picks warps, fetches their instructions and arbitrates superscalar issue.
//
// Following the paper, warps are divided into even and odd warps. Every cycle the
// scheduler chooses one enabled even warp and one enabled odd warp and fetches two
// instructions of each (at pc and pc+1), up to four instructions in all. The core has three
// ALUs and one LD/ST unit, so issue is arbitrated: at most three ALU instructions and one
// LD/ST instruction leave per cycle. When a warp's two instructions are both LD/ST only the
// first goes; when all four are ALU instructions only three go.
//
// This design's own choices, where the paper is silent:
//  * Warp choice is round robin inside each group, among warps that are enabled and not busy.
//    A warp is busy from issue until its instructions have written back (cleared by
//    clear_busy), so a warp has at most one bundle in flight and needs no scoreboard.
//  * Slots are granted in the order even slot 0, even slot 1, odd slot 0, odd slot 1, and a
//    warp issues in order: once one of its slots is refused, its later slot is refused too.
//  * The second instruction of a warp is held back when it reads or writes the first one's
//    destination, when the first is a branch or EXIT, or when both are LD/ST.
//  * No LD/ST issues while the LD/ST unit still holds an earlier one (ldst_busy).
//  * Branches are resolved later; br_valid/br_target then overwrite the warp's pc.
// Interface: bundle[h] (h = 0 even, 1 odd) is offered combinationally every cycle and is
// taken at the clock edge when accept is high. The icache read ports are combinational.
module warp_scheduler
  import gpgpu_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [NUM_WARPS-1:0]          warp_mask,
  // instruction cache
  output logic [3:0][PC_W-1:0]          ic_raddr,
  input  logic [3:0][31:0]              ic_rdata,
  // to the SP control unit
  output bundle_t [1:0]                 bundle,
  input  logic                          accept,
  input  logic                          ldst_busy,
  // completion and branch resolution
  input  logic [NUM_WARPS-1:0]          clear_busy,
  input  logic [1:0]                    br_valid,
  input  logic [1:0][WARP_W-1:0]        br_warp,
  input  logic [1:0][PC_W-1:0]          br_target,
  output logic                          running,
  // arbitration events, for statistics
  output logic                          arb_alu_limit,
  output logic                          arb_ldst_limit,
  output logic                          arb_dep_split
);
  logic [NUM_WARPS-1:0]           en_q, busy_q;
  logic [NUM_WARPS-1:0][PC_W-1:0] pc_q;
  logic [1:0][WLOC_W-1:0]         rr_q;

  logic [1:0]              found;
  logic [1:0][WLOC_W-1:0]  pick;
  logic [1:0][WARP_W-1:0]  warp_sel;
  inst_t [1:0][1:0]        inst;
  logic [1:0]              pair_ok;    // slot 1 may go with slot 0 as far as the warp goes

  // Round-robin choice inside each group.
  always_comb begin
    for (int h = 0; h < 2; h++) begin
      found[h] = 1'b0;
      pick[h]  = '0;
      for (int d = 1; d <= int'(WARPS_HALF); d++) begin
        automatic logic [WLOC_W-1:0] k = rr_q[h] + WLOC_W'(d);
        automatic logic [WARP_W-1:0] w = {k, 1'b0} | WARP_W'(h);
        if (!found[h] && en_q[w] && !busy_q[w]) begin
          found[h] = 1'b1;
          pick[h]  = k;
        end
      end
      warp_sel[h]     = {pick[h], 1'b0} | WARP_W'(h);
      ic_raddr[2*h]   = pc_q[warp_sel[h]];
      ic_raddr[2*h+1] = pc_q[warp_sel[h]] + PC_W'(1);
      inst[h][0]      = decode(ic_rdata[2*h]);
      inst[h][1]      = decode(ic_rdata[2*h+1]);
    end
  end

  // Pairing rules inside one warp.
  always_comb begin
    arb_dep_split = 1'b0;
    for (int h = 0; h < 2; h++) begin
      automatic inst_t i0 = inst[h][0];
      automatic inst_t i1 = inst[h][1];
      automatic logic dep = writes_rd(i0.op) &&
                            ((uses_ra(i1.op) && i1.ra == i0.rd) ||
                             (uses_rb(i1.op) && i1.rb == i0.rd) ||
                             (writes_rd(i1.op) && i1.rd == i0.rd));
      pair_ok[h] = !ends_group(i0.op) && !dep && !(is_ldst(i0.op) && is_ldst(i1.op));
      if (found[h] && dep && !ends_group(i0.op)) arb_dep_split = 1'b1;
    end
  end

  // Unit arbitration over the four slots: at most three ALU and one LD/ST instruction.
  always_comb begin
    automatic int  alu_cnt   = 0;
    automatic logic ldst_free = !ldst_busy;
    arb_alu_limit  = 1'b0;
    arb_ldst_limit = 1'b0;
    bundle         = '0;
    for (int h = 0; h < 2; h++) begin
      automatic logic go = found[h];
      bundle[h].warp = warp_sel[h];
      bundle[h].pc   = pc_q[warp_sel[h]];
      for (int s = 0; s < 2; s++) begin
        if (s == 1) go = go && pair_ok[h];
        if (go) begin
          if (is_ldst(inst[h][s].op)) begin
            if (ldst_free) begin
              bundle[h].slot[s].unit = U_LDST;
              ldst_free = 1'b0;
            end else begin
              go = 1'b0;
              arb_ldst_limit = 1'b1;
            end
          end else begin
            if (alu_cnt < int'(NUM_ALU)) begin
              bundle[h].slot[s].unit = unit_e'(alu_cnt);
              alu_cnt++;
            end else begin
              go = 1'b0;
              arb_alu_limit = 1'b1;
            end
          end
        end
        bundle[h].slot[s].valid = go;
        bundle[h].slot[s].inst  = inst[h][s];
      end
      bundle[h].valid = bundle[h].slot[0].valid;
    end
    // Both LD/ST in one warp is also an LD/ST limit: only the first goes.
    for (int h = 0; h < 2; h++)
      if (found[h] && bundle[h].slot[0].valid && is_ldst(inst[h][0].op) &&
          is_ldst(inst[h][1].op))
        arb_ldst_limit = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q   <= '0;
      busy_q <= '0;
      pc_q   <= '0;
      rr_q   <= '1;
    end else if (start) begin
      en_q   <= warp_mask;
      busy_q <= '0;
      pc_q   <= '0;
      rr_q   <= '1;
    end else begin
      busy_q <= busy_q & ~clear_busy;
      for (int h = 0; h < 2; h++) begin
        if (br_valid[h]) pc_q[br_warp[h]] <= br_target[h];
      end
      if (accept) begin
        for (int h = 0; h < 2; h++) begin
          if (bundle[h].valid) begin
            automatic logic [WARP_W-1:0] w = bundle[h].warp;
            automatic logic two = bundle[h].slot[1].valid;
            busy_q[w] <= 1'b1;
            rr_q[h]   <= pick[h];
            pc_q[w]   <= pc_q[w] + (two ? PC_W'(2) : PC_W'(1));
            if (bundle[h].slot[two].inst.op == OP_EXIT) en_q[w] <= 1'b0;
          end
        end
      end
    end
  end

  assign running = |en_q || |busy_q;
endmodule
