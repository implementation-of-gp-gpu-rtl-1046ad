// sp_control_unit: the single control unit that drives all stream processors (SIMT).
//
// In the paper's SIMT organisation every SP executes the same instruction, so one control
// unit steers all of them instead of one per SP. This unit contains the operand collector
// control and builds, every cycle, one control word (sp_ctrl_t) that all 16 SPs receive:
//  * operand collection: bank rows, read grants and crossbar selects (see operand_collector);
//  * stage 2 (execute): which collected instruction feeds each of the three ALUs and the
//    LD/ST unit, and where each ALU result is written back at the end of the cycle;
//  * LD/ST completion: when every lane's LD/ST unit reports done, load data are written to
//    the destination register in all lanes at once and the lanes are released.
// It tells the warp scheduler when a warp's bundle has finished (clear_busy), resolves
// branches from lane 0's ALU output (br_*), and reports whether a LD/ST is in flight.
// Timing: a bundle accepted at the end of cycle t is in stage 2 at t+3 without conflicts; ALU results
// are written at the end of stage 2, so the warp may issue again in cycle t+4.
// The control word format, the lane-0 branch rule and the LD/ST completion protocol are
// this design's own; the paper does not describe the control unit's insides.
module sp_control_unit
  import gpgpu_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  bundle_t [1:0]                 in_bundle,
  output logic                          accept,
  output sp_ctrl_t                      ctrl,
  input  logic [NUM_ALU-1:0][DATA_W-1:0] lane0_alu_res,
  input  logic                          lanes_done,
  output logic                          ldst_busy,
  output logic [NUM_WARPS-1:0]          clear_busy,
  output logic [1:0]                    br_valid,
  output logic [1:0][WARP_W-1:0]        br_warp,
  output logic [1:0][PC_W-1:0]          br_target,
  output logic                          conflict
);
  bundle_t [1:0] s2;

  operand_collector u_oc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_bundle (in_bundle),
    .accept    (accept),
    .adv0      (ctrl.adv0),
    .adv1      (ctrl.adv1),
    .slot_gnt  (ctrl.slot_gnt),
    .slot_bank (ctrl.slot_bank),
    .bank_row  (ctrl.bank_row),
    .s2_bundle (s2),
    .conflict  (conflict)
  );

  // LD/ST instruction in flight: from issue until all lanes are done.
  logic              inflight_q, active_q, load_q;
  logic [WARP_W-1:0] lwarp_q;
  logic [REG_W-1:0]  lrd_q;
  logic              issue_ldst;

  always_comb begin
    issue_ldst = 1'b0;
    for (int h = 0; h < 2; h++)
      for (int s = 0; s < 2; s++)
        if (in_bundle[h].valid && in_bundle[h].slot[s].valid &&
            in_bundle[h].slot[s].unit == U_LDST)
          issue_ldst = 1'b1;
  end

  assign ldst_busy = inflight_q;

  // Stage 2: unit routing, write back, branches, completion.
  always_comb begin
    ctrl.alu_op     = {NUM_ALU{OP_NOP}};
    ctrl.alu_src    = '0;
    ctrl.alu_imm    = '0;
    ctrl.alu_warp   = '0;
    ctrl.ldst_start = 1'b0;
    ctrl.ldst_store = 1'b0;
    ctrl.ldst_src   = '0;
    ctrl.ldst_imm   = '0;
    ctrl.wb_en      = '0;
    ctrl.wb_bank    = '0;
    ctrl.wb_row     = '0;
    ctrl.wb_alu     = '0;
    clear_busy      = '0;
    for (int h = 0; h < 2; h++) begin
      automatic logic has_ldst = 1'b0;
      for (int s = 0; s < 2; s++) begin
        automatic slot_t sl = s2[h].slot[s];
        if (s2[h].valid && sl.valid) begin
          if (sl.unit == U_LDST) begin
            has_ldst        = 1'b1;
            ctrl.ldst_start = 1'b1;
            ctrl.ldst_store = sl.inst.op == OP_ST;
            ctrl.ldst_src   = 2'(h * 2 + s);
            ctrl.ldst_imm   = sl.inst.imm;
          end else begin
            ctrl.alu_op[sl.unit]   = sl.inst.op;
            ctrl.alu_src[sl.unit]  = 2'(h * 2 + s);
            ctrl.alu_imm[sl.unit]  = sl.inst.imm;
            ctrl.alu_warp[sl.unit] = s2[h].warp;
            if (writes_rd(sl.inst.op)) begin
              ctrl.wb_en[h][s]   = 1'b1;
              ctrl.wb_bank[h][s] = bank_of(sl.inst.rd);
              ctrl.wb_row[h][s]  = row_of(s2[h].warp, sl.inst.rd);
              ctrl.wb_alu[h][s]  = 2'(sl.unit);
            end
          end
        end
      end
      if (s2[h].valid && !has_ldst) clear_busy[s2[h].warp] = 1'b1;
    end
    ctrl.ldst_finish = active_q && lanes_done;
    ctrl.ld_wb_en    = ctrl.ldst_finish && load_q;
    ctrl.ld_wb_half  = lwarp_q[0];
    ctrl.ld_wb_bank  = bank_of(lrd_q);
    ctrl.ld_wb_row   = row_of(lwarp_q, lrd_q);
    if (ctrl.ldst_finish) clear_busy[lwarp_q] = 1'b1;
  end

  // Branch resolution: lane 0's ALU output decides for the whole warp.
  always_comb begin
    br_valid  = '0;
    br_warp   = '0;
    br_target = '0;
    for (int h = 0; h < 2; h++) begin
      br_warp[h] = s2[h].warp;
      for (int s = 0; s < 2; s++) begin
        automatic slot_t sl = s2[h].slot[s];
        if (s2[h].valid && sl.valid && sl.inst.op == OP_BNZ && sl.unit != U_LDST &&
            lane0_alu_res[sl.unit][0]) begin
          br_valid[h]  = 1'b1;
          br_target[h] = s2[h].pc + PC_W'(s) + PC_W'(1) + PC_W'(sl.inst.imm);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight_q <= 1'b0;
      active_q   <= 1'b0;
      load_q     <= 1'b0;
      lwarp_q    <= '0;
      lrd_q      <= '0;
    end else begin
      if (accept && issue_ldst) inflight_q <= 1'b1;
      if (ctrl.ldst_start) begin
        active_q <= 1'b1;
        load_q   <= !ctrl.ldst_store;
        lwarp_q  <= s2[ctrl.ldst_src[1]].warp;
        lrd_q    <= s2[ctrl.ldst_src[1]].slot[ctrl.ldst_src[0]].inst.rd;
      end
      if (ctrl.ldst_finish) begin
        active_q   <= 1'b0;
        inflight_q <= 1'b0;
      end
    end
  end

  // The scheduler never hands over a LD/ST while one is in flight.
  assert property (@(posedge clk) disable iff (!rst_n) accept && issue_ldst |-> !inflight_q);
  // A new LD/ST never reaches stage 2 while the lanes still hold the previous one.
  assert property (@(posedge clk) disable iff (!rst_n) ctrl.ldst_start |-> !active_q);
endmodule
