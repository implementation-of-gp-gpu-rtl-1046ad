// tb_sp_control_unit: feeds hand-built bundles and checks the control word and the status
// the unit returns: execution-unit routing and write back in stage 2 (the third cycle after
// acceptance), branch resolution from lane 0, busy clearing, LD/ST start and completion
// with load write back, and register bank conflicts: one absorbed by stage 1 and one that
// stalls the collector for a cycle.
module tb_sp_control_unit;
  import gpgpu_pkg::*;
  logic clk = 0, rst_n = 0, accept, lanes_done = 0, ldst_busy, conflict;
  bundle_t [1:0] in_bundle;
  sp_ctrl_t ctrl;
  logic [NUM_ALU-1:0][DATA_W-1:0] lane0_alu_res = '0;
  logic [NUM_WARPS-1:0] clear_busy;
  logic [1:0] br_valid;
  logic [1:0][WARP_W-1:0] br_warp;
  logic [1:0][PC_W-1:0] br_target;
  int unsigned checks = 0, failures = 0;

  sp_control_unit dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic slot_t sl(opcode_e op, int rd, int ra, int rb, int imm, unit_e u);
    slot_t s;
    s.valid = 1; s.unit = u;
    s.inst = '{op: op, rd: 4'(rd), ra: 4'(ra), rb: 4'(rb), imm: 16'(imm)};
    return s;
  endfunction

  initial begin
    in_bundle = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- ALU bundle in both halves with a branch ----
    @(negedge clk);
    in_bundle[0] = '{valid: 1, warp: 4'd2, pc: 8'd10,
                     slot: '{sl(OP_ADDI, 6, 3, 0, 7, U_ALU0), sl(OP_ADD, 5, 1, 2, 0, U_ALU1)}};
    in_bundle[1] = '{valid: 1, warp: 4'd3, pc: 8'd20,
                     slot: '{'0, sl(OP_BNZ, 0, 4, 0, 5, U_ALU2)}};
    #1 check(accept && !conflict, "no conflict, accepted");
    @(negedge clk);
    in_bundle = '0;
    repeat (2) @(negedge clk);
    #1;
    check(ctrl.alu_op[1] == OP_ADD && ctrl.alu_src[1] == 2'd0, "slot 0 of even warp to ALU1");
    check(ctrl.alu_op[0] == OP_ADDI && ctrl.alu_src[0] == 2'd1 && ctrl.alu_imm[0] == 16'd7,
          "slot 1 of even warp to ALU0");
    check(ctrl.alu_op[2] == OP_BNZ && ctrl.alu_src[2] == 2'd2 && ctrl.alu_warp[2] == 4'd3,
          "odd warp's branch to ALU2");
    check(ctrl.wb_en == 4'b0011, "two write backs in the even half");
    check(ctrl.wb_bank[0][0] == 2'd1 && ctrl.wb_row[0][0] == row_of(4'd2, 4'd5) &&
          ctrl.wb_alu[0][0] == 2'd1, "r5 written from ALU1");
    check(ctrl.wb_bank[0][1] == 2'd2 && ctrl.wb_row[0][1] == row_of(4'd2, 4'd6) &&
          ctrl.wb_alu[0][1] == 2'd0, "r6 written from ALU0");
    check(clear_busy == 16'h000C, "warps 2 and 3 complete");
    check(!br_valid[1], "branch not taken while lane 0 says zero");
    lane0_alu_res[2] = 32'd1;
    #1;
    check(br_valid == 2'b10 && br_warp[1] == 4'd3 && br_target[1] == 8'd26, "branch taken to 26");
    lane0_alu_res = '0;
    @(negedge clk);
    #1 check(ctrl.wb_en == '0 && clear_busy == '0, "bundle left after one cycle");

    // ---- LD bundle ----
    in_bundle[0] = '{valid: 1, warp: 4'd4, pc: 8'd0,
                     slot: '{'0, sl(OP_LD, 7, 1, 0, 3, U_LDST)}};
    @(negedge clk);
    in_bundle = '0;
    #1 check(ldst_busy, "LD/ST busy after issue");
    repeat (2) @(negedge clk);
    #1;
    check(ctrl.ldst_start && !ctrl.ldst_store && ctrl.ldst_src == 2'd0 && ctrl.ldst_imm == 16'd3,
          "LD started in stage 2");
    check(clear_busy == '0, "LD warp stays busy");
    repeat (5) begin @(negedge clk); #1 check(!ctrl.ldst_finish, "no finish before lanes done"); end
    lanes_done = 1;
    #1;
    check(ctrl.ldst_finish && ctrl.ld_wb_en && !ctrl.ld_wb_half && ctrl.ld_wb_bank == 2'd3 &&
          ctrl.ld_wb_row == row_of(4'd4, 4'd7), "load written back to r7 of warp 4");
    check(clear_busy == 16'h0010, "LD warp completes");
    @(negedge clk);
    lanes_done = 0;
    #1 check(!ldst_busy && !ctrl.ldst_finish, "LD/ST unit free again");

    // ---- ST bundle: no register write on completion ----
    in_bundle[1] = '{valid: 1, warp: 4'd5, pc: 8'd0,
                     slot: '{'0, sl(OP_ST, 0, 1, 2, 0, U_LDST)}};
    @(negedge clk);
    in_bundle = '0;
    repeat (2) @(negedge clk);
    #1 check(ctrl.ldst_start && ctrl.ldst_store && ctrl.ldst_src == 2'd2, "ST started");
    @(negedge clk);
    lanes_done = 1;
    #1 check(ctrl.ldst_finish && !ctrl.ld_wb_en && clear_busy == 16'h0020, "ST completes");
    @(negedge clk);
    lanes_done = 0;

    // ---- bank conflict in stage 0: r1 and r5 are both in bank 1 ----
    // The OP0 that loses is read in stage 1, which has no OP1 to read: no stall.
    in_bundle[0] = '{valid: 1, warp: 4'd0, pc: 8'd0,
                     slot: '{sl(OP_ADDI, 9, 5, 0, 0, U_ALU1), sl(OP_ADDI, 8, 1, 0, 0, U_ALU0)}};
    @(negedge clk);
    in_bundle = '0;
    #1 check(conflict && accept && ctrl.adv0, "stage-0 conflict: pair still moves on");
    @(negedge clk);
    #1 check(!conflict && ctrl.adv1, "late OP0 read in stage 1");
    @(negedge clk);
    #1 check(ctrl.wb_en == 4'b0011, "pair reaches stage 2 at the usual time");
    @(negedge clk);
    // ---- conflict in stage 1 as well: r5, r1 and r13 are all in bank 1 ----
    in_bundle[0] = '{valid: 1, warp: 4'd0, pc: 8'd0,
                     slot: '{sl(OP_ADDI, 9, 13, 0, 0, U_ALU1), sl(OP_ADD, 8, 5, 1, 0, U_ALU0)}};
    @(negedge clk);
    in_bundle = '0;
    #1 check(conflict && accept, "stage-0 conflict");
    @(negedge clk);
    #1 check(conflict && !ctrl.adv1 && !ctrl.adv0, "stage 1 stalls on two reads of bank 1");
    @(negedge clk);
    #1 check(!conflict && ctrl.adv1, "last read goes next cycle");
    @(negedge clk);
    #1 check(ctrl.wb_en == 4'b0011, "pair reaches stage 2 one cycle late");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
