// tb_operand_collector: drives instruction pairs into the 4-stage operand collector.
//  1. Pairs whose four operands sit in four different banks: one pair accepted every cycle,
//     each leaves stage 2 exactly two cycles after it was accepted, never a stall.
//  2. Pairs whose two OP0s sit in the same bank: the second OP0 is read in stage 1, and bank 0
//     (needed twice per pair) sets the rate at one pair per two cycles.
//  3. The paper's operand collector experiment: 8192 pairs (8192 * 2 instructions) with
//     random register numbers, fed to one half. The cycle count is printed.
// Throughout: pairs leave in order, no bank is granted twice in a cycle, and every bank's
// row is the row of the register granted to it.
module tb_operand_collector;
  import gpgpu_pkg::*;
  logic clk = 0, rst_n = 0;
  bundle_t [1:0] in_bundle, s2_bundle;
  logic accept, adv0, adv1, conflict;
  logic [1:0][NUM_REQ-1:0] slot_gnt;
  logic [1:0][NUM_REQ-1:0][BANK_W-1:0] slot_bank;
  logic [1:0][NUM_BANKS-1:0][ROW_W-1:0] bank_row;
  int unsigned checks = 0, failures = 0, cycle = 0;

  operand_collector dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  function automatic bundle_t mk(int id, logic [3:0] ra0, logic [3:0] rb0,
                                 logic [3:0] ra1, logic [3:0] rb1, bit odd);
    bundle_t b;
    b = '0;
    b.valid = 1;
    b.warp  = WARP_W'({id[2:0], odd});
    b.pc    = PC_W'(id);
    b.slot[0].valid = 1; b.slot[0].inst = '{op: OP_ADD, rd: 4'd0, ra: ra0, rb: rb0, imm: 16'd0};
    b.slot[1].valid = 1; b.slot[1].inst = '{op: OP_ADD, rd: 4'd0, ra: ra1, rb: rb1, imm: 16'd0};
    b.slot[1].unit  = U_ALU1;
    return b;
  endfunction

  // order and latency tracking for half 0
  int unsigned q_id [$], q_cyc [$];
  int unsigned expect_lat = 2;
  bit exact_lat = 1;
  always @(posedge clk) if (rst_n) begin
    if (accept && in_bundle[0].valid) begin
      q_id.push_back(int'(in_bundle[0].pc));
      q_cyc.push_back(cycle);
    end
    if (s2_bundle[0].valid) begin
      int unsigned id, c;
      id = q_id.pop_front();
      c  = q_cyc.pop_front();
      check(int'(s2_bundle[0].pc) == id, "pairs leave in order");
      if (exact_lat) check(cycle - c == expect_lat + 1, $sformatf("latency %0d", cycle - c - 1));
    end
    // grant consistency
    for (int h = 0; h < 2; h++) begin
      logic [3:0] used;
      used = '0;
      for (int r = 0; r < int'(NUM_REQ); r++) if (slot_gnt[h][r]) begin
        check(!used[slot_bank[h][r]], "bank granted twice");
        used[slot_bank[h][r]] = 1;
      end
    end
    if (slot_gnt[0][4]) check(bank_row[0][slot_bank[0][4]] ==
                              row_of(dut.s0_q[0].warp, dut.s0_q[0].slot[0].inst.ra), "row of OP0");
    if (slot_gnt[0][2]) check(bank_row[0][slot_bank[0][2]] ==
                              row_of(dut.s1_q[0].warp, dut.s1_q[0].slot[1].inst.ra), "row of late OP0");
    if (slot_gnt[0][1]) check(bank_row[0][slot_bank[0][1]] ==
                              row_of(dut.s1_q[0].warp, dut.s1_q[0].slot[0].inst.rb), "row of OP1");
  end

  int unsigned stalls = 0, grants = 0;
  always @(posedge clk) if (rst_n) begin
    if (conflict) stalls++;
    grants += $countones(slot_gnt);
  end

  task automatic feed(int n, int mode);
    int id = 0;
    while (id < n) begin
      @(negedge clk);
      case (mode)
        0: in_bundle[0] = mk(id, 4'(4 * ($urandom % 4) + 0), 4'(4 * ($urandom % 4) + 2),
                             4'(4 * ($urandom % 4) + 1), 4'(4 * ($urandom % 4) + 3), 0);
        1: in_bundle[0] = mk(id, 4'd0, 4'd2, 4'd4, 4'd3, 0);
        default: in_bundle[0] = mk(id, 4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom), 0);
      endcase
      #1;
      if (accept) id++;
    end
    @(negedge clk);
    in_bundle[0] = '0;
    repeat (9) @(negedge clk);
  endtask

  initial begin
    int unsigned c0, s0, g0;
    in_bundle = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1. no conflicts
    c0 = cycle; s0 = stalls; g0 = grants;
    feed(200, 0);
    check(grants - g0 == 4 * 200, "every operand read exactly once");
    check(stalls == s0, $sformatf("%0d stalls without conflicts", stalls - s0));
    check(q_id.size() == 0, $sformatf("all pairs left (%0d remain)", q_id.size()));
    // 2. both OP0s in bank 0: bank 0 limits the rate to one pair per two cycles
    exact_lat = 0;
    c0 = cycle; s0 = stalls; g0 = grants;
    feed(100, 1);
    check(grants - g0 == 4 * 100, "every operand read exactly once (conflicts)");
    check(stalls > s0, "conflicting pairs stall");
    check(cycle - c0 - 10 <= 2 * 100 + 3, $sformatf("%0d cycles for 100 pairs that need bank 0 twice", cycle - c0 - 10));
    check(q_id.size() == 0, $sformatf("all pairs left (%0d remain)", q_id.size()));
    // 3. random registers, 8192 pairs
    c0 = cycle; s0 = stalls; g0 = grants;
    feed(8192, 2);
    check(grants - g0 == 4 * 8192, "every operand read exactly once (random)");
    check(q_id.size() == 0, $sformatf("all pairs left (%0d remain)", q_id.size()));
    $display("random operands: 8192 pairs (16384 instructions) in %0d cycles, %0d stall cycles",
             cycle - c0 - 10, stalls - s0);
    check(cycle - c0 - 10 >= 8192 && cycle - c0 - 10 <= 8192 + stalls - s0 + 2, "cycles within pairs + stalls");
    // An operand that loses its bank in stage 0 is fetched in stage 1: the stream then needs
    // well under the ~17,500 cycles of a collector where stage 0 waits for its own reads.
    check(cycle - c0 - 10 < 14500, $sformatf("random stream took %0d cycles", cycle - c0 - 10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
