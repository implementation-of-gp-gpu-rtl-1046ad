// tb_operand_collector_6stage: checks the 6-stage baseline collector and repeats the paper's
// collector comparison on it.
//  1. Pairs whose four operands sit in four different banks: one pair accepted every cycle,
//     and each leaves exactly four cycles after it was accepted.
//  2. 8192 pairs (8192 * 2 instructions) with random register numbers, the paper's
//     experiment. A cycle model of the stall rule, written here, gives the cycle count the
//     collector must take, and the test compares the two. The same stream then runs through
//     the 4-stage operand_collector (one half used), which must need fewer cycles: the
//     paper's claim.
// Throughout: pairs leave in order, every operand is read exactly once, no bank is granted
// twice in a cycle, and each bank's row is the row of the register granted to it.
module tb_operand_collector_6stage;
  import gpgpu_pkg::*;
  localparam int unsigned NPAIRS = 8192;

  logic clk = 1'b0, rst_n = 1'b0;
  bundle_t in_bundle, out_bundle;
  logic accept, conflict;
  logic [3:0] gnt;
  logic [3:0][BANK_W-1:0] bank;
  logic [NUM_BANKS-1:0][ROW_W-1:0] bank_row;
  int unsigned checks = 0, failures = 0, cycle = 0;

  operand_collector_6stage dut (.*);

  // the 4-stage collector, fed the same stream in its even half
  bundle_t [1:0] in4, out4;
  logic acc4, adv0_4, adv1_4, conf4;
  logic [1:0][NUM_REQ-1:0] gnt4;
  logic [1:0][NUM_REQ-1:0][BANK_W-1:0] bank4;
  logic [1:0][NUM_BANKS-1:0][ROW_W-1:0] row4;
  operand_collector u_oc4 (
    .clk, .rst_n, .in_bundle(in4), .accept(acc4), .adv0(adv0_4), .adv1(adv1_4),
    .slot_gnt(gnt4), .slot_bank(bank4), .bank_row(row4), .s2_bundle(out4), .conflict(conf4)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  logic [3:0] regs [NPAIRS][4];   // ra0, rb0, ra1, rb1 of each pair

  function automatic bundle_t mk(int id);
    bundle_t b;
    b = '0;
    b.valid = 1'b1;
    b.warp  = WARP_W'({id[2:0], 1'b0});
    b.pc    = PC_W'(id);
    b.slot[0].valid = 1'b1;
    b.slot[0].inst  = '{op: OP_ADD, rd: 4'd0, ra: regs[id][0], rb: regs[id][1], imm: 16'd0};
    b.slot[1].valid = 1'b1;
    b.slot[1].inst  = '{op: OP_ADD, rd: 4'd0, ra: regs[id][2], rb: regs[id][3], imm: 16'd0};
    b.slot[1].unit  = U_ALU1;
    return b;
  endfunction

  // order, latency and read checks of the 6-stage collector
  int unsigned q_id [$], q_cyc [$], n_out = 0, grants = 0, last_out = 0;
  bit exact_lat = 1'b1;
  always @(posedge clk) if (rst_n) begin
    logic [NUM_BANKS-1:0] used;
    if (accept && in_bundle.valid) begin
      q_id.push_back(int'(in_bundle.pc));
      q_cyc.push_back(cycle);
    end
    if (out_bundle.valid) begin
      int unsigned id, c;
      id = q_id.pop_front();
      c  = q_cyc.pop_front();
      check(int'(out_bundle.pc) == id, "pairs leave in order");
      if (exact_lat) check(cycle - c == 5, $sformatf("latency %0d", cycle - c - 1));
      n_out++;
      last_out = cycle;
    end
    used = '0;
    for (int k = 0; k < 4; k++) if (gnt[k]) begin
      automatic logic [3:0] r = (k % 2 == 0) ? dut.st_q[k].slot[k / 2].inst.ra
                                             : dut.st_q[k].slot[k / 2].inst.rb;
      check(!used[bank[k]], "bank granted twice");
      used[bank[k]] = 1'b1;
      check(bank[k] == bank_of(r), "bank of the operand");
      check(bank_row[bank[k]] == row_of(dut.st_q[k].warp, r), "row of the operand");
      grants++;
    end
  end

  // 4-stage collector: count pairs out
  int unsigned n_out4 = 0, last_out4 = 0;
  always @(posedge clk) if (rst_n && out4[0].valid) begin
    n_out4++;
    last_out4 = cycle;
  end

  // Cycle model of the 6-stage stall rule: cycles from the first acceptance to the last exit.
  function automatic int unsigned model_cycles(input int unsigned n);
    int st [4];
    bit have [4];
    int unsigned next = 0, done = 0, cyc = 0;
    for (int k = 0; k < 4; k++) begin
      st[k] = -1;
      have[k] = 1'b0;
    end
    while (done < n) begin
      logic [NUM_BANKS-1:0] used;
      bit ok [4];
      bit next_free;
      used = '0;
      for (int k = 3; k >= 0; k--) begin
        ok[k] = 1'b1;
        if (st[k] >= 0 && !have[k]) begin
          automatic logic [BANK_W-1:0] b = bank_of(regs[st[k]][k]);
          if (used[b]) ok[k] = 1'b0;
          else used[b] = 1'b1;
        end
      end
      next_free = 1'b1;
      for (int k = 3; k >= 0; k--) begin
        automatic bit mv = (st[k] < 0 || ok[k]) && next_free;
        if (st[k] >= 0 && mv) begin
          if (k == 3) done++;
          else begin
            st[k+1] = st[k];
            have[k+1] = 1'b0;
          end
          st[k] = -1;
          have[k] = 1'b0;
        end else if (st[k] >= 0) begin
          have[k] = ok[k];
        end
        next_free = mv || st[k] < 0;
      end
      if (st[0] < 0 && next < n) begin
        st[0] = int'(next);
        next++;
      end
      cyc++;
    end
    return cyc;
  endfunction

  task automatic feed(input int unsigned n);
    int unsigned id = 0;
    while (id < n) begin
      @(negedge clk);
      in_bundle = mk(int'(id));
      #1;
      if (accept) id++;
    end
    @(negedge clk);
    in_bundle = '0;
    repeat (12) @(negedge clk);
  endtask

  task automatic feed4(input int unsigned n);
    int unsigned id = 0;
    while (id < n) begin
      @(negedge clk);
      in4[0] = mk(int'(id));
      #1;
      if (acc4) id++;
    end
    @(negedge clk);
    in4 = '0;
    repeat (12) @(negedge clk);
  endtask

  initial begin
    int unsigned c0, g0, n0, c6, c4, cm;
    in_bundle = '0;
    in4 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 1. no conflicts: operand k of every pair in bank k
    for (int i = 0; i < 200; i++)
      for (int k = 0; k < 4; k++) regs[i][k] = 4'(4 * $urandom_range(3) + k);
    g0 = grants; n0 = n_out; c0 = cycle;
    feed(200);
    check(n_out - n0 == 200, "all conflict-free pairs left");
    check(grants - g0 == 800, "every operand read once (no conflicts)");
    check(last_out - c0 <= 200 + 6, $sformatf("200 conflict-free pairs took %0d cycles", last_out - c0));

    // 2. random registers, the paper's experiment
    exact_lat = 1'b0;
    for (int i = 0; i < int'(NPAIRS); i++)
      for (int k = 0; k < 4; k++) regs[i][k] = 4'($urandom);
    g0 = grants; n0 = n_out;
    @(negedge clk);
    c0 = cycle;
    feed(NPAIRS);
    c6 = last_out - c0 - 5;   // minus the four-cycle latency and the first edge
    cm = model_cycles(NPAIRS);
    check(n_out - n0 == NPAIRS, "all random pairs left");
    check(grants - g0 == 4 * NPAIRS, "every operand read once (random)");
    // the model also counts the three cycles the last pair spends in stages 1..3
    check(c6 + 3 == cm, $sformatf("6-stage collector took %0d cycles, model says %0d", c6, cm));

    c0 = cycle;
    feed4(NPAIRS);
    c4 = last_out4 - c0 - 3;
    check(n_out4 == NPAIRS, "all pairs left the 4-stage collector");
    check(c4 < c6, $sformatf("4-stage collector (%0d cycles) is not faster than 6-stage (%0d)", c4, c6));
    $display("8192 random pairs: 6-stage %0d cycles, 4-stage %0d cycles", c6, c4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
