// tb_stream_processor: one stream processor (lane 5) driven by the SP control unit with a
// stream of random instruction pairs for all 16 warps, as the warp scheduler would issue
// them (a warp is not reissued before it completes). A reference register file per warp,
// kept here, predicts every ALU result in stage 2 and every loaded value; loads are served
// by a memory model that returns a function of the address one cycle after the request.
// Register values reach the ALUs only through the banks, the first crossbar and the
// collector registers, so every check also covers those paths.
module tb_stream_processor;
  import gpgpu_pkg::*;
  localparam int LANE = 5;
  logic clk = 0, rst_n = 0, accept, ldst_busy, conflict, ldst_done;
  bundle_t [1:0] in_bundle;
  sp_ctrl_t ctrl;
  logic [NUM_ALU-1:0][DATA_W-1:0] alu_res;
  logic [NUM_WARPS-1:0] clear_busy;
  logic [1:0] br_valid;
  logic [1:0][WARP_W-1:0] br_warp;
  logic [1:0][PC_W-1:0] br_target;
  logic mreq, mreq_we, mack;
  logic [31:0] mreq_addr, mreq_wdata, mack_rdata;
  int unsigned checks = 0, failures = 0, n_alu = 0, n_ld = 0, n_conf = 0;

  sp_control_unit u_ctrl (.clk, .rst_n, .in_bundle, .accept, .ctrl, .lane0_alu_res(alu_res),
                          .lanes_done(ldst_done), .ldst_busy, .clear_busy, .br_valid,
                          .br_warp, .br_target, .conflict);
  stream_processor #(.LANE(LANE)) dut (.clk, .rst_n, .ctrl, .alu_res, .ldst_done, .mreq,
                                       .mreq_we, .mreq_addr, .mreq_wdata, .mack, .mack_rdata);
  always #5 clk = ~clk;

  function automatic logic [31:0] f(logic [31:0] a);
    return a ^ 32'hA5A5_0F0F;
  endfunction
  always_ff @(posedge clk) mack <= mreq && !mack;
  assign mack_rdata = f(mreq_addr);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] model(opcode_e o, logic [31:0] x, logic [31:0] z,
                                        logic [15:0] i, int w);
    logic [31:0] si = {{16{i[15]}}, i};
    case (o)
      OP_ADD:  return x + z;
      OP_SUB:  return x - z;
      OP_XOR:  return x ^ z;
      OP_MUL:  return x * z;
      OP_ADDI: return x + si;
      OP_TID:  return 32'(w * 16 + LANE) + si;
      OP_SLT:  return {31'd0, $signed(x) < $signed(z)};
      default: return 32'd0;
    endcase
  endfunction

  logic [31:0] ref_rf [NUM_WARPS][NUM_REGS];
  logic [31:0] exp_res [NUM_WARPS][2];
  logic [31:0] exp_ld;
  logic [NUM_WARPS-1:0] busy = '0;
  bit init_done = 0;
  int init_reg [NUM_WARPS];
  opcode_e ops [6] = '{OP_ADD, OP_SUB, OP_XOR, OP_MUL, OP_ADDI, OP_SLT};

  function automatic slot_t mkslot(opcode_e op, int rd, int ra, int rb, logic [15:0] imm, unit_e u);
    slot_t s;
    s.valid = 1; s.unit = u;
    s.inst = '{op: op, rd: 4'(rd), ra: 4'(ra), rb: 4'(rb), imm: imm};
    return s;
  endfunction

  // build a bundle for half h; the odd half may carry a load in slot 1
  function automatic bundle_t pick(int h, bit ld_ok);
    bundle_t b;
    int cand [$];
    b = '0;
    for (int k = 0; k < 8; k++) if (!busy[2 * k + h]) cand.push_back(2 * k + h);
    if (cand.size() == 0) return b;
    b.valid = 1;
    b.warp = WARP_W'(cand[$urandom % cand.size()]);
    if (init_reg[b.warp] < 16) begin
      b.slot[0] = mkslot(OP_TID, init_reg[b.warp], 0, 0, 16'($urandom), h ? U_ALU2 : U_ALU0);
      if (!h) b.slot[1] = mkslot(OP_TID, init_reg[b.warp] + 1, 0, 0, 16'($urandom), U_ALU1);
    end else begin
      int rd0 = $urandom % 16, rd1;
      b.slot[0] = mkslot(ops[$urandom % 6], rd0, $urandom % 16, $urandom % 16, 16'($urandom),
                         h ? U_ALU2 : U_ALU0);
      do rd1 = $urandom % 16; while (rd1 == rd0);
      begin
        int ra1, rb1;
        do ra1 = $urandom % 16; while (ra1 == rd0);
        do rb1 = $urandom % 16; while (rb1 == rd0);
        if (!h) b.slot[1] = mkslot(ops[$urandom % 6], rd1, ra1, rb1, 16'($urandom), U_ALU1);
        else if (ld_ok && $urandom % 2) b.slot[1] = mkslot(OP_LD, rd1, ra1, 0, 16'($urandom), U_LDST);
      end
    end
    return b;
  endfunction

  initial begin
    int cycles = 0;
    in_bundle = '0;
    for (int w = 0; w < NUM_WARPS; w++) init_reg[w] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (cycles < 6000) begin
      @(negedge clk);
      cycles++;
      // stage 2 results of the bundles now in stage 2
      for (int h = 0; h < 2; h++)
        for (int s = 0; s < 2; s++)
          if (u_ctrl.s2[h].valid && u_ctrl.s2[h].slot[s].valid &&
              u_ctrl.s2[h].slot[s].unit != U_LDST) begin
            automatic int w = u_ctrl.s2[h].warp;
            check(alu_res[u_ctrl.s2[h].slot[s].unit] == exp_res[w][s],
                  $sformatf("warp %0d slot %0d: %h exp %h", w, s,
                            alu_res[u_ctrl.s2[h].slot[s].unit], exp_res[w][s]));
            n_alu++;
          end
      if (ctrl.ld_wb_en) begin
        check(dut.ldata == exp_ld, "loaded value");
        n_ld++;
      end
      if (conflict) n_conf++;
      // new bundles
      in_bundle[0] = pick(0, 0);
      in_bundle[1] = pick(1, !ldst_busy);
      #1;
      if (accept) begin
        for (int h = 0; h < 2; h++) if (in_bundle[h].valid) begin
          automatic int w = in_bundle[h].warp;
          for (int s = 0; s < 2; s++) if (in_bundle[h].slot[s].valid) begin
            automatic inst_t i = in_bundle[h].slot[s].inst;
            if (i.op == OP_LD) begin
              exp_ld = f(ref_rf[w][i.ra] + {{16{i.imm[15]}}, i.imm});
              ref_rf[w][i.rd] = exp_ld;
            end else begin
              exp_res[w][s] = model(i.op, ref_rf[w][i.ra], ref_rf[w][i.rb], i.imm, w);
            end
          end
          for (int s = 0; s < 2; s++) if (in_bundle[h].slot[s].valid &&
                                           in_bundle[h].slot[s].inst.op != OP_LD)
            ref_rf[w][in_bundle[h].slot[s].inst.rd] = exp_res[w][s];
          if (init_reg[w] < 16) init_reg[w] += (h ? 1 : 2);
          busy[w] = 1;
        end
      end else in_bundle = '0;
      busy = busy & ~clear_busy;
    end
    $display("ALU results checked=%0d loads=%0d conflict cycles=%0d", n_alu, n_ld, n_conf);
    check(n_alu > 1000 && n_ld > 20 && n_conf > 20, "enough activity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
