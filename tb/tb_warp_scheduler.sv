// tb_warp_scheduler: checks the superscalar issue arbitration on hand-built cases, then the
// warp state (round robin, busy, pc update, EXIT, branch redirect).
// The instruction cache is modelled by an array here. PCs are placed with the branch input.
module tb_warp_scheduler;
  import gpgpu_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, accept = 0, ldst_busy = 0, running;
  logic [NUM_WARPS-1:0] warp_mask = '0, clear_busy = '0;
  logic [3:0][PC_W-1:0] ic_raddr;
  logic [3:0][31:0] ic_rdata;
  bundle_t [1:0] bundle;
  logic [1:0] br_valid = '0;
  logic [1:0][WARP_W-1:0] br_warp = '0;
  logic [1:0][PC_W-1:0] br_target = '0;
  logic arb_alu_limit, arb_ldst_limit, arb_dep_split;
  logic [31:0] imem [256];
  int unsigned checks = 0, failures = 0;

  warp_scheduler dut (.*);
  always #5 clk = ~clk;
  always_comb for (int p = 0; p < 4; p++) ic_rdata[p] = imem[ic_raddr[p]];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam logic [31:0] ALU_A = {OP_ADD, 4'd1, 4'd2, 4'd3, 16'd0};
  localparam logic [31:0] ALU_B = {OP_ADD, 4'd5, 4'd6, 4'd7, 16'd0};
  localparam logic [31:0] ALU_DEP = {OP_ADD, 4'd8, 4'd1, 4'd7, 16'd0};  // reads r1
  localparam logic [31:0] LD_A  = {OP_LD, 4'd9, 4'd2, 4'd0, 16'd4};
  localparam logic [31:0] LD_B  = {OP_LD, 4'd10, 4'd3, 4'd0, 16'd8};
  localparam logic [31:0] EXIT  = {OP_EXIT, 12'd0, 16'd0};

  // place the pc of warp w (even warps through br port 0, odd through 1)
  task automatic set_pc(int w, int pc);
    @(negedge clk);
    br_valid[w % 2] = 1; br_warp[w % 2] = WARP_W'(w); br_target[w % 2] = PC_W'(pc);
    @(negedge clk);
    br_valid = '0;
  endtask

  // expected: number of slots issued for even and odd warp, and the limit flags
  task automatic expect_issue(string name, int ne, int no, bit alu_lim, bit ldst_lim, bit dep);
    #1;
    check(bundle[0].valid == (ne > 0) && bundle[0].slot[0].valid == (ne > 0) &&
          bundle[0].slot[1].valid == (ne > 1), $sformatf("%s: even issues %0d", name, ne));
    check(bundle[1].valid == (no > 0) && bundle[1].slot[0].valid == (no > 0) &&
          bundle[1].slot[1].valid == (no > 1), $sformatf("%s: odd issues %0d", name, no));
    check(arb_alu_limit == alu_lim, $sformatf("%s: ALU limit flag", name));
    check(arb_ldst_limit == ldst_lim, $sformatf("%s: LD/ST limit flag", name));
    check(arb_dep_split == dep, $sformatf("%s: dependency flag", name));
  endtask

  initial begin
    for (int i = 0; i < 256; i++) imem[i] = EXIT;
    // program fragments at fixed addresses
    imem[10] = ALU_A;  imem[11] = ALU_B;     // two independent ALU
    imem[20] = LD_A;   imem[21] = LD_B;      // two LD/ST
    imem[30] = ALU_A;  imem[31] = ALU_DEP;   // dependent pair
    imem[40] = ALU_A;  imem[41] = LD_A;      // ALU + LD
    imem[50] = LD_A;   imem[51] = ALU_B;     // LD + ALU
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    warp_mask = 16'h0003; start = 1;
    @(negedge clk);
    start = 0;

    set_pc(0, 10); set_pc(1, 10);
    expect_issue("ALU,ALU + ALU,ALU", 2, 1, 1, 0, 0);
    check(bundle[0].slot[0].unit == U_ALU0 && bundle[0].slot[1].unit == U_ALU1 &&
          bundle[1].slot[0].unit == U_ALU2, "ALU assignment in slot order");
    set_pc(0, 20); set_pc(1, 10);
    expect_issue("LD,LD + ALU,ALU", 1, 2, 0, 1, 0);
    check(bundle[0].slot[0].unit == U_LDST, "LD goes to LD/ST unit");
    set_pc(0, 40); set_pc(1, 10);
    expect_issue("ALU,LD + ALU,ALU (four)", 2, 2, 0, 0, 0);
    set_pc(0, 40); set_pc(1, 50);
    expect_issue("ALU,LD + LD,ALU", 2, 0, 0, 1, 0);
    set_pc(0, 30); set_pc(1, 10);
    expect_issue("dependent pair", 1, 2, 0, 0, 1);
    ldst_busy = 1;
    set_pc(0, 50); set_pc(1, 40);
    expect_issue("LD/ST unit busy", 0, 1, 0, 1, 0);
    ldst_busy = 0;

    // issue and busy: accept once with warps at 40 / 10: pcs advance by 2
    set_pc(0, 40); set_pc(1, 10);
    @(negedge clk);
    accept = 1;
    @(negedge clk);
    accept = 0;
    #1;
    check(!bundle[0].valid && !bundle[1].valid, "issued warps are busy");
    check(dut.pc_q[0] == 42 && dut.pc_q[1] == 12, "pc advanced by issue width");
    clear_busy = 16'h0003;
    @(negedge clk);
    clear_busy = '0;
    #1;
    check(bundle[0].valid && bundle[1].valid, "warps ready after clear_busy");
    check(ic_raddr[0] == 42 && ic_raddr[2] == 12, "fetch from new pc");
    // EXIT: pc 42 and 12 hold EXIT -> both warps end
    accept = 1;
    @(negedge clk);
    accept = 0;
    clear_busy = 16'h0003;
    @(negedge clk);
    clear_busy = '0;
    #1;
    check(!running, "all warps ended after EXIT");

    // round robin across 8 even warps: each warp issued once in 8 accepts
    warp_mask = 16'h5555; start = 1;
    @(negedge clk);
    start = 0;
    for (int w = 0; w < 16; w += 2) set_pc(w, 10);
    begin
      logic [15:0] seen = '0;
      for (int n = 0; n < 8; n++) begin
        #1;
        check(bundle[0].valid, "an even warp is ready");
        seen[bundle[0].warp] = 1;
        accept = 1;
        @(negedge clk);
        accept = 0;
      end
      check(seen == 16'h5555, $sformatf("round robin served %h", seen));
    end
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
