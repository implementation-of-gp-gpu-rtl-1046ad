// tb_gpgpu_top: end-to-end test of the GP-GPU core at its default sizes.
//
// Loads a kernel into the instruction cache and runs it on all 16 warps (256 threads).
// Each thread t reads a = A[t] and b = B[t], then writes C[t] = (a + b) - a * b,
// D[t] = 3 * a through a three-trip warp-uniform loop, and E[t] = ((t+1) ^ (t+2)) + C[t]. External memory is a behavioural model with a
// fixed latency. The results are compared with values computed here, and the test counts how
// often each mechanism of the core happened: 3- and 4-instruction issue, the ALU and LD/ST
// issue limits, dependent-pair splitting, register bank conflicts, taken branches, and L1
// hits and misses. A mechanism that never happened counts as a failure.
module tb_gpgpu_top;
  import gpgpu_pkg::*;

  localparam int unsigned MEM_WORDS = 1 << 15;
  localparam int unsigned MEM_LAT   = 3;
  localparam int unsigned A_BASE = 32'h1000, B_BASE = 32'h2000;
  localparam int unsigned C_BASE = 32'h3000, D_BASE = 32'h4000, E_BASE = 32'h5000;
  localparam int unsigned NTHREADS = NUM_WARPS * NUM_SP;

  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_we = 1'b0, start = 1'b0, busy;
  logic [PC_W-1:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0;
  logic [NUM_WARPS-1:0] warp_mask = '0;
  core_evt_t evt;
  logic mem_req, mem_we, mem_ack;
  logic [ADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;

  always #5 clk = ~clk;

  gpgpu_top dut (.*);

  // ---------------- external memory model ----------------
  logic [DATA_W-1:0] mem [MEM_WORDS];
  int unsigned lat_cnt = 0;
  always_ff @(posedge clk) begin
    if (mem_req && !mem_ack) begin
      if (lat_cnt == MEM_LAT - 1) lat_cnt <= 0;
      else lat_cnt <= lat_cnt + 1;
    end
    if (mem_req && mem_ack && mem_we) mem[mem_addr[14:0]] <= mem_wdata;
  end
  assign mem_ack   = mem_req && lat_cnt == MEM_LAT - 1;
  assign mem_rdata = mem[mem_addr[14:0]];

  // ---------------- kernel ----------------
  localparam int unsigned NPROG = 18;
  logic [31:0] prog [NPROG];
  initial begin
    prog[0]  = encode(OP_TID,  4'd1,  4'd0,  4'd0,  16'd0);        // r1 = t
    prog[1]  = encode(OP_XOR,  4'd9,  4'd1,  4'd1,  16'd0);        // r9 = 0 (depends on r1)
    prog[2]  = encode(OP_ADDI, 4'd12, 4'd1,  4'd0,  16'd1);        // r12 = t + 1
    prog[3]  = encode(OP_ADDI, 4'd13, 4'd1,  4'd0,  16'd2);        // r13 = t + 2
    prog[4]  = encode(OP_LD,   4'd3,  4'd1,  4'd0,  16'(A_BASE));  // r3 = A[t]
    prog[5]  = encode(OP_LD,   4'd4,  4'd1,  4'd0,  16'(B_BASE));  // r4 = B[t]
    prog[6]  = encode(OP_ADD,  4'd5,  4'd3,  4'd4,  16'd0);        // r5 = a + b
    prog[7]  = encode(OP_MUL,  4'd6,  4'd3,  4'd4,  16'd0);        // r6 = a * b
    prog[8]  = encode(OP_ADDI, 4'd8,  4'd9,  4'd0,  16'd3);        // r8 = 3 (trip count)
    prog[9]  = encode(OP_ADDI, 4'd10, 4'd9,  4'd0,  16'd0);        // r10 = 0
    prog[10] = encode(OP_ADD,  4'd10, 4'd10, 4'd3,  16'd0);        // loop: r10 += a
    prog[11] = encode(OP_ADDI, 4'd8,  4'd8,  4'd0,  16'hFFFF);     //       r8 -= 1
    prog[12] = encode(OP_BNZ,  4'd0,  4'd8,  4'd0,  16'hFFFD);     //       if r8 goto 10
    prog[13] = encode(OP_SUB,  4'd11, 4'd5,  4'd6,  16'd0);        // r11 = a + b - a * b
    prog[14] = encode(OP_XOR,  4'd15, 4'd12, 4'd13, 16'd0);        // r15 = (t+1) ^ (t+2)
    prog[15] = encode(OP_ST,   4'd0,  4'd1,  4'd11, 16'(C_BASE));  // C[t] = r11
    prog[16] = encode(OP_ADD,  4'd7,  4'd15, 4'd11, 16'd0);        // r7 = r15 + r11
    prog[17] = encode(OP_ST,   4'd0,  4'd1,  4'd10, 16'(D_BASE));  // D[t] = r10
  end

  // ---------------- event counters ----------------
  int unsigned checks = 0, failures = 0, cycles = 0;
  int unsigned n_issue3 = 0, n_issue4 = 0, n_conflict = 0, n_alu_lim = 0, n_ldst_lim = 0;
  int unsigned n_dep = 0, n_branch = 0, n_hit = 0, n_miss = 0, n_insts = 0;
  always_ff @(posedge clk) if (rst_n && busy) begin
    cycles     <= cycles + 1;
    n_insts    <= n_insts + 32'(evt.issued);
    n_issue3   <= n_issue3 + (evt.issued == 3);
    n_issue4   <= n_issue4 + (evt.issued == 4);
    n_conflict <= n_conflict + evt.conflict;
    n_alu_lim  <= n_alu_lim + evt.alu_limit;
    n_ldst_lim <= n_ldst_lim + evt.ldst_limit;
    n_dep      <= n_dep + evt.dep_split;
    n_branch   <= n_branch + evt.branch_taken;
    n_hit      <= n_hit + evt.l1_hit;
    n_miss     <= n_miss + evt.l1_miss;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic seen(input int unsigned n, input string what);
    $display("  %-28s %0d", what, n);
    check(n > 0, {what, " never happened"});
  endtask

  // ---------------- stimulus ----------------
  logic [DATA_W-1:0] a_v [NTHREADS], b_v [NTHREADS];
  initial begin
    for (int i = 0; i < int'(MEM_WORDS); i++) mem[i] = '0;
    for (int t = 0; t < int'(NTHREADS); t++) begin
      a_v[t] = $urandom;
      b_v[t] = $urandom;
      mem[A_BASE + t] = a_v[t];
      mem[B_BASE + t] = b_v[t];
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < int'(NPROG) + 2; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = PC_W'(i); prog_wdata = (i < int'(NPROG)) ? prog[i] :
                   (i == int'(NPROG)) ? encode(OP_ST, 4'd0, 4'd1, 4'd7, 16'(E_BASE)) :
                   encode(OP_EXIT, 4'd0, 4'd0, 4'd0, 16'd0);
    end
    @(negedge clk);
    prog_we = 1'b0;
    warp_mask = '1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);

    for (int t = 0; t < int'(NTHREADS); t++) begin
      logic [DATA_W-1:0] c_exp, d_exp;
      c_exp = (a_v[t] + b_v[t]) - a_v[t] * b_v[t];
      d_exp = a_v[t] * 3;
      check(mem[C_BASE + t] == c_exp, $sformatf("C[%0d] = %h, expected %h", t, mem[C_BASE + t], c_exp));
      check(mem[D_BASE + t] == d_exp, $sformatf("D[%0d] = %h, expected %h", t, mem[D_BASE + t], d_exp));
      check(mem[E_BASE + t] == ((t + 1) ^ (t + 2)) + c_exp,
            $sformatf("E[%0d] = %h", t, mem[E_BASE + t]));
    end
    // per warp: 20 instructions, the loop body (10..12) runs twice more: 26
    check(n_insts == NUM_WARPS * 26, $sformatf("issued %0d instructions, expected %0d", n_insts, NUM_WARPS * 26));
    $display("cycles=%0d instructions=%0d", cycles, n_insts);
    seen(n_issue3,   "3-instruction issue");
    seen(n_issue4,   "4-instruction issue");
    seen(n_alu_lim,  "ALU limit (3 ALUs)");
    seen(n_ldst_lim, "LD/ST limit (1 unit)");
    seen(n_dep,      "dependent pair split");
    seen(n_conflict, "bank conflict");
    seen(n_branch,   "taken branch");
    seen(n_hit,      "L1 read hit");
    seen(n_miss,     "L1 read miss");
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
