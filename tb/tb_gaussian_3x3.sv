// tb_gaussian_3x3: 3x3 Gaussian filter on a 640 x 480 image, run on the whole GP-GPU core.
//
// What it does: the core filters a 640 x 480 image of random 8-bit pixels with the mask
// [1 2 1; 2 4 2; 1 2 1] / 16. The test compares every output pixel with a value computed
// here. The image size is the one used in the paper's Gaussian filter experiment.
// How: the input is stored with a one-pixel zero border ((W+2) x (H+2) words, one 32-bit word
// per pixel). Every output pixel then takes the same nine loads, so no thread of a warp ever
// needs to branch differently from the others. Thread t owns column x = t, t + 256, ...
// (a warp owns 16 adjacent columns) and walks down all H rows of its column. The nine loads
// use one pointer with constant offsets, and the sum is shifted right by 4.
// The kernel, the pixel format, the border handling and the memory map are this test's own;
// the paper only gives the image size and the filter. External memory is a behavioural model
// with a fixed latency of 3 cycles. The test prints the cycle count and cycles per pixel.
module tb_gaussian_3x3;
  import gpgpu_pkg::*;

  localparam int unsigned IMG_W = 640, IMG_H = 480;
  localparam int unsigned PW = IMG_W + 2;
  localparam int unsigned MEM_AW = 20;
  localparam int unsigned MEM_LAT = 3;
  localparam int unsigned IN_BASE = 32'h10000, OUT_BASE = 32'h80000;

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
  logic [DATA_W-1:0] mem [1 << MEM_AW];
  int unsigned lat_cnt = 0;
  always_ff @(posedge clk) begin
    if (mem_req && !mem_ack) begin
      if (lat_cnt == MEM_LAT - 1) lat_cnt <= 0;
      else lat_cnt <= lat_cnt + 1;
    end
    if (mem_req && mem_ack && mem_we) mem[mem_addr[MEM_AW-1:0]] <= mem_wdata;
  end
  assign mem_ack   = mem_req && lat_cnt == MEM_LAT - 1;
  assign mem_rdata = mem[mem_addr[MEM_AW-1:0]];

  // ---------------- kernel assembler ----------------
  logic [31:0] prog [256];
  int unsigned np = 0;

  function automatic void emit(input opcode_e op, input int rd, input int ra, input int rb,
                               input int imm);
    prog[np] = encode(op, 4'(rd), 4'(ra), 4'(rb), 16'(imm));
    np++;
  endfunction

  // rd = v for 0 <= v < 2^30; r0 holds 0 and r15 holds 15.
  function automatic void li(input int rd, input int unsigned v);
    emit(OP_ADDI, rd, 0, 0, int'(v >> 15));
    emit(OP_SHL, rd, rd, 15, 0);
    emit(OP_ADDI, rd, rd, 0, int'(v & 32'h7FFF));
  endfunction

  // Branch at the current position to instruction number target.
  function automatic void bnz(input int ra, input int target);
    emit(OP_BNZ, 0, ra, 0, target - int'(np) - 1);
  endfunction

  int outer_pc, inner_pc, exit_fix;
  task automatic build_kernel();
    emit(OP_TID, 1, 0, 0, 0);                 // r1 = x = thread index
    emit(OP_XOR, 0, 1, 1, 0);                 // r0 = 0
    emit(OP_ADDI, 15, 0, 0, 15);              // r15 = 15
    emit(OP_ADDI, 14, 0, 0, 4);               // r14 = 4 (final shift)
    emit(OP_ADDI, 13, 0, 0, IMG_W);           // r13 = W
    emit(OP_ADDI, 12, 0, 0, IMG_H);           // r12 = H
    li(11, IN_BASE);                          // r11 = input base
    li(10, OUT_BASE);                         // r10 = output base
    outer_pc = np;                            // outer: one column per thread
    emit(OP_SLT, 5, 1, 13, 0);                //   r5 = x < W
    emit(OP_ADDI, 5, 5, 0, -1);               //   r5 = 0 if x < W
    exit_fix = np;
    emit(OP_BNZ, 0, 5, 0, 0);                 //   if x >= W goto end (patched)
    emit(OP_ADD, 2, 1, 11, 0);                //   r2 = &in[0][x] (padded)
    emit(OP_ADD, 3, 1, 10, 0);                //   r3 = &out[0][x]
    emit(OP_ADDI, 4, 12, 0, 0);               //   r4 = rows left
    inner_pc = np;                            // inner: one output pixel
    emit(OP_LD, 5, 2, 0, 0);                  //   corners
    emit(OP_LD, 6, 2, 0, 2);
    emit(OP_ADD, 5, 5, 6, 0);
    emit(OP_LD, 6, 2, 0, 2 * PW);
    emit(OP_LD, 7, 2, 0, 2 * PW + 2);
    emit(OP_ADD, 6, 6, 7, 0);
    emit(OP_ADD, 5, 5, 6, 0);                 //   r5 = sum of corners
    emit(OP_LD, 6, 2, 0, 1);                  //   edges
    emit(OP_LD, 7, 2, 0, PW);
    emit(OP_ADD, 6, 6, 7, 0);
    emit(OP_LD, 7, 2, 0, PW + 2);
    emit(OP_LD, 8, 2, 0, 2 * PW + 1);
    emit(OP_ADD, 7, 7, 8, 0);
    emit(OP_ADD, 6, 6, 7, 0);
    emit(OP_ADD, 6, 6, 6, 0);                 //   r6 = 2 * sum of edges
    emit(OP_LD, 7, 2, 0, PW + 1);             //   centre
    emit(OP_ADD, 7, 7, 7, 0);
    emit(OP_ADD, 7, 7, 7, 0);                 //   r7 = 4 * centre
    emit(OP_ADD, 5, 5, 6, 0);
    emit(OP_ADD, 5, 5, 7, 0);
    emit(OP_SHR, 5, 5, 14, 0);                //   r5 = sum / 16
    emit(OP_ST, 0, 3, 5, 0);                  //   out[y][x] = r5
    emit(OP_ADDI, 2, 2, 0, PW);               //   next row
    emit(OP_ADDI, 3, 3, 0, IMG_W);
    emit(OP_ADDI, 4, 4, 0, -1);
    bnz(4, inner_pc);
    emit(OP_ADDI, 1, 1, 0, NUM_WARPS * NUM_SP);  // next column owned by this thread
    bnz(15, outer_pc);                        //   always taken
    prog[exit_fix] = encode(OP_BNZ, 4'd0, 4'd5, 4'd0, 16'(int'(np) - exit_fix - 1));
    emit(OP_EXIT, 0, 0, 0, 0);
  endtask

  // ---------------- statistics ----------------
  int unsigned checks = 0, failures = 0, cycles = 0, n_insts = 0, n_hit = 0, n_miss = 0;
  always_ff @(posedge clk) if (rst_n && busy) begin
    cycles  <= cycles + 1;
    n_insts <= n_insts + 32'(evt.issued);
    n_hit   <= n_hit + evt.l1_hit;
    n_miss  <= n_miss + evt.l1_miss;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int unsigned pix(input int x, input int y);  // padded input, x,y >= -1
    return mem[IN_BASE + (y + 1) * PW + (x + 1)];
  endfunction

  initial begin
    for (int i = 0; i < (1 << MEM_AW); i++) mem[i] = '0;
    for (int y = 0; y < int'(IMG_H); y++)
      for (int x = 0; x < int'(IMG_W); x++)
        mem[IN_BASE + (y + 1) * PW + (x + 1)] = $urandom_range(255);
    build_kernel();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < int'(np); i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = PC_W'(i); prog_wdata = prog[i];
    end
    @(negedge clk);
    prog_we = 1'b0;
    warp_mask = '1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);

    for (int y = 0; y < int'(IMG_H); y++)
      for (int x = 0; x < int'(IMG_W); x++) begin
        int unsigned s, got;
        s = pix(x-1, y-1) + 2 * pix(x, y-1) + pix(x+1, y-1)
          + 2 * pix(x-1, y) + 4 * pix(x, y) + 2 * pix(x+1, y)
          + pix(x-1, y+1) + 2 * pix(x, y+1) + pix(x+1, y+1);
        got = mem[OUT_BASE + y * IMG_W + x];
        check(got == s >> 4, $sformatf("out[%0d][%0d] = %0d, expected %0d", y, x, got, s >> 4));
      end
    check(n_insts > 0, "no instructions issued");
    $display("image %0dx%0d: cycles=%0d instructions=%0d cycles/pixel=%0d.%02d L1 hits=%0d misses=%0d",
             IMG_W, IMG_H, cycles, n_insts, cycles / (IMG_W * IMG_H),
             (cycles * 100 / (IMG_W * IMG_H)) % 100, n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
