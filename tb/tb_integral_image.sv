// tb_integral_image: integral image of a 640 x 480 image, run on the whole GP-GPU core.
//
// What it does: the core builds the integral image II(x,y) = sum of in(x',y') over x' <= x,
// y' <= y for a 640 x 480 image of random 8-bit pixels. The test compares every output word
// with a value computed here. The image size is the one used in the paper's integral image
// experiment.
// How: two kernel launches, because the core has no barrier between warps.
//  * Pass 1, row sums: thread t owns rows y = t, t + 256, ...; it walks along its row
//    and stores the running sum to the output image.
//  * Pass 2, column sums: thread t owns columns x = t, t + 256, ...; it walks down its
//    column and replaces each word of the output by the running sum of the column.
// A warp always owns 16 adjacent rows or columns, and 640 and 480 are multiples of 16. So
// every loop condition is the same for all threads of a warp, which is what the core's
// warp-uniform branch needs. The kernels, the pixel format (one 32-bit word) and the memory
// map are this test's own; the paper only gives the algorithm and the image size. External
// memory is a behavioural model with a fixed latency of 3 cycles. The test prints the cycle
// count of each pass and cycles per pixel.
module tb_integral_image;
  import gpgpu_pkg::*;

  localparam int unsigned IMG_W = 640, IMG_H = 480;
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

  // pass 1: rows (vertical = 0) or pass 2: columns (vertical = 1)
  task automatic build_kernel(input bit vertical);
    int outer_pc, inner_pc, exit_fix;
    np = 0;
    emit(OP_TID, 1, 0, 0, 0);                 // r1 = row (pass 1) or column (pass 2)
    emit(OP_XOR, 0, 1, 1, 0);                 // r0 = 0
    emit(OP_ADDI, 15, 0, 0, 15);              // r15 = 15
    emit(OP_ADDI, 13, 0, 0, vertical ? IMG_W : IMG_H);  // r13 = lines to cover
    emit(OP_ADDI, 12, 0, 0, vertical ? IMG_H : IMG_W);  // r12 = words per line
    li(11, vertical ? OUT_BASE : IN_BASE);    // r11 = source base
    li(10, OUT_BASE);                         // r10 = destination base
    outer_pc = np;                            // outer: one line per thread
    emit(OP_SLT, 5, 1, 13, 0);                //   r5 = line < lines
    emit(OP_ADDI, 5, 5, 0, -1);               //   r5 = 0 if so
    exit_fix = np;
    emit(OP_BNZ, 0, 5, 0, 0);                 //   else goto end (patched)
    if (vertical) begin
      emit(OP_ADD, 2, 1, 11, 0);              //   r2 = &src[0][x]
      emit(OP_ADD, 3, 1, 10, 0);              //   r3 = &dst[0][x]
    end else begin
      emit(OP_MUL, 2, 1, 12, 0);              //   r2 = y * W
      emit(OP_ADD, 3, 2, 10, 0);              //   r3 = &dst[y][0]
      emit(OP_ADD, 2, 2, 11, 0);              //   r2 = &src[y][0]
    end
    emit(OP_XOR, 6, 6, 6, 0);                 //   r6 = running sum = 0
    emit(OP_ADDI, 4, 12, 0, 0);               //   r4 = words left
    inner_pc = np;                            // inner: one word
    emit(OP_LD, 5, 2, 0, 0);
    emit(OP_ADDI, 2, 2, 0, vertical ? IMG_W : 1);
    emit(OP_ADD, 6, 6, 5, 0);
    emit(OP_ADDI, 4, 4, 0, -1);
    emit(OP_ST, 0, 3, 6, 0);
    emit(OP_ADDI, 3, 3, 0, vertical ? IMG_W : 1);
    bnz(4, inner_pc);
    emit(OP_ADDI, 1, 1, 0, NUM_WARPS * NUM_SP);  // next line owned by this thread
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

  task automatic run_pass(input bit vertical, output int unsigned pass_cycles);
    int unsigned c0;
    build_kernel(vertical);
    for (int i = 0; i < int'(np); i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = PC_W'(i); prog_wdata = prog[i];
    end
    @(negedge clk);
    prog_we = 1'b0;
    c0 = cycles;
    warp_mask = '1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    pass_cycles = cycles - c0;
  endtask

  logic [DATA_W-1:0] img [IMG_H][IMG_W];
  initial begin
    int unsigned c_rows, c_cols;
    for (int i = 0; i < (1 << MEM_AW); i++) mem[i] = '0;
    for (int y = 0; y < int'(IMG_H); y++)
      for (int x = 0; x < int'(IMG_W); x++) begin
        img[y][x] = $urandom_range(255);
        mem[IN_BASE + y * IMG_W + x] = img[y][x];
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_pass(1'b0, c_rows);
    run_pass(1'b1, c_cols);

    // reference: II(x,y) = in(x,y) + II(x-1,y) + II(x,y-1) - II(x-1,y-1)
    for (int y = 0; y < int'(IMG_H); y++)
      for (int x = 0; x < int'(IMG_W); x++) begin
        logic [DATA_W-1:0] got;
        img[y][x] = img[y][x] + (x > 0 ? img[y][x-1] : 0) + (y > 0 ? img[y-1][x] : 0)
                  - (x > 0 && y > 0 ? img[y-1][x-1] : 0);
        got = mem[OUT_BASE + y * IMG_W + x];
        check(got == img[y][x], $sformatf("II[%0d][%0d] = %0d, expected %0d", y, x, got, img[y][x]));
      end
    check(n_insts > 0, "no instructions issued");
    $display("image %0dx%0d: row pass %0d cycles, column pass %0d cycles, total %0d",
             IMG_W, IMG_H, c_rows, c_cols, cycles);
    $display("instructions=%0d cycles/pixel=%0d.%02d L1 hits=%0d misses=%0d", n_insts,
             cycles / (IMG_W * IMG_H), (cycles * 100 / (IMG_W * IMG_H)) % 100, n_hit, n_miss);
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
