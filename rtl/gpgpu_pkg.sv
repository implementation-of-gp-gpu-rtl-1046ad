// gpgpu_pkg: sizes, instruction format and shared types of the SIMT GP-GPU core.
//
// The core runs warps of 16 threads on 16 stream processors (SPs). Warps are split into an
// even and an odd group; each cycle the warp scheduler may issue up to two instructions of
// one even warp and two of one odd warp (at most three ALU instructions and one LD/ST
// instruction in total). Each SP holds two register files of four banks each, one for the
// even warps and one for the odd warps, read through a 4-stage operand collector.
//
// The SP count, warp size, warp count, bank count, ALU count and the single LD/ST unit follow
// the paper. The instruction set, the register count, the data width and the memory map
// are this design's own choices: the paper gives none of them.
//
// Instruction format (32 bits):
//   [31:28] opcode   [27:24] rd   [23:20] ra (OP0)   [19:16] rb (OP1)   [15:0] imm (signed)
// Register r of a thread lives in bank r[1:0], row {warp/2, r[3:2]} of its half's banks.
package gpgpu_pkg;

  localparam int unsigned NUM_SP      = 16;  // stream processors = threads per warp
  localparam int unsigned NUM_WARPS   = 16;  // warps 0..15; even ones and odd ones
  localparam int unsigned NUM_HALVES  = 2;   // even-warp half and odd-warp half
  localparam int unsigned WARPS_HALF  = NUM_WARPS / NUM_HALVES;
  localparam int unsigned NUM_BANKS   = 4;   // register banks per half
  localparam int unsigned NUM_REGS    = 16;  // registers per thread
  localparam int unsigned NUM_ALU     = 3;   // ALUs per SP
  localparam int unsigned DATA_W      = 32;
  localparam int unsigned ADDR_W      = 32;  // word address of the data memory
  localparam int unsigned PC_W        = 8;   // instruction cache word address
  localparam int unsigned WARP_W      = $clog2(NUM_WARPS);
  localparam int unsigned WLOC_W      = $clog2(WARPS_HALF);
  localparam int unsigned REG_W       = $clog2(NUM_REGS);
  localparam int unsigned BANK_W      = $clog2(NUM_BANKS);
  localparam int unsigned ROW_W       = WLOC_W + REG_W - BANK_W;  // row inside one bank
  localparam int unsigned BANK_DEPTH  = 1 << ROW_W;

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,   // no operation
    OP_ADD  = 4'd1,   // rd = ra + rb
    OP_SUB  = 4'd2,   // rd = ra - rb
    OP_AND  = 4'd3,   // rd = ra & rb
    OP_OR   = 4'd4,   // rd = ra | rb
    OP_XOR  = 4'd5,   // rd = ra ^ rb
    OP_SHL  = 4'd6,   // rd = ra << rb[4:0]
    OP_SHR  = 4'd7,   // rd = ra >> rb[4:0] (logical)
    OP_MUL  = 4'd8,   // rd = low 32 bits of ra * rb
    OP_ADDI = 4'd9,   // rd = ra + imm
    OP_TID  = 4'd10,  // rd = warp * 16 + lane + imm (global thread index)
    OP_LD   = 4'd11,  // rd = mem[ra + imm]
    OP_ST   = 4'd12,  // mem[ra + imm] = rb
    OP_BNZ  = 4'd13,  // if ra of lane 0 != 0: pc = pc + 1 + imm (warp-uniform branch)
    OP_SLT  = 4'd14,  // rd = (signed ra < signed rb)
    OP_EXIT = 4'd15   // the warp ends
  } opcode_e;

  // Execution unit an issued instruction is routed to by the second crossbar.
  typedef enum logic [1:0] {
    U_ALU0 = 2'd0,
    U_ALU1 = 2'd1,
    U_ALU2 = 2'd2,
    U_LDST = 2'd3
  } unit_e;

  typedef struct packed {
    opcode_e          op;
    logic [REG_W-1:0] rd;
    logic [REG_W-1:0] ra;
    logic [REG_W-1:0] rb;
    logic [15:0]      imm;
  } inst_t;

  // One instruction slot of an issued bundle.
  typedef struct packed {
    logic  valid;
    inst_t inst;
    unit_e unit;
  } slot_t;

  // What one warp issues in one cycle: up to two instructions of one warp.
  typedef struct packed {
    logic              valid;
    logic [WARP_W-1:0] warp;
    logic [PC_W-1:0]   pc;     // pc of slot 0
    slot_t [1:0]       slot;
  } bundle_t;


  // Operand request slots of one half, in priority order (oldest first):
  //   2s: stage-1 slot s OP0, 2s+1: stage-1 slot s OP1, 4+s: stage-0 slot s OP0
  localparam int unsigned NUM_REQ = 6;

  // Control word the SP control unit broadcasts to every stream processor each cycle.
  typedef struct packed {
    // operand collector
    logic                                   adv0;       // stage 0 -> stage 1
    logic                                   adv1;       // stage 1 -> stage 2
    logic [1:0][NUM_REQ-1:0]                slot_gnt;   // [half][request] read granted
    logic [1:0][NUM_REQ-1:0][BANK_W-1:0]    slot_bank;  // [half][request] bank it reads
    logic [1:0][NUM_BANKS-1:0][ROW_W-1:0]   bank_row;   // [half][bank] row read
    // execute (stage 2): second crossbar and units
    opcode_e [NUM_ALU-1:0]                  alu_op;
    logic [NUM_ALU-1:0][1:0]                alu_src;    // {half, slot} feeding each ALU
    logic [NUM_ALU-1:0][15:0]               alu_imm;
    logic [NUM_ALU-1:0][WARP_W-1:0]         alu_warp;
    logic                                   ldst_start;
    logic                                   ldst_store;
    logic [1:0]                             ldst_src;
    logic [15:0]                            ldst_imm;
    // write back of ALU results (end of stage 2)
    logic [1:0][1:0]                        wb_en;      // [half][slot]
    logic [1:0][1:0][BANK_W-1:0]            wb_bank;
    logic [1:0][1:0][ROW_W-1:0]             wb_row;
    logic [1:0][1:0][1:0]                   wb_alu;     // ALU whose result is written
    // completion of a LD/ST instruction
    logic                                   ldst_finish;
    logic                                   ld_wb_en;
    logic                                   ld_wb_half;
    logic [BANK_W-1:0]                      ld_wb_bank;
    logic [ROW_W-1:0]                       ld_wb_row;
  } sp_ctrl_t;

  // Per-cycle events of the core, brought out for performance counting.
  typedef struct packed {
    logic [2:0] issued;       // instructions issued this cycle (0..4)
    logic       conflict;     // a register read was refused (register bank conflict)
    logic       alu_limit;    // an ALU instruction was held back (three ALUs in use)
    logic       ldst_limit;   // a LD/ST instruction was held back (one LD/ST unit)
    logic       dep_split;    // a warp's second instruction depends on its first
    logic       branch_taken; // a warp-uniform branch was taken
    logic       l1_hit;       // L1 read hit
    logic       l1_miss;      // L1 read miss (line refill started)
  } core_evt_t;

  function automatic inst_t decode(input logic [31:0] w);
    inst_t i;
    i.op  = opcode_e'(w[31:28]);
    i.rd  = w[27:24];
    i.ra  = w[23:20];
    i.rb  = w[19:16];
    i.imm = w[15:0];
    return i;
  endfunction

  function automatic logic [31:0] encode(input opcode_e op, input logic [3:0] rd,
                                         input logic [3:0] ra, input logic [3:0] rb,
                                         input logic [15:0] imm);
    return {op, rd, ra, rb, imm};
  endfunction

  function automatic logic is_ldst(input opcode_e op);
    return op == OP_LD || op == OP_ST;
  endfunction

  // Reads ra (OP0).
  function automatic logic uses_ra(input opcode_e op);
    return !(op == OP_NOP || op == OP_TID || op == OP_EXIT);
  endfunction

  // Reads rb (OP1).
  function automatic logic uses_rb(input opcode_e op);
    return op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR, OP_MUL,
                      OP_ST, OP_SLT};
  endfunction

  function automatic logic writes_rd(input opcode_e op);
    return !(op == OP_NOP || op == OP_ST || op == OP_BNZ || op == OP_EXIT);
  endfunction

  // Ends a warp's issue group: nothing after it may go in the same bundle.
  function automatic logic ends_group(input opcode_e op);
    return op == OP_BNZ || op == OP_EXIT;
  endfunction

  function automatic logic [BANK_W-1:0] bank_of(input logic [REG_W-1:0] r);
    return r[BANK_W-1:0];
  endfunction

  function automatic logic [ROW_W-1:0] row_of(input logic [WARP_W-1:0] warp,
                                              input logic [REG_W-1:0] r);
    return {warp[WARP_W-1:1], r[REG_W-1:BANK_W]};
  endfunction

endpackage
