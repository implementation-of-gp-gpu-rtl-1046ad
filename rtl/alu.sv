// alu: integer ALU of a stream processor; each SP has three of them.
//
// The paper names the ALUs and their number but not their operations. This ALU executes
// the register-writing arithmetic and logic instructions of the package's instruction set in
// one combinational step. For OP_BNZ it returns 1 when ra is not zero, which the control unit
// reads from lane 0 to resolve the warp-uniform branch. OP_TID returns the thread's global
// index (warp * 16 + lane) plus the immediate.
module alu
  import gpgpu_pkg::*;
#(
  parameter int unsigned LANE_W = 4
) (
  input  opcode_e             op,
  input  logic [DATA_W-1:0]   a,
  input  logic [DATA_W-1:0]   b,
  input  logic [15:0]         imm,
  input  logic [WARP_W-1:0]   warp,
  input  logic [LANE_W-1:0]   lane,
  output logic [DATA_W-1:0]   y
);
  logic [DATA_W-1:0] simm;
  assign simm = DATA_W'(signed'(imm));

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SHL:  y = a << b[4:0];
      OP_SHR:  y = a >> b[4:0];
      OP_MUL:  y = a * b;
      OP_ADDI: y = a + simm;
      OP_TID:  y = DATA_W'({warp, lane}) + simm;
      OP_SLT:  y = DATA_W'($signed(a) < $signed(b));
      OP_BNZ:  y = DATA_W'(a != '0);
      default: y = '0;
    endcase
  end
endmodule
