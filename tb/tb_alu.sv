// tb_alu: random operands for every opcode, compared with an independent reference.
module tb_alu;
  import gpgpu_pkg::*;
  opcode_e op;
  logic [31:0] a, b, y, exp_y;
  logic [15:0] imm;
  logic [3:0] warp, lane;
  int unsigned checks = 0, failures = 0;

  alu #(.LANE_W(4)) dut (.*);

  function automatic logic [31:0] model(opcode_e o, logic [31:0] x, logic [31:0] z,
                                        logic [15:0] i, logic [3:0] w, logic [3:0] l);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    logic [63:0] prod = 64'(x) * 64'(z);
    case (o)
      OP_ADD:  return x + z;
      OP_SUB:  return x + ~z + 1;
      OP_AND:  return x & z;
      OP_OR:   return x | z;
      OP_XOR:  return x ^ z;
      OP_SHL:  return x << (z % 32);
      OP_SHR:  return x >> (z % 32);
      OP_MUL:  return prod[31:0];
      OP_ADDI: return x + {{16{i[15]}}, i};
      OP_TID:  return 32'(w) * 16 + 32'(l) + {{16{i[15]}}, i};
      OP_SLT:  return {31'd0, sx < sz};
      OP_BNZ:  return {31'd0, x != 0};
      default: return 32'd0;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      op = opcode_e'(n % 16);
      a = (n % 7 == 0) ? 32'd0 : $urandom;
      b = $urandom;
      imm = 16'($urandom);
      warp = 4'($urandom); lane = 4'($urandom);
      #1;
      exp_y = model(op, a, b, imm, warp, lane);
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h imm=%h y=%h exp=%h", op.name(), a, b, imm, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
