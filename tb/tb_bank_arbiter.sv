// tb_bank_arbiter: exhaustive over requests and bank targets. A request must be granted
// exactly when no lower-numbered request targets the same bank, and each bank's owner must
// be its granted request.
module tb_bank_arbiter;
  logic [3:0] req, gnt, bank_used;
  logic [3:0][1:0] bank, bank_owner;
  int unsigned checks = 0, failures = 0;

  bank_arbiter #(.NREQ(4), .NBANK(4)) dut (.*);

  initial begin
    for (int n = 0; n < 4096; n++) begin
      req = 4'(n >> 8);
      for (int r = 0; r < 4; r++) bank[r] = 2'(n >> (2 * r));
      #1;
      for (int r = 0; r < 4; r++) begin
        bit blocked;
        blocked = 0;
        for (int j = 0; j < r; j++) if (req[j] && bank[j] == bank[r]) blocked = 1;
        checks++;
        if (gnt[r] !== (req[r] && !blocked)) begin
          failures++;
          if (failures < 10) $display("FAIL req=%b bank=%h gnt=%b", req, bank, gnt);
        end
      end
      for (int b = 0; b < 4; b++) begin
        bit used; int owner;
        used = 0; owner = 0;
        for (int r = 3; r >= 0; r--) if (req[r] && bank[r] == 2'(b)) begin used = 1; owner = r; end
        checks++;
        if (bank_used[b] !== used || (used && bank_owner[b] != 2'(owner))) begin
          failures++;
          if (failures < 10) $display("FAIL bank %0d used=%b owner=%0d", b, bank_used[b], bank_owner[b]);
        end
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
