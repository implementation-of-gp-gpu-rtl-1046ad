// tb_register_bank: random writes on three ports (with same-row collisions, where the
// highest port must win) and reads, against a reference array.
module tb_register_bank;
  localparam int DEPTH = 32, W = 32, NWP = 3;
  logic clk = 0;
  logic [4:0] raddr;
  logic [W-1:0] rdata;
  logic [NWP-1:0] we;
  logic [NWP-1:0][4:0] waddr;
  logic [NWP-1:0][W-1:0] wdata;
  logic [W-1:0] ref_mem [DEPTH];
  int unsigned checks = 0, failures = 0;

  register_bank #(.DEPTH(DEPTH), .W(W), .NWP(NWP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    we = '0; raddr = '0; waddr = '0; wdata = '0;
    // fill every row through port 0
    for (int r = 0; r < DEPTH; r++) begin
      @(negedge clk);
      we = 3'b001; waddr[0] = 5'(r); wdata[0] = $urandom; ref_mem[r] = wdata[0];
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 3'($urandom);
      for (int p = 0; p < NWP; p++) begin
        waddr[p] = ($urandom % 4 == 0) ? 5'd7 : 5'($urandom);
        wdata[p] = $urandom;
      end
      raddr = 5'($urandom);
      #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL row %0d: %h exp %h", raddr, rdata, ref_mem[raddr]);
      end
      for (int p = 0; p < NWP; p++) if (we[p]) ref_mem[waddr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
