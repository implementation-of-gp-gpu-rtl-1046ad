// tb_icache: loads random words, then reads them back on all four ports at once.
module tb_icache;
  localparam int DEPTH = 256;
  logic clk = 0, we = 0;
  logic [7:0] waddr = '0;
  logic [31:0] wdata = '0;
  logic [3:0][7:0] raddr = '0;
  logic [3:0][31:0] rdata;
  logic [31:0] ref_mem [DEPTH];
  int unsigned checks = 0, failures = 0;

  icache #(.DEPTH(DEPTH), .NRP(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = $urandom; ref_mem[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 1000; n++) begin
      for (int p = 0; p < 4; p++) raddr[p] = 8'($urandom);
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rdata[p] !== ref_mem[raddr[p]]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d addr %0d", p, raddr[p]);
        end
      end
      @(negedge clk);
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
