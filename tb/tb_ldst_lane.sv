// tb_ldst_lane: random loads and stores through one LD/ST lane with a responder that
// acknowledges after a random delay; checks the request fields, the load data, the
// done/finish handshake and that req rises exactly one cycle after start.
module tb_ldst_lane;
  import gpgpu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, store = 0, finish = 0, done, req, req_we, ack = 0;
  logic [31:0] addr = '0, wdata = '0, ldata, req_addr, req_wdata, ack_rdata = '0;
  int unsigned checks = 0, failures = 0;

  ldst_lane dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [31:0] a, d, r;
      bit st;
      int dly;
      a = $urandom; d = $urandom; r = $urandom; st = 1'($urandom); dly = $urandom % 5;
      @(negedge clk);
      check(!req && !done, "idle before start");
      start = 1; store = st; addr = a; wdata = d;
      @(negedge clk);
      start = 0; addr = '0; wdata = '0;
      check(req && req_we == st && req_addr == a && (st ? req_wdata == d : 1'b1), "request fields");
      repeat (dly) begin @(negedge clk); check(req && !done, "request held"); end
      ack = 1; ack_rdata = r;
      @(negedge clk);
      ack = 0;
      check(done && !req, "done after ack");
      if (!st) check(ldata == r, "load data");
      repeat (2) @(negedge clk);
      check(done, "done held until finish");
      finish = 1;
      @(negedge clk);
      finish = 0;
      check(!done, "released by finish");
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
