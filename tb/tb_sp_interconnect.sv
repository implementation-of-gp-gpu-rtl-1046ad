// tb_sp_interconnect: 16 requesters issue random reads and writes; a responder with random
// latency answers reads with a function of the address. Every request must be served once
// with the right data, writes must arrive with their data, and the round-robin grant must
// serve all 16 waiting lanes within 16 grants.
module tb_sp_interconnect;
  import gpgpu_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, req_we = '0, ack;
  logic [N-1:0][31:0] req_addr = '0, req_wdata = '0;
  logic [31:0] ack_rdata, c_addr, c_wdata, c_rdata;
  logic c_req, c_we, c_ack;
  int unsigned checks = 0, failures = 0, served = 0, wait_cnt [N];
  int unsigned max_wait = 0;
  int unsigned lat = 0, lat_target = 0;

  sp_interconnect #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] f(logic [31:0] a);
    return a * 32'h9E3779B1 + 32'h1234;
  endfunction

  // responder
  assign c_rdata = f(c_addr);
  assign c_ack = c_req && lat == lat_target;
  always_ff @(posedge clk) begin
    if (c_req && !c_ack) lat <= lat + 1;
    if (c_ack) begin lat <= 0; lat_target <= $urandom % 4; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // requesters
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (req[i]) begin
        if (wait_cnt[i] > max_wait) max_wait = wait_cnt[i];
      end else if ($urandom % 3 == 0) begin
        req[i] = 1; req_we[i] = 1'($urandom); req_addr[i] = $urandom; req_wdata[i] = $urandom;
        wait_cnt[i] = 0;
      end
    end
  end
  logic [N-1:0] ack_s;
  always @(posedge clk) if (rst_n) begin
    ack_s = ack;
    if (c_ack) begin
      check($onehot(ack), "one lane acknowledged");
      for (int i = 0; i < N; i++) if (ack[i]) begin
        check(req[i], "acknowledged lane was requesting");
        check(c_addr == req_addr[i] && c_we == req_we[i], "address and direction routed");
        if (req_we[i]) check(c_wdata == req_wdata[i], "write data routed");
        else check(ack_rdata == f(req_addr[i]), "read data returned");
        served++;
      end
    end else check(ack == '0, "no acknowledge without cache acknowledge");
    #1;
    for (int i = 0; i < N; i++) begin
      if (ack_s[i]) req[i] = 0;
      else if (req[i] && |ack_s) wait_cnt[i]++;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) wait_cnt[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (4000) @(negedge clk);
    check(served > 500, $sformatf("served only %0d", served));
    check(max_wait <= N - 1, $sformatf("a lane waited %0d grants", max_wait));
    $display("served=%0d max_wait_grants=%0d", served, max_wait);
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
