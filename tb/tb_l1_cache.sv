// tb_l1_cache: random reads and writes over a range larger than the cache, against a
// reference memory. Checks read data, that writes reach memory, that a read hit is
// acknowledged in the cycle of the request, and that a miss refills a whole line.
module tb_l1_cache;
  import gpgpu_pkg::*;
  localparam int SETS = 8, LINE = 4, RANGE = 256;
  logic clk = 0, rst_n = 0;
  logic c_req = 0, c_we = 0, c_ack, mem_req, mem_we, mem_ack, hit_evt, miss_evt;
  logic [31:0] c_addr = '0, c_wdata = '0, c_rdata, mem_addr, mem_wdata, mem_rdata;
  logic [31:0] mem [RANGE];
  logic [31:0] ref_mem [RANGE];
  int unsigned checks = 0, failures = 0, hits = 0, misses = 0, mem_reads = 0, lat = 0;

  l1_cache #(.SETS(SETS), .LINE_WORDS(LINE)) dut (.*);
  always #5 clk = ~clk;

  assign mem_ack   = mem_req && lat == 2;
  assign mem_rdata = mem[mem_addr[7:0]];
  always_ff @(posedge clk) begin
    lat <= (mem_req && !mem_ack) ? lat + 1 : 0;
    if (mem_ack && mem_we) mem[mem_addr[7:0]] <= mem_wdata;
    if (mem_ack && !mem_we) mem_reads <= mem_reads + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < RANGE; i++) begin mem[i] = $urandom; ref_mem[i] = mem[i]; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int cyc;
      int unsigned reads_before;
      @(negedge clk);
      c_req = 1; c_we = ($urandom % 4 == 0); c_addr = $urandom % RANGE; c_wdata = $urandom;
      reads_before = mem_reads;
      cyc = 0;
      #1;
      if (!c_we && c_ack) hits++;
      if (!c_we) check(c_ack == hit_evt && miss_evt == !c_ack, "hit/miss event");
      while (!c_ack) begin @(negedge clk); #1; cyc++; end
      if (!c_we) begin
        check(c_rdata == ref_mem[c_addr], $sformatf("read %0d: %h exp %h", c_addr, c_rdata, ref_mem[c_addr]));
        if (cyc > 0) begin
          misses++;
          check(mem_reads - reads_before == LINE, "miss refills one line");
        end
      end else ref_mem[c_addr] = c_wdata;
      @(negedge clk);
      c_req = 0;
      #1;
      if (c_we) check(mem[c_addr] == c_wdata, "write-through reached memory");
    end
    check(hits > 100 && misses > 100, $sformatf("hits=%0d misses=%0d", hits, misses));
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
