// l1_cache: L1 data cache between the interconnection network and external memory (DDR3).
//
// The paper shows an L1 cache in front of DDR3 but does not describe it. This one is the
// simplest usual choice: direct mapped, LINE_WORDS words per line, write-through with no
// allocation on a write miss. A read hit is acknowledged in the cycle of the request. A
// read miss fetches the whole line from memory one word at a time, then hits. A write is
// passed to memory and acknowledged when memory accepts it; on a hit the line is updated.
// Memory port: mem_req is held until mem_ack; for a read, mem_rdata is valid with mem_ack.
// Addresses are word addresses. Sizes are this design's own choice.
module l1_cache
  import gpgpu_pkg::*;
#(
  parameter int unsigned SETS       = 64,
  parameter int unsigned LINE_WORDS = 4,
  parameter int unsigned IDX_W      = $clog2(SETS),
  parameter int unsigned OFF_W      = $clog2(LINE_WORDS),
  parameter int unsigned TAG_W      = ADDR_W - IDX_W - OFF_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              c_req,
  input  logic              c_we,
  input  logic [ADDR_W-1:0] c_addr,
  input  logic [DATA_W-1:0] c_wdata,
  output logic              c_ack,
  output logic [DATA_W-1:0] c_rdata,
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic              mem_ack,
  input  logic [DATA_W-1:0] mem_rdata,
  output logic              hit_evt,    // a read hit was served this cycle
  output logic              miss_evt    // a read miss started a refill this cycle
);
  typedef enum logic [1:0] {C_IDLE, C_REFILL, C_WRITE} cstate_e;
  cstate_e state_q;

  logic [DATA_W-1:0] data_mem [SETS*LINE_WORDS];
  logic [TAG_W-1:0]  tag_mem  [SETS];
  logic [SETS-1:0]   valid_q;
  logic [OFF_W-1:0]  cnt_q;

  logic [TAG_W-1:0] tag;
  logic [IDX_W-1:0] idx;
  logic [OFF_W-1:0] off;
  logic             hit;

  assign tag = c_addr[ADDR_W-1 -: TAG_W];
  assign idx = c_addr[OFF_W +: IDX_W];
  assign off = c_addr[OFF_W-1:0];
  assign hit = valid_q[idx] && tag_mem[idx] == tag;

  assign c_rdata   = data_mem[{idx, off}];
  assign mem_req   = state_q != C_IDLE;
  assign mem_we    = state_q == C_WRITE;
  assign mem_addr  = (state_q == C_WRITE) ? c_addr : {tag, idx, cnt_q};
  assign mem_wdata = c_wdata;

  always_comb begin
    c_ack    = 1'b0;
    hit_evt  = 1'b0;
    miss_evt = 1'b0;
    unique case (state_q)
      C_IDLE: if (c_req && !c_we) begin
        c_ack    = hit;
        hit_evt  = hit;
        miss_evt = !hit;
      end
      C_WRITE: c_ack = mem_ack;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= C_IDLE;
      valid_q <= '0;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        C_IDLE: if (c_req) begin
          if (c_we) state_q <= C_WRITE;
          else if (!hit) begin
            state_q        <= C_REFILL;
            cnt_q          <= '0;
            valid_q[idx]   <= 1'b0;
          end
        end
        C_REFILL: if (mem_ack) begin
          cnt_q <= cnt_q + OFF_W'(1);
          if (cnt_q == OFF_W'(LINE_WORDS - 1)) begin
            state_q      <= C_IDLE;
            valid_q[idx] <= 1'b1;
          end
        end
        C_WRITE: if (mem_ack) state_q <= C_IDLE;
        default: state_q <= C_IDLE;
      endcase
    end
  end

  // Data and tag arrays (not reset).
  always_ff @(posedge clk) begin
    if (state_q == C_REFILL && mem_ack) begin
      data_mem[{idx, cnt_q}] <= mem_rdata;
      if (cnt_q == OFF_W'(LINE_WORDS - 1)) tag_mem[idx] <= tag;
    end
    if (state_q == C_WRITE && mem_ack && hit) data_mem[{idx, off}] <= c_wdata;
  end

  assert property (@(posedge clk) disable iff (!rst_n) state_q != C_IDLE |-> c_req);
endmodule
