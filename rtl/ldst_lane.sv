// ldst_lane: the LD/ST unit of one stream processor.
//
// When the control unit starts a LD/ST instruction, every lane latches its own address
// (OP0 + immediate, a word address) and, for a store, its store data (OP1), and requests
// the interconnection network. It holds the request until the network acknowledges it,
// keeps the returned load data, and reports done. The control unit waits for all lanes to be
// done, writes the load data to the register file and releases the lanes with finish.
// The paper names the LD/ST unit only; the request/acknowledge protocol is this design's.
// Timing: req rises the cycle after start; done rises the cycle after ack; finish returns
// the lane to idle in the cycle it is high.
module ldst_lane
  import gpgpu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              store,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              finish,
  output logic              done,
  output logic [DATA_W-1:0] ldata,
  // to the interconnection network
  output logic              req,
  output logic              req_we,
  output logic [ADDR_W-1:0] req_addr,
  output logic [DATA_W-1:0] req_wdata,
  input  logic              ack,
  input  logic [DATA_W-1:0] ack_rdata
);
  typedef enum logic [1:0] {L_IDLE, L_REQ, L_DONE} lstate_e;
  lstate_e state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= L_IDLE;
      req_we    <= 1'b0;
      req_addr  <= '0;
      req_wdata <= '0;
      ldata     <= '0;
    end else begin
      unique case (state_q)
        L_IDLE: if (start) begin
          state_q   <= L_REQ;
          req_we    <= store;
          req_addr  <= addr;
          req_wdata <= wdata;
        end
        L_REQ: if (ack) begin
          state_q <= L_DONE;
          if (!req_we) ldata <= ack_rdata;
        end
        L_DONE: if (finish) state_q <= L_IDLE;
        default: state_q <= L_IDLE;
      endcase
    end
  end

  assign req  = state_q == L_REQ;
  assign done = state_q == L_DONE;

  assert property (@(posedge clk) disable iff (!rst_n) ack |-> req);
endmodule
