// stream_processor: datapath of one SIMT thread lane (one SP).
//
// As drawn in the paper, an SP holds two register files of four banks each (one for the
// even warps, one for the odd warps), a crossbar behind each register file, operand
// collector registers, a crossbar to the execution units, three ALUs and a LD/ST unit. All
// SPs receive the same control word from the SP control unit and so execute the same
// instructions on their own registers; only the lane number differs.
//  * Collection: every cycle each bank is read at the row the control word names; the first
//    crossbar routes each bank's data to the request slot that owns it, which latches it when
//    granted. Stage 0 collects OP0s; stage 1 collects OP1s and any OP0 that stage 0 could not
//    read. On adv0, OP0 values move from stage 0 to stage 1; on adv1 all operands of stage 1
//    move to stage 2.
//  * Execution (stage 2): the second crossbar feeds the three ALUs and the LD/ST unit from the
//    four collected instructions (two per half).
//  * Write back: the third crossbar routes ALU results to each half's two write ports at the
//    end of stage 2; load data use a third write port when the LD/ST instruction completes.
// The paper's figure also shows an SFU and, in one figure, a unit labelled DBL; their
// functions are not given and they are not built.
module stream_processor
  import gpgpu_pkg::*;
#(
  parameter int unsigned LANE = 0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  sp_ctrl_t                     ctrl,
  output logic [NUM_ALU-1:0][DATA_W-1:0] alu_res,
  output logic                         ldst_done,
  // LD/ST lane to the interconnection network
  output logic                         mreq,
  output logic                         mreq_we,
  output logic [ADDR_W-1:0]            mreq_addr,
  output logic [DATA_W-1:0]            mreq_wdata,
  input  logic                         mack,
  input  logic [DATA_W-1:0]            mack_rdata
);
  localparam int unsigned LANE_W = $clog2(NUM_SP);

  logic [1:0][NUM_BANKS-1:0][DATA_W-1:0] bank_rdata;
  logic [1:0][NUM_REQ-1:0][DATA_W-1:0]   slot_data;
  logic [DATA_W-1:0]                     ldata;

  // operand collector registers, [half][slot]
  logic [1:0][1:0][DATA_W-1:0] s0_op0_q, s1_op0_q, s1_op1_q, s2_op0_q, s2_op1_q;
  logic [1:0][1:0][DATA_W-1:0] s0_op0_n, s1_op0_n, s1_op1_n;

  // ---------------- register banks and first crossbar ----------------
  for (genvar h = 0; h < 2; h++) begin : g_half
    logic [1:0][DATA_W-1:0]           wb_slot;   // ALU result for each write slot

    crossbar #(.N_IN(NUM_ALU), .N_OUT(2), .W(DATA_W)) u_xbar_wb (
      .din (alu_res),
      .sel (ctrl.wb_alu[h]),
      .dout(wb_slot)
    );

    for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
      logic [2:0]                 we;
      logic [2:0][ROW_W-1:0]      waddr;
      logic [2:0][DATA_W-1:0]     wdata;
      always_comb begin
        for (int s = 0; s < 2; s++) begin
          we[s]    = ctrl.wb_en[h][s] && ctrl.wb_bank[h][s] == BANK_W'(b);
          waddr[s] = ctrl.wb_row[h][s];
          wdata[s] = wb_slot[s];
        end
        we[2]    = ctrl.ld_wb_en && ctrl.ld_wb_half == h[0] && ctrl.ld_wb_bank == BANK_W'(b);
        waddr[2] = ctrl.ld_wb_row;
        wdata[2] = ldata;
      end
      register_bank #(.DEPTH(BANK_DEPTH), .W(DATA_W), .NWP(3)) u_bank (
        .clk   (clk),
        .raddr (ctrl.bank_row[h][b]),
        .rdata (bank_rdata[h][b]),
        .we    (we),
        .waddr (waddr),
        .wdata (wdata)
      );
    end
    crossbar #(.N_IN(NUM_BANKS), .N_OUT(NUM_REQ), .W(DATA_W)) u_xbar_rd (
      .din (bank_rdata[h]),
      .sel (ctrl.slot_bank[h]),
      .dout(slot_data[h])
    );
  end

  // ---------------- operand collector registers ----------------
  // Request slot 2s / 2s+1 is stage 1's OP0 / OP1 of slot s, 4+s is stage 0's OP0 of slot s.
  always_comb begin
    for (int h = 0; h < 2; h++)
      for (int s = 0; s < 2; s++) begin
        s1_op0_n[h][s] = ctrl.slot_gnt[h][2*s]   ? slot_data[h][2*s]   : s1_op0_q[h][s];
        s1_op1_n[h][s] = ctrl.slot_gnt[h][2*s+1] ? slot_data[h][2*s+1] : s1_op1_q[h][s];
        s0_op0_n[h][s] = ctrl.slot_gnt[h][4+s]   ? slot_data[h][4+s]   : s0_op0_q[h][s];
      end
  end

  always_ff @(posedge clk) begin
    if (ctrl.adv1) begin
      s2_op0_q <= s1_op0_n;
      s2_op1_q <= s1_op1_n;
    end
    if (ctrl.adv0) begin
      s1_op0_q <= s0_op0_n;
      s1_op1_q <= '0;
      s0_op0_q <= '0;
    end else begin
      s1_op0_q <= s1_op0_n;
      s1_op1_q <= s1_op1_n;
      s0_op0_q <= s0_op0_n;
    end
  end

  // ---------------- second crossbar, ALUs, LD/ST ----------------
  logic [3:0][2*DATA_W-1:0]           coll;     // {OP1, OP0} of {half, slot}
  logic [NUM_ALU:0][2*DATA_W-1:0]     unit_in;  // ALU0..2, LD/ST
  logic [NUM_ALU:0][1:0]              unit_sel;

  always_comb begin
    for (int h = 0; h < 2; h++)
      for (int s = 0; s < 2; s++) coll[h*2+s] = {s2_op1_q[h][s], s2_op0_q[h][s]};
    for (int k = 0; k < int'(NUM_ALU); k++) unit_sel[k] = ctrl.alu_src[k];
    unit_sel[NUM_ALU] = ctrl.ldst_src;
  end

  crossbar #(.N_IN(4), .N_OUT(NUM_ALU + 1), .W(2 * DATA_W)) u_xbar_ex (
    .din (coll),
    .sel (unit_sel),
    .dout(unit_in)
  );

  for (genvar k = 0; k < NUM_ALU; k++) begin : g_alu
    alu #(.LANE_W(LANE_W)) u_alu (
      .op   (ctrl.alu_op[k]),
      .a    (unit_in[k][DATA_W-1:0]),
      .b    (unit_in[k][2*DATA_W-1:DATA_W]),
      .imm  (ctrl.alu_imm[k]),
      .warp (ctrl.alu_warp[k]),
      .lane (LANE_W'(LANE)),
      .y    (alu_res[k])
    );
  end

  ldst_lane u_ldst (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (ctrl.ldst_start),
    .store     (ctrl.ldst_store),
    .addr      (unit_in[NUM_ALU][DATA_W-1:0] + ADDR_W'(signed'(ctrl.ldst_imm))),
    .wdata     (unit_in[NUM_ALU][2*DATA_W-1:DATA_W]),
    .finish    (ctrl.ldst_finish),
    .done      (ldst_done),
    .ldata     (ldata),
    .req       (mreq),
    .req_we    (mreq_we),
    .req_addr  (mreq_addr),
    .req_wdata (mreq_wdata),
    .ack       (mack),
    .ack_rdata (mack_rdata)
  );
endmodule
