// operand_collector: control of the 4-stage operand collector proposed in the paper.
//
// Each half (even warps, odd warps) has four single-ported register banks. A bundle of up
// to two instructions of one warp enters stage 0, where the first operands (OP0) of both
// instructions are read; in stage 1 the second operands (OP1) are read; in stage 2 all
// operands are held and go to the execution units (the collector's stage 3 output). Because
// stage 0 of one bundle overlaps stage 1 of the previous one, up to six reads per half
// compete for the four banks every cycle, oldest first. A read whose bank is taken by an
// older request (bank conflict) is retried:
//  * stage 1 requests every operand of its pair that is still missing (an OP0 that lost its
//    bank in stage 0, and the OP1s); it moves to stage 2 once all are in, and a bubble
//    enters stage 2 while it waits;
//  * stage 0 requests its OP0s and moves to stage 1 whenever stage 1 is free, with or
//    without them; a new pair enters whenever stage 0 is free.
// Without conflicts a bundle is accepted every cycle and its operands are ready two cycles
// later, as in the paper's 4-stage figure. Since stage 0 never waits for its own reads, adv0
// equals adv1; both are kept because the stream processors use them for different registers.
//
// This design's own choices, as the paper does not say how conflicts are resolved: the
// retry of missing operands in stage 1 (with it, 8192 random pairs take about 13,700 cycles,
// near the paper's 13,141; without it, about 17,500); request priority oldest first (stage 1
// before stage 0, slot 0 before slot 1, OP0 before OP1); reads that an instruction does not
// need are not made; a read of a register by both instructions is two reads; the two halves
// move together so that the unit assignment made at issue (three ALUs shared by both
// halves) still holds in stage 2.
// This module holds only the control; the operand values sit in each stream processor,
// which latches bank data on slot_gnt and shifts on adv0/adv1. Request slots of a half:
// 2s = stage-1 slot s OP0, 2s+1 = stage-1 slot s OP1, 4+s = stage-0 slot s OP0.
module operand_collector
  import gpgpu_pkg::*;
(
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  bundle_t [1:0]                         in_bundle,
  output logic                                  accept,     // in_bundle taken this cycle
  output logic                                  adv0,       // stage 0 moves to stage 1
  output logic                                  adv1,       // stage 1 moves to stage 2
  output logic [1:0][NUM_REQ-1:0]               slot_gnt,
  output logic [1:0][NUM_REQ-1:0][BANK_W-1:0]   slot_bank,
  output logic [1:0][NUM_BANKS-1:0][ROW_W-1:0]  bank_row,
  output bundle_t [1:0]                         s2_bundle,  // operands complete
  output logic                                  conflict    // a read was refused
);
  bundle_t [1:0]      s0_q, s1_q, s2_q;
  // [half][slot] operand already collected: stage-0 OP0, stage-1 OP0, stage-1 OP1
  logic [1:0][1:0]    s0_h0_q, s1_h0_q, s1_h1_q;

  localparam int unsigned REQ_W = $clog2(NUM_REQ);

  logic [1:0][NUM_REQ-1:0]              req;
  logic [1:0][NUM_REQ-1:0][ROW_W-1:0]   row;
  logic [1:0][NUM_BANKS-1:0]            bank_used;
  logic [1:0][NUM_BANKS-1:0][REQ_W-1:0] bank_owner;

  always_comb begin
    for (int h = 0; h < 2; h++) begin
      for (int s = 0; s < 2; s++) begin
        automatic inst_t i1  = s1_q[h].slot[s].inst;
        automatic inst_t i0  = s0_q[h].slot[s].inst;
        automatic logic  v1  = s1_q[h].valid && s1_q[h].slot[s].valid;
        automatic logic  v0  = s0_q[h].valid && s0_q[h].slot[s].valid;
        req[h][2*s]         = v1 && uses_ra(i1.op) && !s1_h0_q[h][s];
        slot_bank[h][2*s]   = bank_of(i1.ra);
        row[h][2*s]         = row_of(s1_q[h].warp, i1.ra);
        req[h][2*s+1]       = v1 && uses_rb(i1.op) && !s1_h1_q[h][s];
        slot_bank[h][2*s+1] = bank_of(i1.rb);
        row[h][2*s+1]       = row_of(s1_q[h].warp, i1.rb);
        req[h][4+s]         = v0 && uses_ra(i0.op) && !s0_h0_q[h][s];
        slot_bank[h][4+s]   = bank_of(i0.ra);
        row[h][4+s]         = row_of(s0_q[h].warp, i0.ra);
      end
    end
  end

  for (genvar h = 0; h < 2; h++) begin : g_arb
    bank_arbiter #(.NREQ(NUM_REQ), .NBANK(NUM_BANKS)) u_arb (
      .req        (req[h]),
      .bank       (slot_bank[h]),
      .gnt        (slot_gnt[h]),
      .bank_used  (bank_used[h]),
      .bank_owner (bank_owner[h])
    );
    always_comb
      for (int b = 0; b < int'(NUM_BANKS); b++) bank_row[h][b] = row[h][bank_owner[h][b]];
  end

  // Stage 1 moves on when both halves have all their operands; stage 0 moves on whenever
  // stage 1 is free (it is, or it empties this cycle). A new pair enters a free stage 0.
  logic s1_ok, s0_any;
  assign s1_ok  = !(|(req[0][3:0] & ~slot_gnt[0][3:0]) || |(req[1][3:0] & ~slot_gnt[1][3:0]));
  assign s0_any = s0_q[0].valid || s0_q[1].valid;
  assign adv1   = s1_ok;
  assign adv0   = s1_ok;
  assign accept = adv0 || !s0_any;

  assign conflict  = |(req & ~slot_gnt);
  assign s2_bundle = s2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_q    <= '0;
      s1_q    <= '0;
      s2_q    <= '0;
      s0_h0_q <= '0;
      s1_h0_q <= '0;
      s1_h1_q <= '0;
    end else begin
      // stage 2
      if (adv1) s2_q <= s1_q;
      else for (int h = 0; h < 2; h++) s2_q[h].valid <= 1'b0;
      // stage 1
      if (adv0) begin
        s1_q <= s0_q;
        for (int h = 0; h < 2; h++)
          for (int s = 0; s < 2; s++) s1_h0_q[h][s] <= s0_h0_q[h][s] | slot_gnt[h][4+s];
        s1_h1_q <= '0;
      end else begin
        for (int h = 0; h < 2; h++)
          for (int s = 0; s < 2; s++) begin
            s1_h0_q[h][s] <= s1_h0_q[h][s] | slot_gnt[h][2*s];
            s1_h1_q[h][s] <= s1_h1_q[h][s] | slot_gnt[h][2*s+1];
          end
      end
      // stage 0
      if (accept) begin
        s0_q    <= in_bundle;
        s0_h0_q <= '0;
      end else begin
        for (int h = 0; h < 2; h++)
          for (int s = 0; s < 2; s++) s0_h0_q[h][s] <= s0_h0_q[h][s] | slot_gnt[h][4+s];
      end
    end
  end

  // A stalled stage never loses its pair.
  assert property (@(posedge clk) disable iff (!rst_n) s0_any && !adv0 |-> !accept);
endmodule
