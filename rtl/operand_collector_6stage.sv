// operand_collector_6stage: control of the 6-stage operand collector, the paper's baseline.
//
// The paper compares its 4-stage collector with a 6-stage one built on the same four
// single-ported register banks. This module is that baseline, for one half (one register
// file), so the two can be measured on the same instruction stream. The core itself uses
// the 4-stage operand_collector.
// How it works: a pair of instructions walks through read stages 0..3, and each stage reads
// one operand: stage 0 reads INST0 OP0, stage 1 INST0 OP1, stage 2 INST1 OP0 and stage 3
// INST1 OP1. Stage 4 holds all four operands, and the pair leaves at stage 5 (out_bundle).
// Four pairs are in the read stages at once, so up to four reads compete for the four banks
// every cycle. A read that loses its bank (bank conflict) stalls its stage and every younger
// stage; older stages move on and a bubble opens behind them. A stage that has its operand but
// is held by a stall keeps it and does not read again.
// Interface and timing: in_bundle is taken at the clock edge when accept is high. Without
// conflicts a pair is accepted every cycle and appears in out_bundle four cycles later,
// two cycles later than in the 4-stage collector. gnt/bank/bank_row name the reads made
// in the cycle.
// From the paper: one operand read per stage, the stage order and the depth. This design's
// own choices: oldest-first priority (stage 3 first), the in-order stall, and not reading
// operands that an instruction does not use.
module operand_collector_6stage
  import gpgpu_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst_n,
  input  bundle_t                            in_bundle,
  output logic                               accept,
  output logic [3:0]                         gnt,        // read of stage k granted
  output logic [3:0][BANK_W-1:0]             bank,       // bank stage k reads
  output logic [NUM_BANKS-1:0][ROW_W-1:0]    bank_row,   // row read in each bank
  output bundle_t                            out_bundle, // pairs with all operands
  output logic                               conflict    // a read was refused
);
  bundle_t [4:0]           st_q;      // read stages 0..3 and stage 4 (all operands held)
  logic [3:0]              have_q;    // stage k already read its operand but could not move
  logic [3:0]              req;
  logic [3:0][ROW_W-1:0]   row;
  logic [3:0]              move;      // stage k moves to stage k+1
  logic [NUM_BANKS-1:0]    bank_used;
  logic [NUM_BANKS-1:0][1:0] bank_owner;

  // Stage k reads operand k of its pair: k[1] picks the instruction, k[0] picks OP0/OP1.
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      automatic slot_t      sl = st_q[k].slot[k / 2];
      automatic logic [3:0] r  = (k % 2 == 0) ? sl.inst.ra : sl.inst.rb;
      automatic logic       use_it = (k % 2 == 0) ? uses_ra(sl.inst.op) : uses_rb(sl.inst.op);
      req[k]  = st_q[k].valid && sl.valid && use_it && !have_q[k];
      bank[k] = bank_of(r);
      row[k]  = row_of(st_q[k].warp, r);
    end
  end

  // Oldest first: arbiter request 0 is stage 3.
  logic [3:0] req_r, gnt_r;
  logic [3:0][BANK_W-1:0] bank_r;
  always_comb
    for (int k = 0; k < 4; k++) begin
      req_r[k]  = req[3-k];
      bank_r[k] = bank[3-k];
      gnt[k]    = gnt_r[3-k];
    end

  bank_arbiter #(.NREQ(4), .NBANK(NUM_BANKS)) u_arb (
    .req        (req_r),
    .bank       (bank_r),
    .gnt        (gnt_r),
    .bank_used  (bank_used),
    .bank_owner (bank_owner)
  );

  always_comb
    for (int b = 0; b < int'(NUM_BANKS); b++) bank_row[b] = row[3 - int'(bank_owner[b])];

  // In-order stall: stage k moves when its read is done and stage k+1 moves or is empty.
  always_comb begin
    automatic logic next_free = 1'b1;   // stage 4 always drains
    for (int k = 3; k >= 0; k--) begin
      move[k]   = (!req[k] || gnt[k]) && next_free;
      next_free = move[k] || !st_q[k].valid;
    end
    accept = next_free;
  end

  assign conflict   = |(req & ~gnt);
  assign out_bundle = st_q[4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= '0;
      have_q <= '0;
    end else begin
      for (int k = 0; k < 4; k++) have_q[k] <= !move[k] && (have_q[k] || gnt[k]);
      st_q[4] <= move[3] ? st_q[3] : '0;
      for (int k = 3; k >= 1; k--) begin
        if (move[k-1]) st_q[k] <= st_q[k-1];
        else if (move[k]) st_q[k] <= '0;
      end
      if (accept) st_q[0] <= in_bundle;
      else if (move[0]) st_q[0] <= '0;
    end
  end

  // A stage that does not move keeps its pair.
  assert property (@(posedge clk) disable iff (!rst_n) st_q[0].valid && !move[0] |-> !accept);
endmodule
