// bank_arbiter: grants the single read port of each register bank to one operand request.
//
// Up to NREQ operand requests arrive per cycle for one half's four banks (the MUX row in front
// of the banks in the paper's operand collector figure): six in this design, the four reads
// of the collector's two stages plus two retried reads. Request 0 has the highest priority.
// A request is granted when no higher-priority request targets the same bank; every other
// request to that bank is a bank conflict and must retry. For each bank the arbiter also
// reports whether it is read and which request owns it, which drives the bank's row address.
// Fixed priority is this design's choice; the operand collector orders the requests oldest
// first so that the oldest instruction pair always makes progress.
module bank_arbiter #(
  parameter int unsigned NREQ   = 6,
  parameter int unsigned NBANK  = 4,
  parameter int unsigned BANK_W = $clog2(NBANK),
  parameter int unsigned REQ_W  = $clog2(NREQ)
) (
  input  logic [NREQ-1:0]              req,
  input  logic [NREQ-1:0][BANK_W-1:0]  bank,
  output logic [NREQ-1:0]              gnt,
  output logic [NBANK-1:0]             bank_used,
  output logic [NBANK-1:0][REQ_W-1:0]  bank_owner
);
  always_comb begin
    gnt        = '0;
    bank_used  = '0;
    bank_owner = '0;
    for (int r = 0; r < NREQ; r++) begin
      if (req[r] && !bank_used[bank[r]]) begin
        gnt[r]                = 1'b1;
        bank_used[bank[r]]    = 1'b1;
        bank_owner[bank[r]]   = REQ_W'(r);
      end
    end
  end
endmodule
