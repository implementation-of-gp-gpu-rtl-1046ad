// crossbar: N_IN x N_OUT word crossbar. Each output takes the input named by its own select;
// a select beyond the last input gives zero. Purely combinational.
//
// The stream processor uses it three times, as drawn in the SP of the paper's block
// diagram: between the register banks and the operand collector slots (one MUX per slot),
// between the collected operands and the execution units, and from the ALU results back to
// the register write ports. The select encoding is this design's own.
module crossbar #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 4,
  parameter int unsigned W     = 32,
  parameter int unsigned SEL_W = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic [N_IN-1:0][W-1:0]      din,
  input  logic [N_OUT-1:0][SEL_W-1:0] sel,
  output logic [N_OUT-1:0][W-1:0]     dout
);
  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      dout[o] = '0;
      for (int i = 0; i < N_IN; i++)
        if (sel[o] == SEL_W'(i)) dout[o] = din[i];
    end
  end
endmodule
