// tb_crossbar: random inputs and selects, including out-of-range selects that must give 0.
module tb_crossbar;
  localparam int N_IN = 3, N_OUT = 4, W = 16;
  logic [N_IN-1:0][W-1:0] din;
  logic [N_OUT-1:0][1:0]  sel;
  logic [N_OUT-1:0][W-1:0] dout;
  int unsigned checks = 0, failures = 0;

  crossbar #(.N_IN(N_IN), .N_OUT(N_OUT), .W(W)) dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < N_IN; i++) din[i] = W'($urandom);
      for (int o = 0; o < N_OUT; o++) sel[o] = 2'($urandom);
      #1;
      for (int o = 0; o < N_OUT; o++) begin
        logic [W-1:0] e;
        e = (sel[o] < N_IN) ? din[sel[o]] : '0;
        checks++;
        if (dout[o] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d sel %0d: %h exp %h", o, sel[o], dout[o], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
