// tb_table82_parity: the parity function, the document's example of a
// circuit that predictor-based precomputation cannot help. An 8-input parity
// is placed in the second architecture with 1, 2 and 3 predictor inputs:
// universal quantification leaves g1 = g2 = 0 for every subset smaller than
// all inputs, so the registers must never be disabled, and the output must
// still be right. The same function in the Shannon-expansion architecture
// does switch off one cofactor block every cycle.
module tb_table82_parity;
  import pc_pkg::*;
  localparam int unsigned N = 8, LAT = 2, CYC = 2000;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] x = '0;
  logic [3:1] f, hold;
  logic sh_f;
  int checks = 0, failures = 0, holds = 0;
  bit exp_q [CYC];

  for (genvar k = 1; k <= 3; k++) begin : g_k
    pc_arch2 #(.N(N), .K(k), .TT(parity_tt(N))) u (.clk, .rst_n, .x, .f(f[k]), .hold(hold[k]));
  end
  pc_shannon #(.N(N), .TT(parity_tt(N))) u_sh (.clk, .rst_n, .x, .f(sh_f));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < CYC; t++) begin
      @(negedge clk);
      if (t >= LAT) begin
        for (int k = 1; k <= 3; k++) begin
          checks++;
          if (f[k] !== exp_q[t-LAT]) failures++;
        end
        checks++;
        if (sh_f !== exp_q[t-LAT]) failures++;
      end
      x = N'($urandom);
      exp_q[t] = ^x;
      #1;
      if (hold != '0) holds++;
    end
    checks++;
    if (holds != 0) failures++;
    $display("parity: predictor fired in %0d of %0d cycles", holds, CYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
