// tb_pc_cmp_stage: self-checking test of the comparator stage. Operands
// are applied every cycle; gt (combinational from the stage registers) is
// compared one cycle later with C > D, and hold with the inequality of the
// top P bits. Runs at P = 1, the single XNOR-gate enable, where the hold
// rate on random operands must be near 50%.
module tb_pc_cmp_stage;
  localparam int unsigned N = 8, P = 1, LAT = 1, CYC = 4000;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] c = '0, d = '0;
  logic gt, hold;
  int checks = 0, failures = 0, holds = 0;
  bit exp_q [CYC];

  pc_cmp_stage #(.N(N), .P(P)) dut (.*);

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
        checks++;
        if (gt !== exp_q[t-LAT]) failures++;
      end
      c = N'($urandom);
      d = N'($urandom);
      exp_q[t] = c > d;
      #1;
      checks++;
      if (hold !== (c[N-1] != d[N-1])) failures++;
      if (hold) holds++;
    end
    checks++;
    if (real'(holds) / CYC < 0.47 || real'(holds) / CYC > 0.53) failures++;
    $display("hold rate %f", real'(holds) / CYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
