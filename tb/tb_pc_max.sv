// tb_pc_max: self-checking test of the precomputed MAX(K, L). Random
// operands, some with equal top bits and some fully equal, are applied every
// cycle; F is compared two cycles later with the larger operand computed
// here. Cycles with and without comparator precomputation are counted and
// both must occur.
module tb_pc_max;
  localparam int unsigned N = 16, P = 4, LAT = 2, CYC = 4000;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] k = '0, l = '0;
  logic [N-1:0] f;
  logic hold;
  int checks = 0, failures = 0, holds = 0, loads = 0;
  logic [N-1:0] exp_q [CYC];

  pc_max #(.N(N), .P(P)) dut (.*);

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
        if (f !== exp_q[t-LAT]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: F=%h expected %h", t, f, exp_q[t-LAT]);
        end
      end
      k = N'($urandom);
      l = N'($urandom);
      if (t % 3 == 2) l[N-1 -: P] = k[N-1 -: P];
      if (t % 17 == 5) l = k;
      exp_q[t] = (k > l) ? k : l;
      #1;
      checks++;
      if (hold !== (k[N-1 -: P] != l[N-1 -: P])) failures++;
      if (hold) holds++; else loads++;
    end
    checks++;
    if (holds == 0 || loads == 0) failures++;
    $display("hold cycles %0d, load cycles %0d", holds, loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
