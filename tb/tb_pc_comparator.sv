// tb_pc_comparator: self-checking test of the precomputed comparator.
// Random operands enter every cycle; f is compared two cycles later with
// C > D computed here. The fraction of cycles in which the low-order
// registers hold is compared with 1 - 2^-P, the probability that the top P
// bit pairs differ for uniform random operands. Directed pairs with equal top
// bits and differences only in the low bits are mixed in so that the loaded
// path is exercised too.
module tb_pc_comparator;
  localparam int unsigned N = 16, P = 4, LAT = 2, CYC = 4000;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] c = '0, d = '0;
  logic f, hold;
  int checks = 0, failures = 0, holds = 0, rnd = 0, rnd_holds = 0;
  bit exp_q [CYC];

  pc_comparator #(.N(N), .P(P)) dut (.*);

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
          if (failures < 10) $display("cycle %0d: f=%0b expected %0b", t, f, exp_q[t-LAT]);
        end
      end
      c = N'($urandom);
      d = N'($urandom);
      if (t % 4 == 3) begin
        d[N-1 -: P] = c[N-1 -: P];           // force the low bits to decide
        if (t % 8 == 7) d = c;               // and equality
      end else begin
        rnd++;
      end
      exp_q[t] = c > d;
      #1;
      if (hold) holds++;
      if (hold && t % 4 != 3) rnd_holds++;
      if (hold !== (c[N-1 -: P] != d[N-1 -: P])) failures++;
      checks++;
    end
    // precomputation rate on the random cycles: 1 - 2^-P
    checks++;
    if (real'(rnd_holds) / rnd < (1.0 - 1.0 / (1 << P)) - 0.03 ||
        real'(rnd_holds) / rnd > (1.0 - 1.0 / (1 << P)) + 0.03) begin
      failures++;
      $display("hold rate %f", real'(rnd_holds) / rnd);
    end
    checks++;
    if (holds == 0 || holds == CYC) failures++;
    $display("hold cycles: %0d of %0d", holds, CYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
