// tb_pc_csa: self-checking test of the precomputed carry-select adder.
// Random operands every cycle; the sum is compared two cycles later with A+B
// mod 2^N. off0/off1 are checked against the carry predictions worked out
// from the top P bits of the low half, and their rates on random operands
// against the exact counts of top-bit pairs with sum >= 2^P and <= 2^P - 2
// (both 25% for P = 1).
module tb_pc_csa;
  localparam int unsigned N = 16, LOW = 8, P = 4, LAT = 2, CYC = 6000;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] a = '0, b = '0;
  logic [N-1:0] sum;
  logic off0, off1;
  int checks = 0, failures = 0, n0 = 0, n1 = 0, cnt1 = 0, cnt0 = 0;
  logic [N-1:0] exp_q [CYC];
  real p1, p0;

  pc_csa #(.N(N), .LOW(LOW), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exact probabilities of the two predictions for uniform top bits
    for (int i = 0; i < (1 << P); i++)
      for (int j = 0; j < (1 << P); j++) begin
        if (i + j >= (1 << P)) cnt1++;
        if (i + j <= (1 << P) - 2) cnt0++;
      end
    p1 = real'(cnt1) / (1 << (2 * P));
    p0 = real'(cnt0) / (1 << (2 * P));
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < CYC; t++) begin
      int unsigned ta, tb;
      @(negedge clk);
      if (t >= LAT) begin
        checks++;
        if (sum !== exp_q[t-LAT]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: sum=%h expected %h", t, sum, exp_q[t-LAT]);
        end
      end
      a = N'($urandom);
      b = N'($urandom);
      exp_q[t] = a + b;
      ta = a[LOW-1 -: P];
      tb = b[LOW-1 -: P];
      #1;
      checks += 2;
      if (off0 !== (ta + tb >= (1 << P))) failures++;
      if (off1 !== (ta + tb + 2 <= (1 << P))) failures++;
      if (off0) n0++;
      if (off1) n1++;
    end
    checks += 2;
    if (real'(n0) / CYC < p1 - 0.03 || real'(n0) / CYC > p1 + 0.03) failures++;
    if (real'(n1) / CYC < p0 - 0.03 || real'(n1) / CYC > p0 + 0.03) failures++;
    $display("carry-0 adder off %0d, carry-1 adder off %0d of %0d (expected %f, %f)", n0, n1, CYC, p1, p0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
