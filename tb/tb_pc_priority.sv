// tb_pc_priority: self-checking test of the precomputed priority function.
// Each cycle a random input vector is applied, with the high-priority bits
// cleared in some cycles so that low-priority inputs also win. The one-hot
// output is compared two cycles later with a reference priority encoder
// (x[0] highest). hold must equal the OR of the K high-priority inputs, and
// on purely random vectors it must be high about 1 - 2^-K of the time.
module tb_pc_priority;
  localparam int unsigned N = 16, K = 5, LAT = 2, CYC = 4000;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] x = '0;
  logic [N-1:0] f;
  logic hold;
  int checks = 0, failures = 0, rnd = 0, rnd_holds = 0, low_wins = 0;
  logic [N-1:0] exp_q [CYC];

  pc_priority #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] ref_pri(logic [N-1:0] v);
    for (int i = 0; i < N; i++)
      if (v[i]) return N'(1) << i;
    return '0;
  endfunction

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
          if (failures < 10) $display("cycle %0d: f=%h expected %h", t, f, exp_q[t-LAT]);
        end
      end
      x = N'($urandom);
      if (t % 3 == 2) x = x & (N'($urandom) << ($urandom % N));
      else rnd++;
      exp_q[t] = ref_pri(x);
      if (x[K-1:0] == '0 && x != '0) low_wins++;
      #1;
      checks++;
      if (hold !== (|x[K-1:0])) failures++;
      if (hold && t % 3 != 2) rnd_holds++;
    end
    checks++;
    if (real'(rnd_holds) / rnd < 1.0 - 1.0 / (1 << K) - 0.03) begin
      failures++;
      $display("hold rate %f", real'(rnd_holds) / rnd);
    end
    checks++;
    if (low_wins < 10) failures++;
    $display("low-priority winners: %0d", low_wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
