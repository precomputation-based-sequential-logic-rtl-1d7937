// tb_pc_array_mult: self-checking test of the pipelined precomputed array
// multiplier. A new random A, B pair enters every cycle (every pair when N
// is small enough, then random ones); the product is compared N+1 cycles
// later with A*B. The number of stage-cycles in which a stage's Add/Shift
// block is bypassed (b_i = 0) is counted and must be near half.
module tb_pc_array_mult;
  localparam int unsigned N = 4, LAT = N + 1, CYC = 3000;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] a = '0, b = '0;
  logic [2*N-1:0] p;
  logic [N-1:0] active;
  int checks = 0, failures = 0, bypass = 0, stage_cycles = 0;
  logic [2*N-1:0] exp_q [CYC];

  pc_array_mult #(.N(N)) dut (.*);

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
        if (p !== exp_q[t-LAT]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: P=%h expected %h", t, p, exp_q[t-LAT]);
        end
        for (int i = 0; i < N; i++) begin
          stage_cycles++;
          if (!active[i]) bypass++;
        end
      end
      if (2 * N <= 12 && t < (1 << (2 * N))) {a, b} = (2*N)'(t);
      else begin
        a = N'($urandom);
        b = N'($urandom);
      end
      exp_q[t] = (2*N)'(a) * (2*N)'(b);
    end
    checks++;
    if (real'(bypass) / stage_cycles < 0.45 || real'(bypass) / stage_cycles > 0.55) failures++;
    $display("stages bypassed in %0d of %0d stage-cycles", bypass, stage_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
