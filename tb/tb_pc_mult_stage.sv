// tb_pc_mult_stage: self-checking test of one precomputed multiplier stage
// (stage index I). Random b_i, partial product and multiplicand every
// cycle; one cycle later pp_out must equal pp_in + (A << I) when b_i = 1 and
// pp_in when b_i = 0, a_out must equal A and active must equal b_i. Cycles
// with b_i = 0, where the Add/Shift block is bypassed, must occur.
module tb_pc_mult_stage;
  localparam int unsigned N = 4, I = 2, CYC = 2000;
  logic clk = 0, rst_n = 0;
  logic b_i = 0;
  logic [2*N-1:0] pp_in = '0, pp_out;
  logic [N-1:0] a_in = '0, a_out;
  logic active;
  int checks = 0, failures = 0, skips = 0;
  logic [2*N-1:0] exp_pp;
  logic [N-1:0] exp_a;
  logic exp_act;

  pc_mult_stage #(.N(N), .I(I)) dut (.*);

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
      if (t > 0) begin
        checks += 3;
        if (pp_out !== exp_pp) failures++;
        if (a_out !== exp_a) failures++;
        if (active !== exp_act) failures++;
      end
      b_i = 1'($urandom);
      pp_in = (2*N)'($urandom);
      a_in = N'($urandom);
      exp_pp = b_i ? pp_in + ((2*N)'(a_in) << I) : pp_in;
      exp_a = a_in;
      exp_act = b_i;
      if (!b_i) skips++;
    end
    checks++;
    if (skips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
