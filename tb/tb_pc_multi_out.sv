// tb_pc_multi_out: self-checking test of the partially precomputed
// two-output function with its default functions f1 = majority(x1,x2,x3)
// (precomputed from x1, x2) and f2 = x3 ^ x4 (not precomputed). Random
// inputs every cycle; both outputs are compared two cycles later with values
// computed here. hold must be high exactly when x1 = x2, where f1 is known.
// f2 must stay right in those cycles although the x3 register seen by f1 is
// not loaded, which is what the duplicated register is for.
module tb_pc_multi_out;
  localparam int unsigned LAT = 2, CYC = 3000;
  logic clk = 0, rst_n = 0;
  logic [3:0] x = '0;    // {x1,x2,x3,x4}
  logic [1:0] f;
  logic hold;
  int checks = 0, failures = 0, holds = 0, x3_changed_in_hold = 0;
  logic [1:0] exp_q [CYC];
  logic prev_x3 = 1'b0;

  pc_multi_out dut (.*);

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
      bit x1, x2, x3, x4;
      @(negedge clk);
      if (t >= LAT) begin
        checks++;
        if (f !== exp_q[t-LAT]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: f=%b expected %b", t, f, exp_q[t-LAT]);
        end
      end
      x = 4'($urandom);
      {x1, x2, x3, x4} = x;
      exp_q[t] = {x3 ^ x4, (x1 & x2) | (x1 & x3) | (x2 & x3)};
      #1;
      checks++;
      if (hold !== (x1 == x2)) failures++;
      if (hold) begin
        holds++;
        if (x3 != prev_x3) x3_changed_in_hold++;
      end
      prev_x3 = x3;
    end
    checks++;
    if (holds == 0 || x3_changed_in_hold == 0) failures++;
    $display("hold cycles %0d, of which x3 changed in %0d", holds, x3_changed_in_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
