// tb_pc_arch1: self-checking test of the architecture-1 precomputation
// wrapper with its default function, the 3-bit comparator a > b with inputs
// {a2,b2,a1,b1,a0,b0}. Random inputs each cycle (a third with a2 = b2 so the
// low bits decide); f is compared two cycles later with a > b computed here
// from the unpacked operands, and hold must be high exactly when a2 != b2,
// the predictor the document derives for k = 2.
module tb_pc_arch1;
  localparam int unsigned LAT = 2, CYC = 3000;
  logic clk = 0, rst_n = 0;
  logic [5:0] x = '0;
  logic f, hold;
  int checks = 0, failures = 0, holds = 0, loads = 0;
  bit exp_q [CYC];

  pc_arch1 dut (.*);

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
      logic [2:0] av, bv;
      @(negedge clk);
      if (t >= LAT) begin
        checks++;
        if (f !== exp_q[t-LAT]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: f=%0b expected %0b", t, f, exp_q[t-LAT]);
        end
      end
      x = 6'($urandom);
      if (t % 3 == 0) x[4] = x[5];
      av = {x[5], x[3], x[1]};
      bv = {x[4], x[2], x[0]};
      exp_q[t] = av > bv;
      #1;
      checks++;
      if (hold !== (x[5] != x[4])) failures++;
      if (hold) holds++; else loads++;
    end
    checks++;
    if (holds == 0 || loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
