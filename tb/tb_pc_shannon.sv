// tb_pc_shannon: self-checking test of the Shannon-expansion precomputation
// with its default function, 8-input parity. All 256 input values and then
// random ones are applied, one per cycle; f is compared two cycles later
// with the parity computed here. Both cofactor blocks must be chosen in
// some cycles.
module tb_pc_shannon;
  localparam int unsigned N = 8, LAT = 2, CYC = 2000;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] x = '0;
  logic f;
  int checks = 0, failures = 0, ones = 0, zeros = 0;
  bit exp_q [CYC];

  pc_shannon dut (.*);

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
      x = (t < (1 << N)) ? N'(t) : N'($urandom);
      exp_q[t] = ^x;
      if (x[N-1]) ones++; else zeros++;
    end
    checks++;
    if (ones == 0 || zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
