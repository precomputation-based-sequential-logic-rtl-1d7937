// tb_pc_add_max: self-checking test of the two-cycle precomputed
// add-maximum circuit. Random operands every cycle (some with near sums);
// F is compared three cycles later with MAX(C+D, X+Y) computed here. off_xy
// and off_cd must match the predictors from the top PA bits, and each must
// occur, as must comparator holds in the MAX stage.
module tb_pc_add_max;
  localparam int unsigned N = 16, PA = 2, PC = 4, LAT = 3, CYC = 6000;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] c = '0, d = '0, x = '0, y = '0;
  logic [N:0] f;
  logic off_cd, off_xy, hold_cmp;
  int checks = 0, failures = 0, n_cd = 0, n_xy = 0, n_cmp = 0;
  logic [N:0] exp_q [CYC];

  pc_add_max #(.N(N), .PA(PA), .PC(PC)) dut (.*);

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
      int unsigned sc, sx, s1, s2;
      @(negedge clk);
      if (t >= LAT) begin
        checks++;
        if (f !== exp_q[t-LAT]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: F=%h expected %h", t, f, exp_q[t-LAT]);
        end
      end
      c = N'($urandom); d = N'($urandom); x = N'($urandom); y = N'($urandom);
      if (t % 3 == 2) begin
        x = c + N'($urandom % 8);
        y = d - N'($urandom % 8);
      end
      s1 = 32'(c) + 32'(d);
      s2 = 32'(x) + 32'(y);
      exp_q[t] = (N+1)'((s1 > s2) ? s1 : s2);
      sc = c[N-1 -: PA] + d[N-1 -: PA];
      sx = x[N-1 -: PA] + y[N-1 -: PA];
      #1;
      checks += 2;
      if (off_xy !== (sc >= sx + 2)) failures++;
      if (off_cd !== (sx >= sc + 2)) failures++;
      if (off_xy) n_xy++;
      if (off_cd) n_cd++;
      if (hold_cmp) n_cmp++;
    end
    checks++;
    if (n_xy == 0 || n_cd == 0 || n_cmp == 0) failures++;
    $display("X,Y held %0d, C,D held %0d, MAX comparator held %0d of %0d", n_xy, n_cd, n_cmp, CYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
