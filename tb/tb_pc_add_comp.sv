// tb_pc_add_comp: self-checking test of the two-cycle precomputed
// add-compare circuit. Random operands every cycle (some cycles with near
// sums, so that the low bits decide); f is compared three cycles later with
// (C+D) > (X+Y) computed here in 32-bit arithmetic. hold_add must match the
// predictor worked out from the operands' top PA bits, and its rate on
// random operands must match the exact count over all top-bit values
// (2/16 = 12.5% for PA = 1). Comparator holds must also occur.
module tb_pc_add_comp;
  localparam int unsigned N = 16, PA = 2, PC = 4, LAT = 3, CYC = 6000;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] c = '0, d = '0, x = '0, y = '0;
  logic f, hold_add, hold_cmp;
  int checks = 0, failures = 0, rnd = 0, rnd_holds = 0, cmp_holds = 0, cnt = 0;
  bit exp_q [CYC];
  real pr;

  pc_add_comp #(.N(N), .PA(PA), .PC(PC)) dut (.*);

  always #5 clk = ~clk;

  function automatic bit pred(int unsigned sc, int unsigned sx);
    return (sc >= sx + 2) || (sx >= sc + 2);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (4 * PA)); i++) begin
      int unsigned m = (1 << PA) - 1;
      if (pred((i & m) + ((i >> PA) & m), ((i >> (2 * PA)) & m) + ((i >> (3 * PA)) & m))) cnt++;
    end
    pr = real'(cnt) / (1 << (4 * PA));
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < CYC; t++) begin
      int unsigned sc, sx;
      @(negedge clk);
      if (t >= LAT) begin
        checks++;
        if (f !== exp_q[t-LAT]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: f=%0b expected %0b", t, f, exp_q[t-LAT]);
        end
      end
      c = N'($urandom); d = N'($urandom); x = N'($urandom); y = N'($urandom);
      if (t % 3 == 2) begin
        x = c + N'($urandom % 8);
        y = d - N'($urandom % 8);
      end else rnd++;
      exp_q[t] = (32'(c) + 32'(d)) > (32'(x) + 32'(y));
      sc = c[N-1 -: PA] + d[N-1 -: PA];
      sx = x[N-1 -: PA] + y[N-1 -: PA];
      #1;
      checks++;
      if (hold_add !== pred(sc, sx)) failures++;
      if (hold_add && t % 3 != 2) rnd_holds++;
      if (hold_cmp) cmp_holds++;
    end
    checks += 2;
    if (real'(rnd_holds) / rnd < pr - 0.03 || real'(rnd_holds) / rnd > pr + 0.03) failures++;
    if (cmp_holds == 0) failures++;
    $display("adder holds %0d of %0d random cycles (expected rate %f), comparator holds %0d",
             rnd_holds, rnd, pr, cmp_holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
