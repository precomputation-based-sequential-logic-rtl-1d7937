// tb_table81: the datapath configurations of the document's results table,
// run side by side on uniformly random operands.
//
//   comparator, 16 bits, 2/4/6/8/10 predictor inputs (P = 1..5 bit pairs)
//   priority, 16 inputs, 1..6 predictor inputs
//   MAX, 16 bits, 8 predictor inputs
//   carry-select adder, 16 bits, 2/4/6/8 predictor inputs (P = 1..4)
//   add-compare and add-maximum, 16 bits, 4/0, 4/8, 8/0, 8/8 predictor
//   inputs (first step / comparator step)
//
// Every output is checked against a reference computed here. For every
// configuration the fraction of cycles in which precomputation disables
// registers is measured and compared with its exact value for uniform
// inputs, worked out here by enumeration; where the document states the
// figure (50% and 75% for the comparator and priority function at the two
// smallest sizes, 25% for each adder of the carry-select adder, 12.5% and
// "over 45%" for the add-compare predictors) that is checked as well.
//
// The thesis evaluates these circuits by power. As the nearest quantity a
// register-level simulation gives, the bit toggles at the inputs of the
// comparator and priority logic (the registers feeding them) are counted and
// compared with a plain comparator (P = 0) and with the expected count: a
// bit that loads a fresh uniform value toggles with probability 1/2, a held
// bit does not, so per cycle the comparator's inputs should toggle
// P + (N - P) * (1 - hold rate) times (two operands of N bits, half of each
// bit's loads changing it) and the priority logic's K/2 + (N - K)/2 * (1 -
// hold rate) times.
module tb_table81;
  localparam int CYC = 20000;
  localparam real TOL = 0.02;
  logic clk = 0, rst_n = 0;
  logic [15:0] c = '0, d = '0, x = '0, y = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%s mismatch", what);
    end
  endtask

  task automatic rate(string what, int n, real want);
    real r = real'(n) / CYC;
    $display("%-28s disabled %6.2f%%   exact %6.2f%%", what, 100.0 * r, 100.0 * want);
    chk(r > want - TOL && r < want + TOL, what);
  endtask

  // ---- instances ----
  logic [5:0] cmp_f, cmp_h;
  for (genvar p = 0; p <= 5; p++) begin : g_cmp
    pc_comparator #(.N(16), .P(p)) u (.clk, .rst_n, .c, .d, .f(cmp_f[p]), .hold(cmp_h[p]));
  end
  logic [15:0] pri_f [7];
  logic [6:1]  pri_h;
  for (genvar k = 1; k <= 6; k++) begin : g_pri
    pc_priority #(.N(16), .K(k)) u (.clk, .rst_n, .x(c), .f(pri_f[k]), .hold(pri_h[k]));
  end
  logic [15:0] max_f;
  logic        max_h;
  pc_max #(.N(16), .P(4)) u_max (.clk, .rst_n, .k(c), .l(d), .f(max_f), .hold(max_h));
  logic [15:0] csa_s [5];
  logic [4:1]  csa_o0, csa_o1;
  for (genvar p = 1; p <= 4; p++) begin : g_csa
    pc_csa #(.N(16), .LOW(8), .P(p)) u (.clk, .rst_n, .a(c), .b(d), .sum(csa_s[p]),
                                        .off0(csa_o0[p]), .off1(csa_o1[p]));
  end
  // add-compare / add-maximum: index 0: 4/0, 1: 4/8, 2: 8/0, 3: 8/8
  logic [3:0]  ac_f, ac_ha, ac_hc, am_cd, am_xy, am_hc;
  logic [16:0] am_f [4];
  for (genvar i = 0; i < 4; i++) begin : g_add
    localparam int unsigned PA = (i < 2) ? 1 : 2;
    localparam int unsigned PC = (i % 2 == 1) ? 4 : 0;
    pc_add_comp #(.N(16), .PA(PA), .PC(PC)) u_ac (.clk, .rst_n, .c, .d, .x, .y,
      .f(ac_f[i]), .hold_add(ac_ha[i]), .hold_cmp(ac_hc[i]));
    pc_add_max #(.N(16), .PA(PA), .PC(PC)) u_am (.clk, .rst_n, .c, .d, .x, .y,
      .f(am_f[i]), .off_cd(am_cd[i]), .off_xy(am_xy[i]), .hold_cmp(am_hc[i]));
  end

  // ---- references ----
  typedef struct {
    logic        gt;
    logic [15:0] pri, mx, sum;
    logic        acf;
    logic [16:0] amf;
  } exp_t;
  exp_t ex [CYC];

  longint tog_cmp [6], tog_pri [7];
  logic [31:0] cmp_prev [6];
  logic [15:0] pri_prev [7];
  int n_cmp [6], n_pri [7], n_max, n_o0 [5], n_o1 [5], n_ac [4], n_ach [4], n_cd [4], n_xy [4], n_amh [4];

  function automatic logic [15:0] ref_pri(logic [15:0] v);
    for (int i = 0; i < 16; i++) if (v[i]) return 16'(1) << i;
    return '0;
  endfunction

  // exact probability that the add-compare predictor fires with pa top bits
  function automatic real add_rate(int pa);
    int cnt = 0, m = (1 << pa) - 1;
    for (int i = 0; i < (1 << (4 * pa)); i++) begin
      int sc = (i & m) + ((i >> pa) & m);
      int sx = ((i >> (2 * pa)) & m) + ((i >> (3 * pa)) & m);
      if (sc >= sx + 2 || sx >= sc + 2) cnt++;
    end
    return real'(cnt) / (1 << (4 * pa));
  endfunction

  function automatic real csa_rate(int p, bit carry1);
    int cnt = 0;
    for (int i = 0; i < (1 << p); i++)
      for (int j = 0; j < (1 << p); j++)
        if (carry1 ? (i + j >= (1 << p)) : (i + j + 2 <= (1 << p))) cnt++;
    return real'(cnt) / (1 << (2 * p));
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < CYC; t++) begin
      int unsigned s1, s2;
      @(negedge clk);
      if (t >= 2) begin
        for (int p = 0; p <= 5; p++) chk(cmp_f[p] === ex[t-2].gt, "comparator");
        for (int k = 1; k <= 6; k++) chk(pri_f[k] === ex[t-2].pri, "priority");
        chk(max_f === ex[t-2].mx, "max");
        for (int p = 1; p <= 4; p++) chk(csa_s[p] === ex[t-2].sum, "csa");
      end
      if (t >= 3)
        for (int i = 0; i < 4; i++) begin
          chk(ac_f[i] === ex[t-3].acf, "add_comp");
          chk(am_f[i] === ex[t-3].amf, "add_max");
        end
      c = 16'($urandom); d = 16'($urandom); x = 16'($urandom); y = 16'($urandom);
      s1 = 32'(c) + 32'(d);
      s2 = 32'(x) + 32'(y);
      ex[t].gt  = c > d;
      ex[t].pri = ref_pri(c);
      ex[t].mx  = (c > d) ? c : d;
      ex[t].sum = c + d;
      ex[t].acf = s1 > s2;
      ex[t].amf = 17'((s1 > s2) ? s1 : s2);
      // register contents loaded at the previous edge
      tog_cmp[0] += $countones({g_cmp[0].u.u_stage.c_q, g_cmp[0].u.u_stage.d_q} ^ cmp_prev[0]);
      cmp_prev[0] = {g_cmp[0].u.u_stage.c_q, g_cmp[0].u.u_stage.d_q};
      tog_cmp[1] += $countones({g_cmp[1].u.u_stage.c_q, g_cmp[1].u.u_stage.d_q} ^ cmp_prev[1]);
      cmp_prev[1] = {g_cmp[1].u.u_stage.c_q, g_cmp[1].u.u_stage.d_q};
      tog_cmp[2] += $countones({g_cmp[2].u.u_stage.c_q, g_cmp[2].u.u_stage.d_q} ^ cmp_prev[2]);
      cmp_prev[2] = {g_cmp[2].u.u_stage.c_q, g_cmp[2].u.u_stage.d_q};
      tog_cmp[3] += $countones({g_cmp[3].u.u_stage.c_q, g_cmp[3].u.u_stage.d_q} ^ cmp_prev[3]);
      cmp_prev[3] = {g_cmp[3].u.u_stage.c_q, g_cmp[3].u.u_stage.d_q};
      tog_cmp[4] += $countones({g_cmp[4].u.u_stage.c_q, g_cmp[4].u.u_stage.d_q} ^ cmp_prev[4]);
      cmp_prev[4] = {g_cmp[4].u.u_stage.c_q, g_cmp[4].u.u_stage.d_q};
      tog_cmp[5] += $countones({g_cmp[5].u.u_stage.c_q, g_cmp[5].u.u_stage.d_q} ^ cmp_prev[5]);
      cmp_prev[5] = {g_cmp[5].u.u_stage.c_q, g_cmp[5].u.u_stage.d_q};
      tog_pri[1] += $countones(g_pri[1].u.x_q ^ pri_prev[1]); pri_prev[1] = g_pri[1].u.x_q;
      tog_pri[2] += $countones(g_pri[2].u.x_q ^ pri_prev[2]); pri_prev[2] = g_pri[2].u.x_q;
      tog_pri[3] += $countones(g_pri[3].u.x_q ^ pri_prev[3]); pri_prev[3] = g_pri[3].u.x_q;
      tog_pri[4] += $countones(g_pri[4].u.x_q ^ pri_prev[4]); pri_prev[4] = g_pri[4].u.x_q;
      tog_pri[5] += $countones(g_pri[5].u.x_q ^ pri_prev[5]); pri_prev[5] = g_pri[5].u.x_q;
      tog_pri[6] += $countones(g_pri[6].u.x_q ^ pri_prev[6]); pri_prev[6] = g_pri[6].u.x_q;
      #1;
      for (int p = 1; p <= 5; p++) n_cmp[p] += int'(cmp_h[p]);
      for (int k = 1; k <= 6; k++) n_pri[k] += int'(pri_h[k]);
      n_max += int'(max_h);
      for (int p = 1; p <= 4; p++) begin
        n_o0[p] += int'(csa_o0[p]);
        n_o1[p] += int'(csa_o1[p]);
      end
      for (int i = 0; i < 4; i++) begin
        n_ac[i]  += int'(ac_ha[i]);
        n_ach[i] += int'(ac_hc[i]);
        n_cd[i]  += int'(am_cd[i]);
        n_xy[i]  += int'(am_xy[i]);
        n_amh[i] += int'(am_hc[i]);
      end
    end
    for (int p = 1; p <= 5; p++) rate($sformatf("comp16 %0d bits", 2 * p), n_cmp[p], 1.0 - 1.0 / (1 << p));
    rate("comp16 2 bits (document)", n_cmp[1], 0.5);
    // input switching of the comparator logic
    for (int p = 0; p <= 5; p++) begin
      automatic real per = real'(tog_cmp[p]) / CYC;
      automatic real want = p + (16 - p) * (1.0 - ((p == 0) ? 0.0 : real'(n_cmp[p]) / CYC));
      $display("comp16 %2d bits: %6.2f input toggles/cycle, expected %6.2f, %5.1f%% below plain",
               2 * p, per, want, 100.0 * (1.0 - real'(tog_cmp[p]) / real'(tog_cmp[0])));
      chk(per > 0.95 * want && per < 1.05 * want, "comparator input toggles");
    end
    for (int k = 1; k <= 6; k++) begin
      automatic real per = real'(tog_pri[k]) / CYC;
      automatic real want = 0.5 * k + 0.5 * (16 - k) * (1.0 - real'(n_pri[k]) / CYC);
      $display("priority16 %0d bits: %6.2f input toggles/cycle, expected %6.2f, %5.1f%% below plain (8.00)",
               k, per, want, 100.0 * (1.0 - per / 8.0));
      chk(per > 0.95 * want && per < 1.05 * want, "priority input toggles");
    end
    rate("comp16 4 bits (document)", n_cmp[2], 0.75);
    for (int k = 1; k <= 6; k++) rate($sformatf("priority16 %0d bits", k), n_pri[k], 1.0 - 1.0 / (1 << k));
    rate("priority16 1 bit (document)", n_pri[1], 0.5);
    rate("priority16 2 bits (document)", n_pri[2], 0.75);
    rate("max16 8 bits", n_max, 1.0 - 1.0 / 16);
    for (int p = 1; p <= 4; p++) begin
      rate($sformatf("csa16 %0d bits, carry-0 adder", 2 * p), n_o0[p], csa_rate(p, 1));
      rate($sformatf("csa16 %0d bits, carry-1 adder", 2 * p), n_o1[p], csa_rate(p, 0));
    end
    rate("csa16 2 bits (document)", n_o0[1], 0.25);
    rate("csa16 2 bits (document)", n_o1[1], 0.25);
    for (int i = 0; i < 4; i++) begin
      automatic string nm = $sformatf("%0d/%0d", (i < 2) ? 4 : 8, (i % 2) ? 8 : 0);
      rate({"add_comp16 ", nm, " first step"}, n_ac[i], add_rate((i < 2) ? 1 : 2));
      // add-maximum: each side is disabled half of those cycles
      rate({"add_max16 ", nm, " either side"}, n_cd[i] + n_xy[i], add_rate((i < 2) ? 1 : 2));
      checks++;
      if ((i % 2 == 1) != (n_ach[i] > 0 && n_amh[i] > 0)) failures++;
    end
    rate("add_comp16 4/x (document)", n_ac[0], 0.125);
    checks++;
    if (real'(n_ac[2]) / CYC <= 0.45) failures++;   // document: "over 45%"
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
