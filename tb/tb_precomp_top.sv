// tb_precomp_top: end-to-end test of all precomputation circuits at their
// default sizes. Every cycle each circuit gets new random operands (with
// some cycles steered so that the low-order bits decide the comparisons),
// and every output is compared, after that circuit's latency, with a value
// computed here. Each precomputation mechanism is counted: comparator,
// priority and MAX holds, both carry predictions of the carry-select adder,
// both two-cycle predictors and the comparator hold of the add-compare and
// add-maximum circuits, both ALU halves switched off, bypassed multiplier
// stages, the holds of the two truth-table architectures and both cofactor
// blocks of the Shannon circuit, and the hold of the partially precomputed
// two-output function. A mechanism that never happens is a
// failure.
module tb_precomp_top;
  import pc_pkg::*;
  localparam int CYC = 3000;
  localparam int NM = 18;

  logic clk = 0, rst_n = 0;
  logic [15:0] cmp_c = '0, cmp_d = '0, pri_x = '0, max_k = '0, max_l = '0;
  logic [15:0] csa_a = '0, csa_b = '0, ac_c = '0, ac_d = '0, ac_x = '0, ac_y = '0;
  logic [15:0] am_c = '0, am_d = '0, am_x = '0, am_y = '0, alu_a = '0, alu_b = '0;
  alu_op_e     alu_op = OP_ADD;
  logic [3:0]  mul_a = '0, mul_b = '0;
  logic [5:0]  a1_x = '0, a2_x = '0;
  logic [7:0]  sh_x = '0;
  logic [3:0]  mo_x = '0;
  logic [1:0]  mo_f;
  logic        mo_hold;
  logic        cmp_f, cmp_hold, pri_hold, max_hold, csa_off0, csa_off1;
  logic        ac_f, ac_hold_add, ac_hold_cmp, am_off_cd, am_off_xy, am_hold_cmp;
  logic [15:0] pri_f, max_f, csa_sum, alu_c;
  logic [16:0] am_f;
  logic [7:0]  mul_p;
  logic [3:0]  mul_active;
  logic        a1_f, a1_hold, a2_f, a2_hold, sh_f;

  precomp_top dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    logic        cmp_f;
    logic [15:0] pri_f, max_f, csa_sum, alu_c;
    logic        ac_f;
    logic [16:0] am_f;
    logic [7:0]  mul_p;
    logic        a1_f, a2_f, sh_f;
    logic [1:0]  mo_f;
  } exp_t;
  exp_t ex [CYC];

  int checks = 0, failures = 0;
  int mech [NM];
  string mname [NM] = '{"cmp_hold", "pri_hold", "max_hold", "csa_off0", "csa_off1",
                        "ac_hold_add", "ac_hold_cmp", "am_off_cd", "am_off_xy", "am_hold_cmp",
                        "alu_arith_off", "alu_logic_off", "mul_bypass", "a1_hold", "a2_hold",
                        "sh_cofactor0", "sh_cofactor1", "mo_hold"};

  task automatic chk(bit ok, string what, int t);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s mismatch", t, what);
    end
  endtask

  function automatic logic [15:0] ref_pri(logic [15:0] v);
    for (int i = 0; i < 16; i++) if (v[i]) return 16'(1) << i;
    return '0;
  endfunction

  function automatic logic [15:0] ref_alu(logic [15:0] x, logic [15:0] y, logic [2:0] o);
    case (o)
      3'b000: return x + y;
      3'b001: return x - y;
      3'b010: return x << y[3:0];
      3'b011: return x >> y[3:0];
      3'b100: return x & y;
      3'b101: return x | y;
      3'b110: return x ^ y;
      default: return ~x;
    endcase
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
      int unsigned s1, s2;
      @(negedge clk);
      // outputs: latency 2 for single-step circuits, 3 for the two-step
      // ones, 5 for the 4-bit multiplier
      if (t >= 2) begin
        chk(cmp_f === ex[t-2].cmp_f, "cmp", t);
        chk(pri_f === ex[t-2].pri_f, "pri", t);
        chk(max_f === ex[t-2].max_f, "max", t);
        chk(csa_sum === ex[t-2].csa_sum, "csa", t);
        chk(alu_c === ex[t-2].alu_c, "alu", t);
        chk(a1_f === ex[t-2].a1_f, "arch1", t);
        chk(a2_f === ex[t-2].a2_f, "arch2", t);
        chk(sh_f === ex[t-2].sh_f, "shannon", t);
        chk(mo_f === ex[t-2].mo_f, "multi_out", t);
      end
      if (t >= 3) begin
        chk(ac_f === ex[t-3].ac_f, "add_comp", t);
        chk(am_f === ex[t-3].am_f, "add_max", t);
      end
      if (t >= 5) begin
        chk(mul_p === ex[t-5].mul_p, "mult", t);
        for (int i = 0; i < 4; i++) if (!mul_active[i]) mech[12]++;
      end

      cmp_c = 16'($urandom); cmp_d = 16'($urandom);
      if (t % 4 == 0) cmp_d[15:12] = cmp_c[15:12];
      pri_x = 16'($urandom);
      if (t % 3 == 0) pri_x = pri_x & (16'($urandom) << ($urandom % 16));
      max_k = 16'($urandom); max_l = 16'($urandom);
      if (t % 4 == 1) max_l[15:12] = max_k[15:12];
      csa_a = 16'($urandom); csa_b = 16'($urandom);
      ac_c = 16'($urandom); ac_d = 16'($urandom); ac_x = 16'($urandom); ac_y = 16'($urandom);
      if (t % 3 == 1) begin ac_x = ac_c + 16'($urandom % 8); ac_y = ac_d - 16'($urandom % 8); end
      am_c = 16'($urandom); am_d = 16'($urandom); am_x = 16'($urandom); am_y = 16'($urandom);
      if (t % 3 == 2) begin am_x = am_c + 16'($urandom % 8); am_y = am_d - 16'($urandom % 8); end
      alu_a = 16'($urandom); alu_b = 16'($urandom); alu_op = alu_op_e'($urandom % 8);
      mul_a = 4'($urandom); mul_b = 4'($urandom);
      a1_x = 6'($urandom); a2_x = 6'($urandom);
      if (t % 3 == 0) begin a1_x[4] = a1_x[5]; a2_x[4] = a2_x[5]; end
      sh_x = 8'($urandom);
      mo_x = 4'($urandom);

      ex[t].cmp_f   = cmp_c > cmp_d;
      ex[t].pri_f   = ref_pri(pri_x);
      ex[t].max_f   = (max_k > max_l) ? max_k : max_l;
      ex[t].csa_sum = csa_a + csa_b;
      ex[t].ac_f    = (32'(ac_c) + 32'(ac_d)) > (32'(ac_x) + 32'(ac_y));
      s1 = 32'(am_c) + 32'(am_d);
      s2 = 32'(am_x) + 32'(am_y);
      ex[t].am_f    = 17'((s1 > s2) ? s1 : s2);
      ex[t].alu_c   = ref_alu(alu_a, alu_b, alu_op);
      ex[t].mul_p   = 8'(mul_a) * 8'(mul_b);
      ex[t].a1_f    = {a1_x[5], a1_x[3], a1_x[1]} > {a1_x[4], a1_x[2], a1_x[0]};
      ex[t].a2_f    = {a2_x[5], a2_x[3], a2_x[1]} > {a2_x[4], a2_x[2], a2_x[0]};
      ex[t].sh_f    = ^sh_x;
      ex[t].mo_f    = {mo_x[1] ^ mo_x[0],
                       (mo_x[3] & mo_x[2]) | (mo_x[3] & mo_x[1]) | (mo_x[2] & mo_x[1])};
      if (alu_op[2]) mech[10]++; else mech[11]++;
      if (sh_x[7]) mech[16]++; else mech[15]++;

      #1;
      if (cmp_hold) mech[0]++;
      if (pri_hold) mech[1]++;
      if (max_hold) mech[2]++;
      if (csa_off0) mech[3]++;
      if (csa_off1) mech[4]++;
      if (ac_hold_add) mech[5]++;
      if (ac_hold_cmp) mech[6]++;
      if (am_off_cd) mech[7]++;
      if (am_off_xy) mech[8]++;
      if (am_hold_cmp) mech[9]++;
      if (a1_hold) mech[13]++;
      if (a2_hold) mech[14]++;
      if (mo_hold) mech[17]++;
    end
    for (int i = 0; i < NM; i++) begin
      checks++;
      $display("%-14s %0d", mname[i], mech[i]);
      if (mech[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
