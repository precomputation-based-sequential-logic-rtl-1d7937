// precomp_top: the precomputation circuits side by side, sharing one clock
// and one reset.
//
// Precomputation computes some output values of a registered logic block
// from a small subset of its inputs one cycle early and, when that is
// possible, stops the block's other input registers from loading, so that
// most of the block does not switch. The circuits here are independent
// examples of the idea and are not connected to each other; each keeps its
// own ports, prefixed with its short name:
//   cmp_     16-bit comparator C > D, second architecture (pc_comparator)
//   pri_     16-input priority function (pc_priority)
//   max_     16-bit MAX(K, L) with a precomputed comparator (pc_max)
//   csa_     16-bit carry-select adder with precomputed carry (pc_csa)
//   ac_      (C+D) > (X+Y), two-cycle precomputation (pc_add_comp)
//   am_      MAX(C+D, X+Y), two-cycle precomputation (pc_add_max)
//   alu_     eight-operation ALU partitioned on s0 (pc_alu)
//   mul_     4x4 pipelined array multiplier, stages precomputed on b_i
//            (pc_array_mult)
//   a1_ a2_  first and second architecture around a truth-table function
//            (pc_arch1, pc_arch2), default a 3-bit comparator
//   sh_      Shannon-expansion (multiplexor-based) precomputation
//            (pc_shannon), default 8-input parity
//   mo_      two-output function with one output precomputed and the
//            shared input register duplicated (pc_multi_out)
// The hold/off outputs show, per cycle, when a circuit's precomputation
// stops registers from loading. Latencies are given in each module.
module precomp_top
  import pc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,

  input  logic [15:0] cmp_c,
  input  logic [15:0] cmp_d,
  output logic        cmp_f,
  output logic        cmp_hold,

  input  logic [15:0] pri_x,
  output logic [15:0] pri_f,
  output logic        pri_hold,

  input  logic [15:0] max_k,
  input  logic [15:0] max_l,
  output logic [15:0] max_f,
  output logic        max_hold,

  input  logic [15:0] csa_a,
  input  logic [15:0] csa_b,
  output logic [15:0] csa_sum,
  output logic        csa_off0,
  output logic        csa_off1,

  input  logic [15:0] ac_c,
  input  logic [15:0] ac_d,
  input  logic [15:0] ac_x,
  input  logic [15:0] ac_y,
  output logic        ac_f,
  output logic        ac_hold_add,
  output logic        ac_hold_cmp,

  input  logic [15:0] am_c,
  input  logic [15:0] am_d,
  input  logic [15:0] am_x,
  input  logic [15:0] am_y,
  output logic [16:0] am_f,
  output logic        am_off_cd,
  output logic        am_off_xy,
  output logic        am_hold_cmp,

  input  logic [15:0] alu_a,
  input  logic [15:0] alu_b,
  input  alu_op_e     alu_op,
  output logic [15:0] alu_c,

  input  logic [3:0]  mul_a,
  input  logic [3:0]  mul_b,
  output logic [7:0]  mul_p,
  output logic [3:0]  mul_active,

  input  logic [5:0]  a1_x,
  output logic        a1_f,
  output logic        a1_hold,

  input  logic [5:0]  a2_x,
  output logic        a2_f,
  output logic        a2_hold,

  input  logic [7:0]  sh_x,
  output logic        sh_f,

  input  logic [3:0]  mo_x,
  output logic [1:0]  mo_f,
  output logic        mo_hold
);

  pc_comparator u_cmp (
    .clk, .rst_n, .c(cmp_c), .d(cmp_d), .f(cmp_f), .hold(cmp_hold)
  );

  pc_priority u_pri (
    .clk, .rst_n, .x(pri_x), .f(pri_f), .hold(pri_hold)
  );

  pc_max u_max (
    .clk, .rst_n, .k(max_k), .l(max_l), .f(max_f), .hold(max_hold)
  );

  pc_csa u_csa (
    .clk, .rst_n, .a(csa_a), .b(csa_b), .sum(csa_sum),
    .off0(csa_off0), .off1(csa_off1)
  );

  pc_add_comp u_ac (
    .clk, .rst_n, .c(ac_c), .d(ac_d), .x(ac_x), .y(ac_y), .f(ac_f),
    .hold_add(ac_hold_add), .hold_cmp(ac_hold_cmp)
  );

  pc_add_max u_am (
    .clk, .rst_n, .c(am_c), .d(am_d), .x(am_x), .y(am_y), .f(am_f),
    .off_cd(am_off_cd), .off_xy(am_off_xy), .hold_cmp(am_hold_cmp)
  );

  pc_alu u_alu (
    .clk, .rst_n, .a(alu_a), .b(alu_b), .op(alu_op), .c(alu_c)
  );

  pc_array_mult u_mul (
    .clk, .rst_n, .a(mul_a), .b(mul_b), .p(mul_p), .active(mul_active)
  );

  pc_arch1 u_a1 (
    .clk, .rst_n, .x(a1_x), .f(a1_f), .hold(a1_hold)
  );

  pc_arch2 u_a2 (
    .clk, .rst_n, .x(a2_x), .f(a2_f), .hold(a2_hold)
  );

  pc_shannon u_sh (
    .clk, .rst_n, .x(sh_x), .f(sh_f)
  );

  pc_multi_out u_mo (
    .clk, .rst_n, .x(mo_x), .f(mo_f), .hold(mo_hold)
  );

endmodule
