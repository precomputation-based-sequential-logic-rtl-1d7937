// pc_add_comp: f = (C + D) > (X + Y) over two pipeline steps, with two-cycle
// and single-cycle precomputation.
//
// Step 1 (pc_add_pre) registers C, D, X, Y and forms the sums K and L. When
// the top PA bits of the four operands already decide the comparison (g1 or
// g2), the low bits of all four operands are not loaded, which saves
// switching in both adders and, a cycle later, in the comparator; the top
// bits alone keep the final answer right, since g1/g2 hold for any low bits.
// Step 2 (pc_cmp_stage) registers K and L with the comparator's own
// precomputation on their top PC bits, and an output register captures f.
// PC = 0 leaves the comparator without precomputation. The defaults are the
// document's 16-bit "8/8" configuration: 8 predictor inputs on the adders
// (2 bits of each operand) and 8 on the comparator (4 bits of K and of L).
//
// Timing: operands before edge k give f after edge k+2. hold_add and
// hold_cmp are the (combinational) "skip the coming edge" signals of the two
// steps. Reset is synchronous and active low (this design's choice).
module pc_add_comp #(
  parameter int unsigned N  = 16,
  parameter int unsigned PA = 2,
  parameter int unsigned PC = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] c,
  input  logic [N-1:0] d,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic         f,
  output logic         hold_add,
  output logic         hold_cmp
);

  logic       g1, g2, gt;
  logic [N:0] k, l;

  assign hold_add = g1 | g2;

  pc_add_pre #(.N(N), .PA(PA)) u_add (
    .clk, .rst_n, .c, .d, .x, .y,
    .le_cd(!hold_add), .le_xy(!hold_add),
    .g1, .g2, .k, .l
  );

  // R5/R6 and the comparator
  pc_cmp_stage #(.N(N+1), .P(PC)) u_cmp (
    .clk, .rst_n, .c(k), .d(l), .gt, .hold(hold_cmp)
  );

  // R7
  always_ff @(posedge clk) begin
    if (!rst_n) f <= 1'b0;
    else        f <= gt;
  end

endmodule
