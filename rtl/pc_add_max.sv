// pc_add_max: F = MAX(C + D, X + Y) over two pipeline steps, with two-cycle
// precomputation on the adders and a precomputed MAX stage.
//
// Step 1 (pc_add_pre) uses the same predictors as the add-compare circuit,
// but applies them to one side only: g1 (C + D certainly larger) stops the
// low bits of X and Y from loading, since X + Y will not be selected; g2
// (X + Y certainly at least as large) stops the low bits of C and D. The sum
// built from stale low bits still compares the right way, so it is never the
// one selected. Step 2 is the precomputable MAX circuit (pc_max): duplicated
// K/L registers, a comparator with precomputation on the top PC bits, a
// multiplexer and the output register. The defaults are the document's
// 16-bit "8/8" configuration.
//
// Timing: operands before edge k give F after edge k+2. Reset is synchronous
// and active low (this design's choice).
module pc_add_max #(
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
  output logic [N:0]   f,
  output logic         off_cd,
  output logic         off_xy,
  output logic         hold_cmp
);

  logic       g1, g2;
  logic [N:0] k, l;

  assign off_xy = g1;
  assign off_cd = g2;

  pc_add_pre #(.N(N), .PA(PA)) u_add (
    .clk, .rst_n, .c, .d, .x, .y,
    .le_cd(!g2), .le_xy(!g1),
    .g1, .g2, .k, .l
  );

  pc_max #(.N(N+1), .P(PC)) u_max (
    .clk, .rst_n, .k, .l, .f, .hold(hold_cmp)
  );

endmodule
