// pc_arch1: first precomputation architecture around an arbitrary Boolean
// function f given as a truth table.
//
// Logic block A evaluates f(x) = TT[x] from the input register R1. The
// predictors g1 and g2 read only the K most significant inputs, straight
// from the circuit inputs, and are derived from TT at elaboration by
// universal quantification (g1 = 1 only where f is 1 for every value of the
// other inputs, g2 likewise for f = 0). When g1 or g2 is 1, R1 is not loaded
// at the coming edge, so block A sees no input change; g1 and g2 are
// captured in two flip-flops and force the output-register input to 1 (g1)
// or 0 (g2) in the next cycle through an OR-AND gate:
//   R2 <= (A | g1_q) & !g2_q.
// The default function is the 3-bit comparator a > b with the inputs
// ordered {a2,b2,a1,b1,a0,b0} and the predictor on a2, b2. The choice of
// predictor inputs (the top K) and the truth-table form are this design's.
//
// Timing: x before edge k gives f after edge k+1. Reset is synchronous and
// active low (this design's choice).
module pc_arch1
  import pc_pkg::*;
#(
  parameter int unsigned N  = 6,
  parameter int unsigned K  = 2,
  parameter tt_t         TT = cmp_tt(3)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x,
  output logic         f,
  output logic         hold
);

  if (N > TT_MAX_IN || K == 0 || K >= N) begin : g_bad
    $error("pc_arch1: need 1 <= K < N <= TT_MAX_IN");
  end

  localparam tt_t G1_FULL = quantify(TT, N, K, 1'b1);
  localparam tt_t G2_FULL = quantify(TT, N, K, 1'b0);
  localparam logic [2**N-1:0] F_T  = TT[2**N-1:0];       // block A
  localparam logic [2**K-1:0] G1_T = G1_FULL[2**K-1:0];  // g1 table
  localparam logic [2**K-1:0] G2_T = G2_FULL[2**K-1:0];  // g2 table

  logic [N-1:0] x_q;           // R1
  logic         g1, g2, g1_q, g2_q;
  logic         a_out;

  assign g1   = G1_T[x[N-1 -: K]];
  assign g2   = G2_T[x[N-1 -: K]];
  assign hold = g1 | g2;
  assign a_out = F_T[x_q];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q  <= '0;
      g1_q <= 1'b0;
      g2_q <= 1'b0;
      f    <= 1'b0;
    end else begin
      if (!hold) x_q <= x;
      g1_q <= g1;
      g2_q <= g2;
      f    <= (a_out | g1_q) & ~g2_q;   // R2
    end
  end

  // g1 and g2 are never both 1: that would claim f is both 1 and 0.
  assert property (@(posedge clk) disable iff (!rst_n) !(g1 && g2));

endmodule
