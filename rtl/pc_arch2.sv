// pc_arch2: second precomputation architecture around an arbitrary Boolean
// function f given as a truth table.
//
// The inputs are split: the K most significant go to register R1, loaded
// every cycle, and the other N-K to register R2, which has a load enable.
// The predictors g1 and g2 depend only on the K inputs of R1 and are
// derived from TT at elaboration by universal quantification, so g1 = 1
// guarantees f = 1 and g2 = 1 guarantees f = 0 for every value of the R2
// inputs. When either is 1, R2 keeps its old value; the R2 inputs are then
// don't-cares and block A, evaluating TT on {R1, R2}, still gives the right
// f with fewer of its inputs switching. No output correction is needed. The
// default function is the 3-bit comparator with the predictor on a2, b2.
// The truth-table form and the choice of the top K inputs are this
// design's.
//
// Timing: x before edge k gives f after edge k+1. Reset is synchronous and
// active low (this design's choice).
module pc_arch2
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
    $error("pc_arch2: need 1 <= K < N <= TT_MAX_IN");
  end

  localparam tt_t G1_FULL = quantify(TT, N, K, 1'b1);
  localparam tt_t G2_FULL = quantify(TT, N, K, 1'b0);
  localparam logic [2**N-1:0] F_T  = TT[2**N-1:0];       // block A
  localparam logic [2**K-1:0] G1_T = G1_FULL[2**K-1:0];  // g1 table
  localparam logic [2**K-1:0] G2_T = G2_FULL[2**K-1:0];  // g2 table

  logic [K-1:0]   hi_q;   // R1
  logic [N-K-1:0] lo_q;   // R2
  logic           g1, g2;

  assign g1   = G1_T[x[N-1 -: K]];
  assign g2   = G2_T[x[N-1 -: K]];
  assign hold = g1 | g2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hi_q <= '0;
      lo_q <= '0;
      f    <= 1'b0;
    end else begin
      hi_q <= x[N-1 -: K];
      if (!hold) lo_q <= x[N-K-1:0];
      f <= F_T[{hi_q, lo_q}];   // R3
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(g1 && g2));

endmodule
