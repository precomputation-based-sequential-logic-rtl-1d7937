// pc_shannon: multiplexor-based precomputation from the Shannon expansion
// f = x1 & f_x1 | !x1 & f_!x1, for an arbitrary function given as a truth
// table.
//
// The two cofactors of f with respect to x1 (the most significant input,
// x[N-1]) are built as separate blocks, each with its own copy of the
// registers for the other N-1 inputs. The copy feeding f_x1 loads only when
// x1 = 1, the copy feeding f_!x1 only when x1 = 0, so only one cofactor block
// switches per cycle. A third register holds x1 and selects the cofactor
// (0: f_!x1, 1: f_x1); an output register captures f. Unlike the predictor
// architectures this works for every function, including those no subset of
// inputs can predict; the default is N-input parity, which is such a
// function. The width and default function are this design's choices.
//
// Timing: x before edge k gives f after edge k+1. Reset is synchronous and
// active low (this design's choice).
module pc_shannon
  import pc_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter tt_t         TT = parity_tt(8)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x,
  output logic         f
);

  if (N < 2 || N > TT_MAX_IN) begin : g_bad
    $error("pc_shannon: need 2 <= N <= TT_MAX_IN");
  end

  logic [N-2:0] r0_q;   // R1: inputs of f_!x1, loaded when x1 = 0
  logic [N-2:0] r1_q;   // R2: inputs of f_x1,  loaded when x1 = 1
  logic         x1_q;   // R3
  logic         f0, f1;

  localparam logic [2**N-1:0] F_T = TT[2**N-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r0_q <= '0;
      r1_q <= '0;
      x1_q <= 1'b0;
      f    <= 1'b0;
    end else begin
      x1_q <= x[N-1];
      if (x[N-1]) r1_q <= x[N-2:0];
      else        r0_q <= x[N-2:0];
      f <= x1_q ? f1 : f0;   // R4
    end
  end

  assign f0 = F_T[{1'b0, r0_q}];
  assign f1 = F_T[{1'b1, r1_q}];

endmodule
