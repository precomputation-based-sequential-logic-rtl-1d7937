// pc_csa: registered carry-select adder whose carry select is precomputed.
//
// The low LOW bits are added directly. The high N-LOW bits are added twice in
// parallel, once with carry-in 0 and once with carry-in 1, and the low
// half's carry-out selects one of the two high sums. Each high adder has its
// own copy of the A/B high-bit registers. The top P bit pairs of the low half
// predict the low carry before it is computed:
//   g1: a_top + b_top >= 2^P       the carry will be 1 (for P = 1: a7 & b7)
//   g2: a_top + b_top <= 2^P - 2   the carry will be 0 (for P = 1: !a7 & !b7)
// On g1 the carry-0 adder's registers keep their old value; on g2 the
// carry-1 adder's do. The unused adder then does not switch and the
// multiplexer never selects it. The defaults are the document's 16-bit adder
// with an 8-bit low half and 8 predictor inputs (a7..a4, b7..b4).
//
// The carry-out of the most significant bit is not produced, as in the
// document's figure, so sum is A + B modulo 2^N.
//
// Timing: operands before edge k give sum after edge k+1. off0/off1 show,
// combinationally from the inputs, which high adder skips the coming edge.
// Reset is synchronous and active low (this design's choice).
module pc_csa #(
  parameter int unsigned N   = 16,
  parameter int unsigned LOW = 8,
  parameter int unsigned P   = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         off0,
  output logic         off1
);

  localparam int unsigned H = N - LOW;

  if (P == 0 || P > LOW || LOW >= N) begin : g_bad
    $error("pc_csa: need 1 <= P <= LOW < N");
  end

  logic [LOW-1:0] a_lo_q, b_lo_q;
  logic [H-1:0]   a_h0_q, b_h0_q;   // registers of the carry-0 adder
  logic [H-1:0]   a_h1_q, b_h1_q;   // registers of the carry-1 adder
  logic [P:0]     top_sum;
  logic [LOW:0]   lo_sum;
  logic [H-1:0]   hi_sum0, hi_sum1;

  assign top_sum = {1'b0, a[LOW-1 -: P]} + {1'b0, b[LOW-1 -: P]};
  assign off0    = top_sum >= (P+1)'(1 << P);
  assign off1    = top_sum <= (P+1)'((1 << P) - 2);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_lo_q <= '0;
      b_lo_q <= '0;
      a_h0_q <= '0;
      b_h0_q <= '0;
      a_h1_q <= '0;
      b_h1_q <= '0;
    end else begin
      a_lo_q <= a[LOW-1:0];
      b_lo_q <= b[LOW-1:0];
      if (!off0) begin
        a_h0_q <= a[N-1:LOW];
        b_h0_q <= b[N-1:LOW];
      end
      if (!off1) begin
        a_h1_q <= a[N-1:LOW];
        b_h1_q <= b[N-1:LOW];
      end
    end
  end

  assign lo_sum  = {1'b0, a_lo_q} + {1'b0, b_lo_q};
  assign hi_sum0 = a_h0_q + b_h0_q;
  assign hi_sum1 = a_h1_q + b_h1_q + H'(1);

  always_ff @(posedge clk) begin
    if (!rst_n) sum <= '0;
    else        sum <= {lo_sum[LOW] ? hi_sum1 : hi_sum0, lo_sum[LOW-1:0]};
  end

endmodule
