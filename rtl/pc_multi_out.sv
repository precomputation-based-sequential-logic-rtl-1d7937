// pc_multi_out: second precomputation architecture for a multiple-output
// function in which only a subset of the outputs is precomputed, with the
// register and logic duplication this requires.
//
// Each of the M outputs f_i is an N-input truth table (TTS[i]). The outputs
// whose bit is set in SEL form the precomputed set G. For each of them the
// predictors g1_i and g2_i on the K most significant inputs (the set S) are
// built by universal quantification at elaboration, and the registers of
// the other inputs that G reads are loaded only when
//   g = AND over i in G of (g1_i | g2_i)
// is 0, i.e. unless every output in G is already known. An output outside G
// that reads one of those disabled inputs would see a stale value, so it
// reads a second, always-loaded copy of the register instead, and its logic
// is separate from that of G. Only the inputs in (support(G) - S) and in
// support(F - G) need both copies; copies nothing reads are removed by
// synthesis. The default is a two-output example on {x1,x2,x3,x4}:
// f1 = majority(x1,x2,x3) is precomputed from x1, x2 and f2 = x3 ^ x4 is
// not, so the x3 register is duplicated. The functions, the truth-table form
// and the choice of the top K inputs are this design's.
//
// Timing: x before edge k gives f after edge k+1. hold is combinational
// from the inputs. Reset is synchronous and active low (this design's
// choice).
module pc_multi_out
  import pc_pkg::*;
#(
  parameter int unsigned          N   = 4,
  parameter int unsigned          M   = 2,
  parameter int unsigned          K   = 2,
  parameter logic [M-1:0]         SEL = 2'b01,
  parameter logic [M-1:0][TT_BITS-1:0] TTS = {maj3_xor_tt(1'b1), maj3_xor_tt(1'b0)}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x,
  output logic [M-1:0] f,
  output logic         hold
);

  if (N > TT_MAX_IN || K == 0 || K >= N) begin : g_bad
    $error("pc_multi_out: need 1 <= K < N <= TT_MAX_IN");
  end

  // inputs read by the precomputed outputs G
  function automatic logic [N-1:0] support_g();
    logic [N-1:0] s = '0;
    for (int i = 0; i < M; i++)
      if (SEL[i]) s |= N'(support(TTS[i], N));
    return s;
  endfunction

  localparam logic [N-1:0] SUP_G = support_g();

  logic [K-1:0]   hi_q;     // R1: predictor inputs S, always loaded
  logic [N-K-1:0] lo_en_q;  // R2: other inputs, load-enabled, read by G
  logic [N-K-1:0] lo_q;     // duplicate of R2, always loaded, read by F - G
  logic [N-K-1:0] lo_g;     // inputs as seen by G
  logic [M-1:0]   known;    // g1_i | g2_i per output
  logic [M-1:0]   f_d;

  for (genvar i = 0; i < M; i++) begin : g_out
    localparam tt_t G1_FULL = quantify(TTS[i], N, K, 1'b1);
    localparam tt_t G2_FULL = quantify(TTS[i], N, K, 1'b0);
    localparam logic [2**K-1:0] G1_T = G1_FULL[2**K-1:0];
    localparam logic [2**K-1:0] G2_T = G2_FULL[2**K-1:0];
    localparam logic [2**N-1:0] F_T  = TTS[i][2**N-1:0];

    if (SEL[i]) begin : g_pre
      assign known[i] = G1_T[x[N-1 -: K]] | G2_T[x[N-1 -: K]];
      assign f_d[i]   = F_T[{hi_q, lo_g}];
    end else begin : g_dup
      assign known[i] = 1'b1;
      assign f_d[i]   = F_T[{hi_q, lo_q}];
    end
  end

  assign hold = (SEL != '0) && (&known);

  // G reads the load-enabled copy for the inputs in its support; the others
  // do not affect G, so the always-loaded copy is used for them.
  for (genvar j = 0; j < N - K; j++) begin : g_sel
    assign lo_g[j] = SUP_G[j] ? lo_en_q[j] : lo_q[j];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hi_q    <= '0;
      lo_en_q <= '0;
      lo_q    <= '0;
      f       <= '0;
    end else begin
      hi_q <= x[N-1 -: K];
      lo_q <= x[N-K-1:0];
      if (!hold) lo_en_q <= x[N-K-1:0];
      f <= f_d;
    end
  end

endmodule
