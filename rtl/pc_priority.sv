// pc_priority: registered n-input priority function with precomputation.
//
// Output f[i] is 1 when x[i] is 1 and every higher-priority input x[j], j < i,
// is 0; x[0] (x_1) has the highest priority. The K highest-priority inputs
// are loaded every cycle (R1). The other inputs (R2) are loaded only when all
// K of them are 0: if any is 1, the winner is among them and the
// lower-priority inputs cannot change any output, so R2 holds its value and
// the lower part of the priority logic does not switch. K = 1 is the
// document's single-inverter enable; the default K = 5 is its best 16-bit
// configuration.
//
// Timing: x presented before edge k gives f after edge k+1. Reset is
// synchronous and active low (this design's choice).
module pc_priority #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x,
  output logic [N-1:0] f,
  output logic         hold
);

  if (K == 0 || K >= N) begin : g_bad_k
    $error("pc_priority: K must be in 1..N-1");
  end

  logic [K-1:0]   hi_q;   // R1: x_1..x_K
  logic [N-K-1:0] lo_q;   // R2: x_K+1..x_N
  logic [N-1:0]   x_q;
  logic [N-1:0]   f_d;

  assign hold = |x[K-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hi_q <= '0;
      lo_q <= '0;
    end else begin
      hi_q <= x[K-1:0];
      if (!hold) lo_q <= x[N-1:K];
    end
  end

  assign x_q = {lo_q, hi_q};

  always_comb begin
    logic seen;
    seen = 1'b0;
    for (int i = 0; i < N; i++) begin
      f_d[i] = x_q[i] & ~seen;
      seen   = seen | x_q[i];
    end
  end

  // R3
  always_ff @(posedge clk) begin
    if (!rst_n) f <= '0;
    else        f <= f_d;
  end

endmodule
