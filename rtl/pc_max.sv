// pc_max: registered MAX(K, L) built so that its comparator is precomputable.
//
// The operands are registered twice. R1 (K) and R4 (L) load every cycle and
// feed a 2:1 multiplexer. A second copy feeds a K > L comparator through
// pc_cmp_stage, whose low-order bits are loaded only when the top P bits of
// the incoming K and L are equal. The registers are duplicated because the
// comparator's low-order registers hold stale values in some cycles, which
// must never reach the output. The comparator output selects R1 (1) or R4
// (0); ties pick L, which equals K. An output register (R5) captures F.
//
// Timing: operands before edge k give F after edge k+1. Reset is
// synchronous and active low (this design's choice).
module pc_max #(
  parameter int unsigned N = 16,
  parameter int unsigned P = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] k,
  input  logic [N-1:0] l,
  output logic [N-1:0] f,
  output logic         hold
);

  logic [N-1:0] k_q, l_q;   // R1, R4
  logic         gt;

  pc_cmp_stage #(.N(N), .P(P)) u_cmp (
    .clk, .rst_n, .c(k), .d(l), .gt, .hold
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k_q <= '0;
      l_q <= '0;
      f   <= '0;
    end else begin
      k_q <= k;
      l_q <= l;
      f   <= gt ? k_q : l_q;  // R5
    end
  end

endmodule
