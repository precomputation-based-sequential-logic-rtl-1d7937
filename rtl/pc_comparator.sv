// pc_comparator: registered n-bit comparator f = C > D with precomputation
// logic (second precomputation architecture).
//
// pc_cmp_stage holds the operands: the top P bits of C and D load every
// cycle, the low N-P bits load only when the top bits of the incoming C and D
// are equal. An output register (R3) captures the comparison. The default
// sizes are the document's 16-bit comparator with 8 of its 32 inputs (four
// bit pairs) in the precomputation logic, its best configuration.
//
// Timing: operands presented before rising edge k give f after edge k+1.
// hold is high in cycles where the low-order registers will not load.
// Reset is synchronous and active low (this design's choice).
module pc_comparator #(
  parameter int unsigned N = 16,
  parameter int unsigned P = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] c,
  input  logic [N-1:0] d,
  output logic         f,
  output logic         hold
);

  logic gt;

  pc_cmp_stage #(.N(N), .P(P)) u_stage (
    .clk, .rst_n, .c, .d, .gt, .hold
  );

  // R3
  always_ff @(posedge clk) begin
    if (!rst_n) f <= 1'b0;
    else        f <= gt;
  end

endmodule
