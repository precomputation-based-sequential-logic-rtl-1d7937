// pc_cmp_stage: input registers plus C > D comparator, organised for
// precomputation (second architecture).
//
// The P most significant bits of C and D sit in a register that loads every
// cycle (R1). The remaining N-P bits sit in a register with a load enable
// (R2). The predictors look only at the top bits arriving at the register
// inputs:
//   g1 = C_top > D_top   (C > D whatever the low bits are)
//   g2 = C_top < D_top   (C < D whatever the low bits are)
// When g1 or g2 holds, R2 keeps its old contents at the next edge, so the low
// half of the comparator does not switch; the comparison of the registered
// values is still right because the top bits alone decide it. For P = 1 the
// enable is the XNOR of the two MSBs, as in the document's comparator; wider
// P extends it to the equality of the top P bits. P = 0 gives the plain
// comparator with every register loaded each cycle.
//
// Timing: c/d are sampled at a rising edge; gt is combinational from the
// registers and valid during the following cycle. hold is combinational from
// the inputs and tells whether the low register will skip the coming edge.
// Reset (synchronous, active low, clears the registers) is this design's
// choice.
module pc_cmp_stage #(
  parameter int unsigned N = 16,
  parameter int unsigned P = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] c,
  input  logic [N-1:0] d,
  output logic         gt,
  output logic         hold
);

  logic [N-1:0] c_q, d_q;

  if (P >= N) begin : g_bad_p
    $error("pc_cmp_stage: P must be below N");
  end

  if (P == 0) begin : g_plain
    assign hold = 1'b0;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        c_q <= '0;
        d_q <= '0;
      end else begin
        c_q <= c;
        d_q <= d;
      end
    end
  end else begin : g_pre
    logic [P-1:0]   c_top_q, d_top_q;   // R1
    logic [N-P-1:0] c_low_q, d_low_q;   // R2
    logic g1, g2;

    assign g1   = c[N-1 -: P] > d[N-1 -: P];
    assign g2   = c[N-1 -: P] < d[N-1 -: P];
    assign hold = g1 | g2;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        c_top_q <= '0;
        d_top_q <= '0;
        c_low_q <= '0;
        d_low_q <= '0;
      end else begin
        c_top_q <= c[N-1 -: P];
        d_top_q <= d[N-1 -: P];
        if (!hold) begin
          c_low_q <= c[N-P-1:0];
          d_low_q <= d[N-P-1:0];
        end
      end
    end

    assign c_q = {c_top_q, c_low_q};
    assign d_q = {d_top_q, d_low_q};
  end

  assign gt = c_q > d_q;

endmodule
