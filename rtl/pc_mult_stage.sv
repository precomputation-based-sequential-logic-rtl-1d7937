// pc_mult_stage: stage I of the pipelined array multiplier, precomputed on
// its multiplier bit b_i.
//
// A plain stage would AND A with b_i, shift the result by I and add it to the
// incoming partial product. Here, when b_i is 0, the partial product passes
// through unchanged, so the Add/Shift block need not evaluate at all. b_i
// is the load enable of the registers feeding the Add/Shift block (partial
// product and A), and duplicate registers that always load carry the partial
// product to the bypass leg of a multiplexer and A to the next stage. The
// registered b_i selects between the sum (1) and the bypassed partial
// product (0). The multiplexer replaces the AND gates of the plain stage.
//
// Timing: b_i, pp_in and a_in are sampled at an edge; pp_out is
// combinational from this stage's registers and is registered by the next
// stage (or the product register). a_out is the always-loaded copy of A.
// active is the registered b_i. Reset is synchronous and active low (this
// design's choice).
module pc_mult_stage #(
  parameter int unsigned N = 4,
  parameter int unsigned I = 0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           b_i,
  input  logic [2*N-1:0] pp_in,
  input  logic [N-1:0]   a_in,
  output logic [2*N-1:0] pp_out,
  output logic [N-1:0]   a_out,
  output logic           active
);

  if (I >= N) begin : g_bad
    $error("pc_mult_stage: I must be below N");
  end

  logic [2*N-1:0] pp_le_q, pp_q;
  logic [N-1:0]   a_le_q, a_q;
  logic [2*N-1:0] addshift;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active  <= 1'b0;
      pp_le_q <= '0;
      pp_q    <= '0;
      a_le_q  <= '0;
      a_q     <= '0;
    end else begin
      active <= b_i;
      pp_q   <= pp_in;
      a_q    <= a_in;
      if (b_i) begin
        pp_le_q <= pp_in;
        a_le_q  <= a_in;
      end
    end
  end

  assign addshift = pp_le_q + ((2*N)'(a_le_q) << I);
  assign pp_out   = active ? addshift : pp_q;
  assign a_out    = a_q;

endmodule
