// pc_array_mult: pipelined N x N unsigned array multiplier in which every
// stage is precomputed on its multiplier bit.
//
// Stage i (pc_mult_stage) adds A shifted left by i to the running partial
// product when b_i = 1 and otherwise passes the partial product through with
// its adder inputs frozen. The stages form a pipeline, one register level
// each; bit b_i travels down a chain of i registers so that it reaches stage
// i together with the partial product it applies to, and the last stage
// feeds the product register. Stage 0 is the same precomputed stage with a
// zero partial product. The default N = 4 is the document's example size.
//
// Timing: A and B before edge k give P after edge k+N; a new pair can enter
// every cycle. Reset is synchronous and active low (this design's choice).
module pc_array_mult #(
  parameter int unsigned N = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p,
  output logic [N-1:0]   active
);

  logic [2*N-1:0] pp [N+1];
  logic [N-1:0]   av [N+1];
  // bq[i] holds the bits of B still needed, delayed i cycles
  logic [N-1:0]   bq [N];

  assign pp[0] = '0;
  assign av[0] = a;
  assign bq[0] = b;

  for (genvar i = 1; i < N; i++) begin : g_bdelay
    always_ff @(posedge clk) begin
      if (!rst_n) bq[i] <= '0;
      else        bq[i] <= bq[i-1];
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_stage
    pc_mult_stage #(.N(N), .I(i)) u_stage (
      .clk, .rst_n,
      .b_i   (bq[i][i]),
      .pp_in (pp[i]),
      .a_in  (av[i]),
      .pp_out(pp[i+1]),
      .a_out (av[i+1]),
      .active(active[i])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) p <= '0;
    else        p <= pp[N];
  end

endmodule
