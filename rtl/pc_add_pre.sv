// pc_add_pre: first pipeline step of the two-cycle precomputed add-compare
// and add-maximum circuits: four operand registers, two adders, and the
// predictors of (C + D) > (X + Y).
//
// The top PA bits of each operand are loaded every cycle; the low N-PA bits
// are loaded only when the parent enables them (le_cd for C and D, le_xy for
// X and Y). With Sc = C_top + D_top and Sx = X_top + Y_top, the low bits can
// add at most 2*(2^(N-PA) - 1) to either sum, so
//   g1 = (Sc >= Sx + 2)   guarantees C + D > X + Y
//   g2 = (Sx >= Sc + 2)   guarantees C + D <= X + Y
// whatever the low bits are. For PA = 1 these are
//   g1 = C<n-1> D<n-1> !X<n-1> !Y<n-1>,  g2 = !C<n-1> !D<n-1> X<n-1> Y<n-1>.
// The sums are N+1 bits wide so that the carry-out takes part in the
// comparison.
//
// Timing: g1/g2 are combinational from the inputs (they decide the enables
// for the coming edge); k = C+D and l = X+Y are combinational from the
// registers. Reset is synchronous and active low (this design's choice).
module pc_add_pre #(
  parameter int unsigned N  = 16,
  parameter int unsigned PA = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] c,
  input  logic [N-1:0] d,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         le_cd,
  input  logic         le_xy,
  output logic         g1,
  output logic         g2,
  output logic [N:0]   k,
  output logic [N:0]   l
);

  if (PA == 0 || PA >= N) begin : g_bad
    $error("pc_add_pre: PA must be in 1..N-1");
  end

  localparam int unsigned LO = N - PA;

  logic [PA+1:0] sc, sx;
  logic [N-1:0]  c_q, d_q, x_q, y_q;

  assign sc = (PA+2)'(c[N-1 -: PA]) + (PA+2)'(d[N-1 -: PA]);
  assign sx = (PA+2)'(x[N-1 -: PA]) + (PA+2)'(y[N-1 -: PA]);
  assign g1 = sc >= sx + (PA+2)'(2);
  assign g2 = sx >= sc + (PA+2)'(2);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_q <= '0;
      d_q <= '0;
      x_q <= '0;
      y_q <= '0;
    end else begin
      c_q[N-1:LO] <= c[N-1:LO];
      d_q[N-1:LO] <= d[N-1:LO];
      x_q[N-1:LO] <= x[N-1:LO];
      y_q[N-1:LO] <= y[N-1:LO];
      if (le_cd) begin
        c_q[LO-1:0] <= c[LO-1:0];
        d_q[LO-1:0] <= d[LO-1:0];
      end
      if (le_xy) begin
        x_q[LO-1:0] <= x[LO-1:0];
        y_q[LO-1:0] <= y[LO-1:0];
      end
    end
  end

  assign k = (N+1)'(c_q) + (N+1)'(d_q);
  assign l = (N+1)'(x_q) + (N+1)'(y_q);

endmodule
