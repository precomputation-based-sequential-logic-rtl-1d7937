// pc_alu: eight-operation ALU partitioned so that only half of it switches in
// any cycle.
//
// Opcode {s0,s1,s2}: 000 add, 001 subtract (A-B), 010 shift left, 011 shift
// right, 100 AND, 101 OR, 110 XOR, 111 NOT (of A). The operations split on
// s0 into an arithmetic/shift block and a logic block, and each block has its
// own copy of the A/B input registers: the arithmetic copy loads only when
// s0 = 0, the logic copy only when s0 = 1, so the block not in use sees
// constant inputs. The opcode is registered with the operands. Each block
// offers two results picked by s2 (add/subtract and shift left/right;
// AND/OR and XOR/NOT) and a 4:1 multiplexer picks among the four by the
// registered {s0,s1}; an output register captures C.
//
// This design's own choices: the width (16), logical shifts by the low
// log2(W) bits of B, the way the 4:1 multiplexer is selected, and a
// synchronous active-low reset.
//
// Timing: a, b, op before edge k give c after edge k+1.
module pc_alu
  import pc_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_op_e      op,
  output logic [W-1:0] c
);

  localparam int unsigned SW = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] a_ar_q, b_ar_q;   // R1, R2: arithmetic/shift copy
  logic [W-1:0] a_lg_q, b_lg_q;   // R3, R4: logic copy
  alu_op_e      op_q;
  logic         s0_d;
  logic [W-1:0] addsub, shift, andor, xornot;
  logic [SW-1:0] sh_amt;

  assign s0_d = op[2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_ar_q <= '0;
      b_ar_q <= '0;
      a_lg_q <= '0;
      b_lg_q <= '0;
      op_q   <= OP_ADD;
    end else begin
      op_q <= op;
      if (!s0_d) begin
        a_ar_q <= a;
        b_ar_q <= b;
      end else begin
        a_lg_q <= a;
        b_lg_q <= b;
      end
    end
  end

  // +/- and shift block
  assign sh_amt = b_ar_q[SW-1:0];
  assign addsub = op_q[0] ? (a_ar_q - b_ar_q) : (a_ar_q + b_ar_q);
  assign shift  = op_q[0] ? (a_ar_q >> sh_amt) : (a_ar_q << sh_amt);

  // logic block
  assign andor  = op_q[0] ? (a_lg_q | b_lg_q) : (a_lg_q & b_lg_q);
  assign xornot = op_q[0] ? ~a_lg_q : (a_lg_q ^ b_lg_q);

  // R5
  always_ff @(posedge clk) begin
    if (!rst_n) c <= '0;
    else begin
      unique case (op_q[2:1])
        2'b00:   c <= addsub;
        2'b01:   c <= shift;
        2'b10:   c <= andor;
        default: c <= xornot;
      endcase
    end
  end

endmodule
