// tb_pc_alu: self-checking test of the partitioned ALU. Random operands and
// opcodes every cycle; C is compared two cycles later with the operation
// computed here from the opcode table. Every opcode must be exercised, and
// both halves of the ALU must be switched off in some cycles (the
// arithmetic half on logic opcodes and vice versa).
module tb_pc_alu;
  import pc_pkg::*;
  localparam int unsigned W = 16, LAT = 2, CYC = 4000;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] a = '0, b = '0, c;
  alu_op_e op = OP_ADD;
  int checks = 0, failures = 0;
  int op_seen [8];
  logic [W-1:0] exp_q [CYC];

  pc_alu #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] ref_alu(logic [W-1:0] x, logic [W-1:0] y, logic [2:0] o);
    int unsigned sh = y % W;
    case (o)
      3'b000: return x + y;
      3'b001: return x - y;
      3'b010: return x << sh;
      3'b011: return x >> sh;
      3'b100: return x & y;
      3'b101: return x | y;
      3'b110: return x ^ y;
      default: return ~x;
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < CYC; t++) begin
      @(negedge clk);
      if (t >= LAT) begin
        checks++;
        if (c !== exp_q[t-LAT]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: C=%h expected %h", t, c, exp_q[t-LAT]);
        end
      end
      a = W'($urandom);
      b = W'($urandom);
      op = alu_op_e'($urandom % 8);
      op_seen[op]++;
      exp_q[t] = ref_alu(a, b, op);
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (op_seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
