// pc_pkg: types and elaboration-time helpers shared by the precomputation
// circuits.
//
// The ALU opcode enum encodes the eight operations of the partitioned ALU as
// {s0,s1,s2}; s0 splits arithmetic/shift (0) from logic (1).
//
// The truth-table helpers let the generic architectures (pc_arch1, pc_arch2,
// pc_shannon) take any small Boolean function as a parameter. The predictor
// functions are built by universal quantification: for a function f of N
// inputs whose K most significant inputs form the predictor subset S,
//   g1(s) = AND over every assignment d of the other inputs of  f(s,d)
//   g2(s) = AND over every assignment d of the other inputs of !f(s,d)
// so g1 = 1 guarantees f = 1 and g2 = 1 guarantees f = 0, and no function of S
// alone covers more input conditions. All of this is evaluated at elaboration
// and costs no hardware beyond the resulting 2^K-entry tables.
package pc_pkg;

  // {s0,s1,s2}
  typedef enum logic [2:0] {
    OP_ADD = 3'b000,
    OP_SUB = 3'b001,
    OP_SHL = 3'b010,
    OP_SHR = 3'b011,
    OP_AND = 3'b100,
    OP_OR  = 3'b101,
    OP_XOR = 3'b110,
    OP_NOT = 3'b111
  } alu_op_e;

  localparam int unsigned TT_MAX_IN = 10;  // largest truth table: 2^10 entries
  localparam int unsigned TT_BITS   = 1 << TT_MAX_IN;

  typedef logic [TT_BITS-1:0] tt_t;

  // Truth table of the n-bit comparator a > b with the inputs interleaved
  // MSB first: index bits {a[n-1], b[n-1], ..., a[0], b[0]}.
  function automatic tt_t cmp_tt(int unsigned n);
    tt_t t = '0;
    for (int unsigned idx = 0; idx < (1 << (2 * n)); idx++) begin
      int unsigned a = 0, b = 0;
      for (int unsigned bit_i = 0; bit_i < n; bit_i++) begin
        a |= ((idx >> (2 * bit_i + 1)) & 1) << bit_i;
        b |= ((idx >> (2 * bit_i)) & 1) << bit_i;
      end
      t[idx] = (a > b);
    end
    return t;
  endfunction

  // Truth table of n-input odd parity.
  function automatic tt_t parity_tt(int unsigned n);
    tt_t t = '0;
    for (int unsigned idx = 0; idx < (1 << n); idx++)
      t[idx] = ^idx[TT_MAX_IN-1:0];
    return t;
  endfunction

  // Universal quantification over the N-K low inputs. With want = 1 the
  // result is g1 (f certainly 1), with want = 0 it is g2 (f certainly 0).
  // Entry s of the returned table is the predictor for top inputs s.
  function automatic tt_t quantify(tt_t t, int unsigned n, int unsigned k, bit want);
    tt_t g = '0;
    for (int unsigned s = 0; s < (1 << k); s++) begin
      bit all = 1'b1;
      for (int unsigned d = 0; d < (1 << (n - k)); d++)
        if (t[(s << (n - k)) | d] != want) all = 1'b0;
      g[s] = all;
    end
    return g;
  endfunction

  // Support of a function: bit i is 1 when flipping input i can change f.
  function automatic logic [TT_MAX_IN-1:0] support(tt_t t, int unsigned n);
    logic [TT_MAX_IN-1:0] sup = '0;
    for (int unsigned i = 0; i < n; i++)
      for (int unsigned idx = 0; idx < (1 << n); idx++)
        if (t[idx] != t[idx ^ (1 << i)]) sup[i] = 1'b1;
    return sup;
  endfunction

  // Default functions of the two-output duplication example, inputs
  // {x1,x2,x3,x4} (x1 most significant): f1 = majority(x1,x2,x3), which
  // depends on x1..x3, and f2 = x3 ^ x4, which shares x3 with f1.
  function automatic tt_t maj3_xor_tt(bit second);
    tt_t t = '0;
    for (int unsigned idx = 0; idx < 16; idx++) begin
      bit x1 = idx[3], x2 = idx[2], x3 = idx[1], x4 = idx[0];
      t[idx] = second ? (x3 ^ x4) : ((x1 & x2) | (x1 & x3) | (x2 & x3));
    end
    return t;
  endfunction

endpackage
