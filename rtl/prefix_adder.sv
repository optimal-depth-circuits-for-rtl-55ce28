// prefix_adder -- AND-OR adder of two N-bit numbers, z = x + y (N+1 bits),
// whose depth is log_K N + o(log_K N) + O(1) with gates of fan-in K.
//
// Phase 1   p_i = x_i | y_i (carry-propagate), g_i = x_i & y_i
//           (carry-generate), one layer of OR and one of AND gates.
// Phases 2-5 run the carry operator
//           (g_a,p_a) o (g_b,p_b) = (g_b | p_b & g_a, p_a & p_b)
//           through prefix_circuit with hierarchy parameter D:
//   Phase 2  level-D groups (for D = 2: sizes log N, log log N, ..., 1) get
//            their group-carry-propagate P and group-carry-generate G;
//   Phase 3  inside every group, and across the largest groups, the child
//            groups are split again by the next lower level (for D = 2 the
//            binary level-1 groups) and their P and G are formed;
//   Phase 4  section-carry-propagates and -generates: the carry into each
//            group from the groups below it inside the same parent;
//   Phase 5  carry c_{i+1} = G_{i:0}, the product of at most L section
//            values per bit.
// Phase 6   z_i = (c_i & (x_i XNOR y_i)) | (~c_i & (x_i XOR y_i)), z_N = c_N.
//
// The phases and the group sizes follow the document. This design's choices:
// no carry-in (c_0 = 0), the carry output is z[N], and Phases 2-5 share the
// same recursive prefix circuit that serves Theorem 2.1, so the section values
// are the prefixes that circuit forms.
//
// Interface: x, y in; z out. Purely combinational.
module prefix_adder
  import prefix_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned D = 2,
  parameter int unsigned K = 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N:0]   z
);

  // Phase 1: carry-propagate and carry-generate, packed as {g, p}
  logic [1:0] gp [N];
  always_comb begin
    for (int unsigned i = 0; i < N; i++) gp[i] = {x[i] & y[i], x[i] | y[i]};
  end

  // Phases 2-5: GP[i] = (G_{i:0}, P_{i:0})
  logic [1:0] GP [N];
  prefix_circuit #(.N(N), .D(D), .K(K), .W(2), .OP(OP_CARRY)) u_carry (
    .x(gp), .y(GP)
  );

  // carries: c[0] = 0, c[i+1] = G_{i:0}
  logic [N:0] c;
  always_comb begin
    c[0] = 1'b0;
    for (int unsigned i = 0; i < N; i++) c[i+1] = GP[i][1];
  end

  // Phase 6: sum bits
  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      z[i] = (c[i] & ~(x[i] ^ y[i])) | (~c[i] & (x[i] ^ y[i]));
    z[N] = c[N];
  end

endmodule
