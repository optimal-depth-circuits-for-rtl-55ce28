// prefix_pkg -- operators and elaboration-time arithmetic shared by the
// prefix circuit, its gate trees and the adder.
//
// op_e selects the associative operator "o" that a gate computes. Operand
// order matters (the carry operator is not commutative): operand 0 is the
// leftmost factor of the product, i.e. the earliest input of the prefix.
//   OP_CARRY : 2-bit {g,p} carry pairs. (g_a,p_a) o (g_b,p_b) =
//              (g_b | p_b & g_a, p_a & p_b), a being the less significant part.
//   OP_ADD   : addition modulo 2^W (prefix sums).
//   OP_XOR   : bitwise exclusive or (prefix parity).
//   OP_MAX   : unsigned maximum (running maximum).
// The document allows any associative operator with a gate available; these
// four are this design's selection.
//
// The functions below build the group hierarchy of the prefix circuit. They
// are iterative because recursive constant functions are not portable.
//   iter_f(j, n) : F_0(n) = ceil(n/2); F_j(n) = number of times F_{j-1} must
//                  be applied to n to reach a value <= 1. So F_1 = ceil(log2),
//                  F_2 = log*, F_3 = log**, F_4 = log*** (with integer
//                  ceilings at every step).
//   level_size   : size of the groups at hierarchy level l for a prefix
//                  circuit of parameter d over n inputs: s_0 = n,
//                  s_{l+1} = F_{d-1}(s_l).
//   num_levels   : number of levels below the whole input, F_d(n).
//   grp_start / grp_end : first and one-past-last input of the level-l group
//                  that holds input p. Groups are consecutive chunks of
//                  size s_l inside their parent; the last chunk may be short.
//   clog_k       : ceil(log_k m), the depth of a fan-in-k tree over m inputs.
package prefix_pkg;

  typedef enum logic [1:0] {
    OP_CARRY = 2'd0,
    OP_ADD   = 2'd1,
    OP_XOR   = 2'd2,
    OP_MAX   = 2'd3
  } op_e;

  // Largest hierarchy parameter d supported by iter_f.
  localparam int unsigned MAX_D = 4;

  function automatic int unsigned f0(int unsigned n);
    return (n + 1) / 2;
  endfunction

  function automatic int unsigned f1(int unsigned n);
    int unsigned v = n, c = 0;
    while (v > 1) begin v = f0(v); c++; end
    return c;
  endfunction

  function automatic int unsigned f2(int unsigned n);
    int unsigned v = n, c = 0;
    while (v > 1) begin v = f1(v); c++; end
    return c;
  endfunction

  function automatic int unsigned f3(int unsigned n);
    int unsigned v = n, c = 0;
    while (v > 1) begin v = f2(v); c++; end
    return c;
  endfunction

  function automatic int unsigned f4(int unsigned n);
    int unsigned v = n, c = 0;
    while (v > 1) begin v = f3(v); c++; end
    return c;
  endfunction

  function automatic int unsigned iter_f(int unsigned j, int unsigned n);
    case (j)
      0:       return f0(n);
      1:       return f1(n);
      2:       return f2(n);
      3:       return f3(n);
      default: return f4(n);
    endcase
  endfunction

  function automatic int unsigned level_size(int unsigned n, int unsigned d,
                                             int unsigned l);
    int unsigned s = n;
    for (int unsigned i = 0; i < l; i++) s = iter_f(d - 1, s);
    return s;
  endfunction

  function automatic int unsigned num_levels(int unsigned n, int unsigned d);
    return iter_f(d, n);
  endfunction

  function automatic int unsigned grp_start(int unsigned n, int unsigned d,
                                            int unsigned l, int unsigned p);
    int unsigned st = 0;
    for (int unsigned i = 1; i <= l; i++) begin
      int unsigned s = level_size(n, d, i);
      st = st + ((p - st) / s) * s;
    end
    return st;
  endfunction

  function automatic int unsigned grp_end(int unsigned n, int unsigned d,
                                          int unsigned l, int unsigned p);
    int unsigned st = 0, en = n;
    for (int unsigned i = 1; i <= l; i++) begin
      int unsigned s = level_size(n, d, i);
      st = st + ((p - st) / s) * s;
      if (st + s < en) en = st + s;
    end
    return en;
  endfunction

  function automatic int unsigned clog_k(int unsigned m, int unsigned k);
    int unsigned v = 1, c = 0;
    while (v < m) begin v = v * k; c++; end
    return c;
  endfunction

endpackage
