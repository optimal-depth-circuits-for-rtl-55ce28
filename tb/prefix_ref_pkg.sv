// prefix_ref_pkg -- reference model for the testbenches: the binary form of
// each operator, applied one operand at a time from the left. It shares no
// code with the circuits under test.
package prefix_ref_pkg;
  import prefix_pkg::*;

  // a o b on values of up to 64 bits, w bits wide, a being the left factor
  function automatic logic [63:0] ref_op(op_e op, int unsigned w,
                                         logic [63:0] a, logic [63:0] b);
    logic [63:0] mask, r;
    mask = (w >= 64) ? '1 : ((64'd1 << w) - 64'd1);
    case (op)
      // a is the less significant part: G = g_b | p_b g_a, P = p_a p_b
      OP_CARRY: r = {62'd0, b[1] | (b[0] & a[1]), a[0] & b[0]};
      OP_ADD:   r = a + b;
      OP_XOR:   r = a ^ b;
      default:  r = (a > b) ? a : b;
    endcase
    return r & mask;
  endfunction
endpackage
