// kgate -- one gate of fan-in K for the associative operator OP.
//
// The prefix and addition circuits are built from gates that each combine at
// most k operands. This module is one such gate: y = a[0] o a[1] o ... o
// a[K-1], operand 0 being the leftmost (earliest) factor. For the carry
// operator the gate is the two-level AND-OR form of a group carry:
//   G = OR_j ( g_j AND p_{j+1} AND ... AND p_{K-1} ),   P = AND_j p_j
// with bit 1 of each operand holding g and bit 0 holding p; operand K-1 is
// the most significant. Other operators use their plain K-input form.
//
// Purely combinational, no clock. The operator set is this design's choice;
// the document assumes only that a gate for the operator exists.
module kgate
  import prefix_pkg::*;
#(
  parameter int unsigned K  = 4,
  parameter int unsigned W  = 2,
  parameter op_e         OP = OP_CARRY
) (
  input  logic [W-1:0] a [K],
  output logic [W-1:0] y
);

  if (OP == OP_CARRY && W != 2) begin : g_bad_width
    $error("kgate: OP_CARRY needs W == 2");
  end

  always_comb begin
    y = '0;
    unique case (OP)
      OP_CARRY: begin
        logic g, p, run;
        g = 1'b0;
        p = 1'b1;
        for (int unsigned j = 0; j < K; j++) begin
          // term j: g_j propagated through every more significant operand
          run = a[j][1];
          for (int unsigned l = j + 1; l < K; l++) run = run & a[l][0];
          g = g | run;
          p = p & a[j][0];
        end
        y = W'({g, p});
      end
      OP_ADD: begin
        for (int unsigned j = 0; j < K; j++) y = y + a[j];
      end
      OP_XOR: begin
        for (int unsigned j = 0; j < K; j++) y = y ^ a[j];
      end
      OP_MAX: begin
        for (int unsigned j = 0; j < K; j++) if (a[j] > y) y = a[j];
      end
    endcase
  end

endmodule
