// optimal_depth_top -- the two circuits side by side: an N-bit AND-OR adder
// (prefix_adder) and a stand-alone prefix circuit over PN operands of PW bits
// for the associative operator POP (default: addition modulo 2^PW, so
// ps_y[i] is the running sum of ps_x[0..i]).
//
// Both circuits share the fan-in K and the hierarchy parameter D. The adder
// runs the carry operator through the same prefix construction, so the
// stand-alone unit is the general form of the adder's carry network.
// Widths and operator of the stand-alone unit are this design's choice; the
// document fixes no sizes. Purely combinational: outputs follow inputs after
// the gate delay, there is no clock.
module optimal_depth_top
  import prefix_pkg::*;
#(
  parameter int unsigned N   = 64,
  parameter int unsigned D   = 2,
  parameter int unsigned K   = 4,
  parameter int unsigned PN  = 64,
  parameter int unsigned PW  = 8,
  parameter op_e         POP = OP_ADD
) (
  input  logic [N-1:0]  add_x,
  input  logic [N-1:0]  add_y,
  output logic [N:0]    add_z,
  input  logic [PW-1:0] ps_x [PN],
  output logic [PW-1:0] ps_y [PN]
);

  prefix_adder #(.N(N), .D(D), .K(K)) u_adder (
    .x(add_x), .y(add_y), .z(add_z)
  );

  prefix_circuit #(.N(PN), .D(D), .K(K), .W(PW), .OP(POP)) u_prefix (
    .x(ps_x), .y(ps_y)
  );

endmodule
