// tb_prefix_circuit -- self-checking test of prefix_circuit in several
// configurations: every hierarchy parameter D = 1..4, fan-ins 2..5, sizes
// that are and are not powers of two, and all four operators (the carry
// operator is not commutative, so operand order is checked too).
module tb_prefix_circuit;
  import prefix_pkg::*;

  localparam int NH = 6;
  logic start;
  logic done [NH];
  int   c [NH];
  int   f [NH];
  int   checks, failures;

  prefix_harness #(.N(16),  .D(1), .K(2), .W(2), .OP(OP_CARRY)) h0 (start, done[0], c[0], f[0]);
  prefix_harness #(.N(64),  .D(2), .K(4), .W(8), .OP(OP_ADD))   h1 (start, done[1], c[1], f[1]);
  prefix_harness #(.N(37),  .D(2), .K(5), .W(2), .OP(OP_CARRY)) h2 (start, done[2], c[2], f[2]);
  prefix_harness #(.N(100), .D(3), .K(3), .W(6), .OP(OP_MAX))   h3 (start, done[3], c[3], f[3]);
  prefix_harness #(.N(20),  .D(4), .K(2), .W(5), .OP(OP_XOR))   h4 (start, done[4], c[4], f[4]);
  prefix_harness #(.N(45),  .D(1), .K(3), .W(2), .OP(OP_CARRY)) h5 (start, done[5], c[5], f[5]);

  initial begin : watchdog
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    start = 1'b0;
    #1 start = 1'b1;
    for (int i = 0; i < NH; i++) wait (done[i]);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
