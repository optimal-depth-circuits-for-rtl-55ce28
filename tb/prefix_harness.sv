// prefix_harness -- drives one prefix_circuit configuration with ROUNDS
// input vectors and compares every output with a left-to-right fold of the
// inputs. Vectors: all-identity-like, all-maximum, then random; for the carry
// operator the random pairs lean towards propagate so long carry chains occur.
// Runs when start rises; raises done with its check and failure counts.
module prefix_harness
  import prefix_pkg::*;
  import prefix_ref_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned D      = 1,
  parameter int unsigned K      = 2,
  parameter int unsigned W      = 2,
  parameter op_e         OP     = OP_CARRY,
  parameter int unsigned ROUNDS = 200
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  logic [W-1:0] x [N];
  logic [W-1:0] y [N];

  prefix_circuit #(.N(N), .D(D), .K(K), .W(W), .OP(OP)) dut (.x(x), .y(y));

  function automatic logic [W-1:0] rand_operand();
    int unsigned r;
    r = $urandom_range(0, 9);
    if (OP == OP_CARRY)
      return (r < 6) ? W'(2'b01) : (r < 8) ? W'(2'b11) : (r < 9) ? W'(2'b00) : W'(2'b10);
    return W'({$urandom, $urandom});
  endfunction

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    for (int i = 0; i < N; i++) x[i] = '0;
    wait (start);
    for (int r = 0; r < ROUNDS; r++) begin
      for (int i = 0; i < N; i++)
        x[i] = (r == 0) ? '0 : (r == 1) ? '1 : rand_operand();
      #1;
      begin
        logic [63:0] acc;
        for (int i = 0; i < N; i++) begin
          acc = (i == 0) ? 64'(x[0]) : ref_op(OP, W, acc, 64'(x[i]));
          checks++;
          if (64'(y[i]) != acc) begin
            failures++;
            if (failures <= 5)
              $display("prefix N=%0d D=%0d K=%0d op=%0d: y[%0d]=%h expected %h",
                       N, D, K, OP, i, y[i], acc[W-1:0]);
          end
        end
      end
    end
    done = 1'b1;
  end
endmodule
