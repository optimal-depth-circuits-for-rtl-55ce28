// adder_harness -- drives one prefix_adder configuration with corner-case
// and random operands and compares z with the arithmetic sum x + y.
// Random operands are drawn so that long carry chains are common: each bit
// position is a propagate position (x_i != y_i) with high probability.
module adder_harness #(
  parameter int unsigned N      = 64,
  parameter int unsigned D      = 2,
  parameter int unsigned K      = 4,
  parameter int unsigned ROUNDS = 2000
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  logic [N-1:0] x, y;
  logic [N:0]   z;

  prefix_adder #(.N(N), .D(D), .K(K)) dut (.x(x), .y(y), .z(z));

  initial begin
    done = 1'b0; checks = 0; failures = 0; x = '0; y = '0;
    wait (start);
    for (int r = 0; r < ROUNDS; r++) begin
      case (r)
        0: begin x = '0; y = '0; end
        1: begin x = '1; y = '1; end
        2: begin x = '1; y = N'(1); end
        3: begin x = '1; y = '0; end
        default: begin
          for (int i = 0; i < N; i++) begin
            int unsigned q;
            q = $urandom_range(0, 15);
            x[i] = 1'($urandom);
            y[i] = (q < 13) ? ~x[i] : x[i];
          end
          if (r % 2 == 1) begin
            for (int i = 0; i < N; i++) begin x[i] = 1'($urandom); y[i] = 1'($urandom); end
          end
        end
      endcase
      #1;
      checks++;
      if (z != ({1'b0, x} + {1'b0, y})) begin
        failures++;
        if (failures <= 5)
          $display("adder N=%0d D=%0d K=%0d: %h + %h gave %h", N, D, K, x, y, z);
      end
    end
    done = 1'b1;
  end
endmodule
