// tb_prefix_adder -- self-checking test of the AND-OR adder: the default
// 64-bit, d = 2, fan-in 4 adder, and smaller adders with d = 1, 3 and 4 and
// odd fan-ins, each against the arithmetic sum.
module tb_prefix_adder;
  localparam int NH = 4;
  logic start;
  logic done [NH];
  int   c [NH];
  int   f [NH];
  int   checks = 0, failures = 0;

  adder_harness #(.N(64), .D(2), .K(4)) h0 (start, done[0], c[0], f[0]);
  adder_harness #(.N(32), .D(1), .K(2)) h1 (start, done[1], c[1], f[1]);
  adder_harness #(.N(50), .D(3), .K(3)) h2 (start, done[2], c[2], f[2]);
  adder_harness #(.N(24), .D(4), .K(5)) h3 (start, done[3], c[3], f[3]);

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
    for (int i = 0; i < NH; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
