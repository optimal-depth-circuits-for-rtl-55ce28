// tb_kgate -- self-checking test of one fan-in-K gate. The carry-operator
// gate (K = 4, 8 input bits) is checked exhaustively; the addition, XOR and
// maximum gates (K = 5, 7-bit operands) with random operands. Expected
// values come from a left-to-right fold of the binary operator.
module tb_kgate;
  import prefix_pkg::*;
  import prefix_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [1:0] ca [4];
  logic [1:0] cy;
  kgate #(.K(4), .W(2), .OP(OP_CARRY)) u_carry (.a(ca), .y(cy));

  logic [6:0] va [5];
  logic [6:0] ya, yx, ym;
  kgate #(.K(5), .W(7), .OP(OP_ADD)) u_add (.a(va), .y(ya));
  kgate #(.K(5), .W(7), .OP(OP_XOR)) u_xor (.a(va), .y(yx));
  kgate #(.K(5), .W(7), .OP(OP_MAX)) u_max (.a(va), .y(ym));

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 5) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [63:0] e;
    for (int v = 0; v < 256; v++) begin
      for (int j = 0; j < 4; j++) ca[j] = 2'(v >> (2 * j));
      #1;
      e = 64'(ca[0]);
      for (int j = 1; j < 4; j++) e = ref_op(OP_CARRY, 2, e, 64'(ca[j]));
      check("carry", 64'(cy), e);
    end
    for (int r = 0; r < 500; r++) begin
      logic [63:0] ea, ex, em;
      for (int j = 0; j < 5; j++) va[j] = 7'($urandom);
      #1;
      ea = 64'(va[0]); ex = ea; em = ea;
      for (int j = 1; j < 5; j++) begin
        ea = ref_op(OP_ADD, 7, ea, 64'(va[j]));
        ex = ref_op(OP_XOR, 7, ex, 64'(va[j]));
        em = ref_op(OP_MAX, 7, em, 64'(va[j]));
      end
      check("add", 64'(ya), ea);
      check("xor", 64'(yx), ex);
      check("max", 64'(ym), em);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
