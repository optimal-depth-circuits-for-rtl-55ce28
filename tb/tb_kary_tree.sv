// tb_kary_tree -- self-checking test of the fan-in-K product tree: 23
// carry pairs through fan-in 3 (three gate levels, uneven last runs) and
// 17 bytes through fan-in 4 with addition, both against a left-to-right fold.
// The carry operator catches any reordering of operands.
module tb_kary_tree;
  import prefix_pkg::*;
  import prefix_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [1:0] ca [23];
  logic [1:0] cy;
  kary_tree #(.M(23), .K(3), .W(2), .OP(OP_CARRY)) u_carry (.a(ca), .y(cy));

  logic [7:0] sa [17];
  logic [7:0] sy;
  kary_tree #(.M(17), .K(4), .W(8), .OP(OP_ADD)) u_add (.a(sa), .y(sy));

  initial begin : watchdog
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2000; r++) begin
      logic [63:0] ec, es;
      for (int j = 0; j < 23; j++) begin
        int unsigned q;
        q = $urandom_range(0, 9);
        ca[j] = (q < 7) ? 2'b01 : (q < 8) ? 2'b11 : (q < 9) ? 2'b00 : 2'b10;
      end
      for (int j = 0; j < 17; j++) sa[j] = 8'($urandom);
      #1;
      ec = 64'(ca[0]);
      for (int j = 1; j < 23; j++) ec = ref_op(OP_CARRY, 2, ec, 64'(ca[j]));
      es = 64'(sa[0]);
      for (int j = 1; j < 17; j++) es = ref_op(OP_ADD, 8, es, 64'(sa[j]));
      checks += 2;
      if (64'(cy) != ec) begin
        failures++;
        if (failures <= 5) $display("carry tree: got %b expected %b", cy, ec[1:0]);
      end
      if (64'(sy) != es) begin
        failures++;
        if (failures <= 5) $display("add tree: got %h expected %h", sy, es[7:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
