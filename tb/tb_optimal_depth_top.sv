// tb_optimal_depth_top -- end-to-end test of the top at its default sizes
// (64-bit adder with d = 2 and fan-in 4; 64-operand prefix-sum unit of 8-bit
// operands). Adder sums are checked against x + y and every prefix sum
// against a running total.
//
// It also counts how often each carry mechanism of the adder is exercised,
// using the group sizes of the hierarchy (level 1: s1 = ceil(log2 64) = 6,
// level 2: s2 = 3), and fails if any of them never happens:
//   carry_out       the sum overflows into z[64]
//   cross_top       a carry enters a level-1 group from the groups below it
//   through_top     a carry passes through a whole level-1 group
//   section_inner   a carry enters a level-2 subgroup that is not the first
//                   of its level-1 group, generated gen_inside that level-1 group
//   full_chain      a carry generated at bit 0 ripples out of bit 63
//   sum_wrap        a prefix sum wraps around modulo 256
module tb_optimal_depth_top;
  import prefix_pkg::*;

  localparam int unsigned N  = 64;
  localparam int unsigned PN = 64;
  localparam int unsigned PW = 8;
  localparam int unsigned S1 = level_size(N, 2, 1);
  localparam int unsigned S2 = level_size(N, 2, 2);

  logic [N-1:0]  add_x, add_y;
  logic [N:0]    add_z;
  logic [PW-1:0] ps_x [PN];
  logic [PW-1:0] ps_y [PN];

  optimal_depth_top dut (
    .add_x(add_x), .add_y(add_y), .add_z(add_z), .ps_x(ps_x), .ps_y(ps_y)
  );

  int checks = 0, failures = 0;
  int n_carry_out = 0, n_cross_top = 0, n_through_top = 0;
  int n_section_inner = 0, n_full_chain = 0, n_sum_wrap = 0;

  initial begin : watchdog
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic count_mechanisms(logic [N-1:0] x, logic [N-1:0] y);
    logic [N:0] s, c;
    logic [N-1:0] p, g;
    s = {1'b0, x} + {1'b0, y};
    c = s ^ {1'b0, x ^ y};          // c[i]: carry into bit i
    p = x ^ y;
    g = x & y;
    if (c[N]) n_carry_out++;
    if (g[0] && (&p[N-1:1])) n_full_chain++;
    for (int unsigned a = S1; a < N; a += S1) begin
      if (c[a]) n_cross_top++;
      if (c[a-S1] && (&p[a-1 -: S1])) n_through_top++;
    end
    for (int unsigned a = 0; a < N; a += S2) begin
      int unsigned top = (a / S1) * S1;
      if (a != top && c[a]) begin
        // carry generated at or above the start of the level-1 group
        logic gen_inside;
        gen_inside = 1'b0;
        for (int unsigned b = top; b < a; b++) begin
          logic run;
          run = g[b];
          for (int unsigned l = b + 1; l < a; l++) run &= p[l];
          gen_inside |= run;
        end
        if (gen_inside) n_section_inner++;
      end
    end
  endtask

  initial begin
    add_x = '0; add_y = '0;
    for (int i = 0; i < PN; i++) ps_x[i] = '0;
    for (int r = 0; r < 3000; r++) begin
      case (r % 4)
        0: begin add_x = {$urandom, $urandom}; add_y = {$urandom, $urandom}; end
        1: begin                      // mostly propagate positions
          add_x = {$urandom, $urandom};
          add_y = ~add_x;
          for (int k = 0; k < 3; k++) begin
            int unsigned b;
            b = $urandom_range(0, N - 1);
            add_y[b] = add_x[b];
          end
        end
        2: begin                      // carry from bit 0 through everything
          add_x = {$urandom, $urandom};
          add_y = ~add_x;
          add_x[0] = 1'b1; add_y[0] = 1'b1;
        end
        default: begin add_x = '1; add_y = N'($urandom_range(0, 3)); end
      endcase
      for (int i = 0; i < PN; i++) ps_x[i] = PW'($urandom);
      #1;
      count_mechanisms(add_x, add_y);
      checks++;
      if (add_z != ({1'b0, add_x} + {1'b0, add_y})) begin
        failures++;
        if (failures <= 5) $display("add %h + %h gave %h", add_x, add_y, add_z);
      end
      begin
        int unsigned total;
        total = 0;
        for (int i = 0; i < PN; i++) begin
          if (total + ps_x[i] >= (1 << PW)) n_sum_wrap++;
          total = (total + ps_x[i]) % (1 << PW);
          checks++;
          if (ps_y[i] != PW'(total)) begin
            failures++;
            if (failures <= 5) $display("prefix sum %0d: got %0d expected %0d", i, ps_y[i], total);
          end
        end
      end
    end
    $display("mechanisms: carry_out=%0d cross_top=%0d through_top=%0d section_inner=%0d full_chain=%0d sum_wrap=%0d",
             n_carry_out, n_cross_top, n_through_top, n_section_inner, n_full_chain, n_sum_wrap);
    if (n_carry_out == 0)     begin failures++; $display("never: carry_out"); end
    if (n_cross_top == 0)     begin failures++; $display("never: cross_top"); end
    if (n_through_top == 0)   begin failures++; $display("never: through_top"); end
    if (n_section_inner == 0) begin failures++; $display("never: section_inner"); end
    if (n_full_chain == 0)    begin failures++; $display("never: full_chain"); end
    if (n_sum_wrap == 0)      begin failures++; $display("never: sum_wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
