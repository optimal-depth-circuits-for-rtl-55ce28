// kary_tree -- ordered product of M operands with fan-in-K gates.
//
// y = a[0] o a[1] o ... o a[M-1]. The operands are cut into consecutive runs
// of K, each run goes through one kgate, and the ceil(M/K) results are reduced
// the same way by a smaller instance of this module, so the tree has
// ceil(log_K M) gate levels (prefix_pkg::clog_k). Order is preserved at every
// level, which the non-commutative carry operator needs.
//
// This is the "circuit of depth ceil(log_k m)" that the prefix construction
// uses for group products and for the final combination of partial
// products; the document states its depth, the run-by-run shape is this
// design's choice. Purely combinational.
//
// Lint note: the module instantiates itself for the next level. Linted as
// its own top, it is reported with y undriven and mid unused in the top
// instance; the recursive instance does drive y and read
// mid (the testbenches check y), and linting any module that instantiates
// this one shows no such warning.
module kary_tree
  import prefix_pkg::*;
#(
  parameter int unsigned M  = 8,
  parameter int unsigned K  = 4,
  parameter int unsigned W  = 2,
  parameter op_e         OP = OP_CARRY
) (
  input  logic [W-1:0] a [M],
  output logic [W-1:0] y
);

  if (K < 2) begin : g_bad_k
    $error("kary_tree: fan-in K must be at least 2");
  end

  if (M == 1) begin : g_wire
    assign y = a[0];
  end else if (M <= K) begin : g_one
    kgate #(.K(M), .W(W), .OP(OP)) u_gate (.a(a), .y(y));
  end else begin : g_tree
    localparam int unsigned R = (M + K - 1) / K;   // gates in this level
    logic [W-1:0] mid [R];
    for (genvar r = 0; r < R; r++) begin : g_run
      localparam int unsigned LO = r * K;
      localparam int unsigned HI = (LO + K < M) ? LO + K : M;
      logic [W-1:0] run_in [HI-LO];
      for (genvar j = 0; j < HI - LO; j++) begin : g_in
        assign run_in[j] = a[LO+j];
      end
      kgate #(.K(HI-LO), .W(W), .OP(OP)) u_gate (.a(run_in), .y(mid[r]));
    end
    kary_tree #(.M(R), .K(K), .W(W), .OP(OP)) u_next (.a(mid), .y(y));
  end

endmodule
