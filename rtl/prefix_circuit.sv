// prefix_circuit -- all prefixes y[i] = x[0] o x[1] o ... o x[i], i = 0..N-1,
// of an associative operator OP, built from gates of fan-in K with a
// hierarchy parameter D (1..4) that trades depth against wiring.
//
// How it works. The inputs are split into consecutive groups, each group into
// smaller consecutive groups, and so on down to single inputs. The group size
// at level l+1 is F_{D-1}(size at level l), starting from N at level 0:
//   D = 1 : halves at every level (N/2, N/4, ..., 1)
//   D = 2 : ceil(log2) at every level (log N, log log N, ..., 1)
//   D = 3 : log* at every level, D = 4 : log** (see prefix_pkg).
// There are L = F_D(N) levels below the whole input. The circuit then has
// three stages:
//   1. Group products. The product of every group at levels 1..L-1 is taken
//      straight from the inputs by a fan-in-K tree (depth at most
//      ceil(log_K s_1)).
//   2. Prefixes inside each group. For every group (and for the whole input
//      at level 0) the prefixes over its child-group products are formed by
//      a prefix circuit of parameter D-1, instantiated recursively. For D = 1
//      a group has at most two children, and both of their prefixes are
//      already group products, so this stage is wiring only.
//   3. Final combination. y[i] is the product of at most L of these
//      prefixes: at every level where i's group is not the first child of
//      its parent, the prefix through the previous sibling, and at the last
//      level the prefix through input i itself. One fan-in-K tree of depth
//      ceil(log_K L) per output does this.
// The dominant depth is stage 2 at level 0, the recursive circuit over the
// N/s_1 largest groups, on top of the stage-1 depth ceil(log_K s_1).
//
// The group hierarchy and the three stages follow the document's
// construction. This design's choices: integer ceilings in every logarithm,
// a short last group where a size does not divide, group products taken
// directly from the inputs (no sharing between levels), and D limited to 4.
//
// Interface: x[N] in, y[N] out, W bits each. Purely combinational.
//
// Lint note: the module instantiates itself with D-1. When Verilator lints it
// as its own top it reports sub_y as undriven and sub_x as unused in the top
// instance; the recursive instance does drive and read them (the testbenches
// check every output), and linting any module that instantiates this one
// shows no such warning.
module prefix_circuit
  import prefix_pkg::*;
#(
  parameter int unsigned N  = 64,
  parameter int unsigned D  = 2,
  parameter int unsigned K  = 4,
  parameter int unsigned W  = 2,
  parameter op_e         OP = OP_CARRY
) (
  input  logic [W-1:0] x [N],
  output logic [W-1:0] y [N]
);

  localparam int unsigned L = num_levels(N, D);

  if (D < 1 || D > MAX_D) begin : g_bad_d
    $error("prefix_circuit: D must be in 1..%0d", MAX_D);
  end

  // Number of parts in the final product of output p.
  function automatic int unsigned comp_count(int unsigned p);
    int unsigned c = 1;
    for (int unsigned l = 0; l + 1 < L; l++)
      if (grp_start(N, D, l + 1, p) != grp_start(N, D, l, p)) c++;
    return c;
  endfunction

  // Level of the j-th part (leftmost first) of output p.
  function automatic int unsigned comp_level(int unsigned p, int unsigned j);
    int unsigned c = 0;
    for (int unsigned l = 0; l + 1 < L; l++)
      if (grp_start(N, D, l + 1, p) != grp_start(N, D, l, p)) begin
        if (c == j) return l;
        c++;
      end
    return L - 1;
  endfunction

  // Index into pre[] of the j-th part of output p.
  function automatic int unsigned comp_index(int unsigned p, int unsigned j);
    int unsigned l = comp_level(p, j);
    if (l == L - 1) return p;
    return grp_start(N, D, l + 1, p) - level_size(N, D, l + 1);
  endfunction

  if (N == 1) begin : g_single
    assign y[0] = x[0];
  end else begin : g_prefix
    // grp[l][a] : product of the level-l group that starts at input a
    // pre[l][q] : product from the start of a level-l group through the end
    //             of its child (level l+1) group that starts at q
    logic [W-1:0] grp [L+1][N];
    logic [W-1:0] pre [L][N];

    // ---- stage 1: group products ----------------------------------------
    for (genvar l = 0; l <= L; l++) begin : g_lvl
      for (genvar a = 0; a < N; a++) begin : g_grp
        localparam int unsigned ST = grp_start(N, D, l, a);
        localparam int unsigned EN = grp_end(N, D, l, a);
        // the whole input is only needed as a group when it has two inputs
        localparam bit NEEDED = (l == L) || (l > 0) || (D == 1 && L == 1);
        if (l == L) begin : g_leaf
          assign grp[l][a] = x[a];
        end else if (ST == a && NEEDED && EN - a == 1) begin : g_one
          assign grp[l][a] = x[a];
        end else if (ST == a && NEEDED) begin : g_tree
          logic [W-1:0] members [EN-a];
          for (genvar j = 0; j < EN - a; j++) begin : g_m
            assign members[j] = x[a+j];
          end
          kary_tree #(.M(EN-a), .K(K), .W(W), .OP(OP)) u_prod (
            .a(members), .y(grp[l][a])
          );
        end else begin : g_none
          assign grp[l][a] = '0;
        end
      end
    end

    // ---- stage 2: prefixes of the child groups inside every group -------
    for (genvar l = 0; l < L; l++) begin : g_in
      localparam int unsigned SC = level_size(N, D, l + 1);
      for (genvar a = 0; a < N; a++) begin : g_par
        localparam int unsigned ST  = grp_start(N, D, l, a);
        localparam int unsigned EN  = grp_end(N, D, l, a);
        localparam int unsigned NCH = (EN - a + SC - 1) / SC;
        if (grp_start(N, D, l + 1, a) != a) begin : g_nochild
          assign pre[l][a] = '0;
        end
        if (ST != a) begin : g_notparent
        end else if (NCH == 1) begin : g_onechild
          assign pre[l][a] = grp[l+1][a];
        end else if (D == 1) begin : g_halves
          if (NCH != 2) begin : g_bad
            $error("prefix_circuit: halving produced %0d children", NCH);
          end
          assign pre[l][a]    = grp[l+1][a];
          assign pre[l][a+SC] = grp[l][a];
        end else begin : g_sub
          logic [W-1:0] sub_x [NCH];
          logic [W-1:0] sub_y [NCH];
          for (genvar j = 0; j < NCH; j++) begin : g_c
            assign sub_x[j]          = grp[l+1][a+j*SC];
            assign pre[l][a+j*SC]    = sub_y[j];
          end
          prefix_circuit #(.N(NCH), .D(D-1), .K(K), .W(W), .OP(OP)) u_sub (
            .x(sub_x), .y(sub_y)
          );
        end
      end
    end

    // ---- stage 3: combine at most L prefixes per output -----------------
    for (genvar p = 0; p < N; p++) begin : g_out
      localparam int unsigned MP = comp_count(p);
      logic [W-1:0] parts [MP];
      for (genvar j = 0; j < MP; j++) begin : g_part
        localparam int unsigned LV = comp_level(p, j);
        localparam int unsigned IX = comp_index(p, j);
        assign parts[j] = pre[LV][IX];
      end
      kary_tree #(.M(MP), .K(K), .W(W), .OP(OP)) u_comb (
        .a(parts), .y(y[p])
      );
    end
  end

endmodule
