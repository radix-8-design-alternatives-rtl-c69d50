// wallace_csa_tree: Wallace tree of carry-save adders, NOP operands -> 2.
//
// Every level takes the operands it receives in threes, reduces each triple
// with one W-bit csa to a sum vector and a carry vector (the carry shifted up
// one place), and passes the one or two operands left over unchanged to the
// next level. For 22 operands the counts per level are
// 22 -> 15 -> 10 -> 7 -> 5 -> 4 -> 3 -> 2, i.e. 7 levels, the depth the paper
// gives for its 22-operand tree. For 10 operands the counts are
// 10 -> 7 -> 5 -> 4 -> 3 -> 2 (5 levels), the signal groups of the paper's
// 10-operand diagram. The two outputs still have to be added by a
// carry-propagate adder (a KSA in the multiplier).
//
// Arithmetic is modulo 2^W: a carry shifted out of bit W-1 is dropped at each
// level. For the product of two N-bit numbers with W = 2N this cannot change
// the result, since the true sum fits in W bits. With three or more operands
// bit 0 of vc is always zero (a shifted carry vector). Purely combinational.
module wallace_csa_tree
  import wcbm_pkg::*;
#(
  parameter int unsigned NOP = 22,
  parameter int unsigned W   = 128
) (
  input  logic [W-1:0] ops [NOP],
  output logic [W-1:0] vs,
  output logic [W-1:0] vc
);

  localparam int unsigned LEVELS = csa_tree_levels(NOP);

  // Level l reads cur (the tree inputs for l = 0, otherwise the previous
  // level's nxt) and drives nxt; only the first csa_count_at(NOP, l + 1)
  // entries of nxt carry operands, the rest are tied to zero. The carry bit
  // shifted out of each csa row (c[W-1]) is the dropped mod-2^W carry.
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned CNT  = csa_count_at(NOP, l);
    localparam int unsigned NG   = CNT / 3;
    localparam int unsigned REST = CNT % 3;
    localparam int unsigned NEXT = 2 * NG + REST;

    logic [W-1:0] cur [NOP];
    logic [W-1:0] nxt [NOP];

    if (l == 0) begin : g_first
      assign cur = ops;
    end else begin : g_chain
      assign cur = g_lvl[l-1].nxt;
    end

    for (genvar g = 0; g < NG; g++) begin : g_csa
      logic [W-1:0] s, c;
      csa #(.W(W)) u_csa (
        .x  (cur[3*g]),
        .y  (cur[3*g+1]),
        .c  (cur[3*g+2]),
        .vs (s),
        .vc (c)
      );
      assign nxt[2*g]   = s;
      assign nxt[2*g+1] = {c[W-2:0], 1'b0};
    end
    for (genvar r = 0; r < REST; r++) begin : g_pass
      assign nxt[2*NG+r] = cur[3*NG+r];
    end
    for (genvar z = NEXT; z < NOP; z++) begin : g_zero
      assign nxt[z] = '0;
    end
  end

  if (LEVELS == 0) begin : g_trivial
    // One or two operands: nothing to reduce.
    assign vs = ops[0];
    if (NOP > 1) begin : g_two
      assign vc = ops[1];
    end else begin : g_one
      assign vc = '0;
    end
  end else begin : g_out
    assign vs = g_lvl[LEVELS-1].nxt[0];
    assign vc = g_lvl[LEVELS-1].nxt[1];
  end

endmodule
