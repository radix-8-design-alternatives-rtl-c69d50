// wcbm_pkg: types and constants shared by the Wallace-tree radix-8 Booth
// multiplier (WCBM) blocks.
//
// - wcbm_state_e: the five controller states. The names follow the
//   multiplier's state diagram: an idle/reset state, one state per phase
//   (partial-product generation, CSA tree, Kogge-Stone adder) and an output
//   state. The binary encoding is this design's choice.
// - booth_num_pp(): number of radix-8 Booth groups needed for an unsigned
//   n-bit multiplier operand, ceil((n+1)/3). One bit above the operand must be
//   covered so that the top group is non-negative; this gives 22 groups for
//   64-bit operands and 11 for 32-bit ones.
// - csa_next_count() / csa_tree_levels(): operand count after one level of a
//   Wallace tree of 3:2 carry-save adders, and the number of levels needed to
//   reach two vectors (7 for 22 operands).
package wcbm_pkg;

  typedef enum logic [2:0] {
    ST_SET_RESET = 3'd0,
    ST_BOOTH_MUL = 3'd1,
    ST_CSA_TREE  = 3'd2,
    ST_KSA       = 3'd3,
    ST_OUTPUT    = 3'd4
  } wcbm_state_e;

  function automatic int booth_num_pp(input int n);
    return (n + 1 + 2) / 3;
  endfunction

  // Each full group of three operands becomes two; leftovers pass through.
  function automatic int csa_next_count(input int n);
    return 2 * (n / 3) + (n % 3);
  endfunction

  function automatic int csa_tree_levels(input int n);
    int cnt;
    int lv;
    cnt = n;
    lv  = 0;
    while (cnt > 2) begin
      cnt = csa_next_count(cnt);
      lv++;
    end
    return lv;
  endfunction

  // Operand count entering level lv (level 0 = the tree inputs).
  function automatic int csa_count_at(input int n, input int lv);
    int cnt;
    cnt = n;
    for (int i = 0; i < lv; i++) cnt = csa_next_count(cnt);
    return cnt;
  endfunction

endpackage
