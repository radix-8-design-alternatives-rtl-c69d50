// wcbm_ctrl: controller of the Wallace-tree radix-8 Booth multiplier.
//
// A five-state machine (states named after the multiplier's state diagram):
//   ST_SET_RESET  idle, ready = 1. When enable is high the operands are
//                 captured (ld_operands) and the machine moves on.
//   ST_BOOTH_MUL  partial products are generated; ld_pp registers them.
//   ST_CSA_TREE   the Wallace tree reduces them; ld_tree registers the two
//                 vectors.
//   ST_KSA        the Kogge-Stone adder resolves them; ld_sum registers sum.
//   ST_OUTPUT     ack = 1. Stays while enable is high, returns to
//                 ST_SET_RESET when enable falls.
// Each phase takes exactly one clock, so ack rises three clocks after the edge
// that accepts enable. The state names, the forward chain and the self-loops
// on the first and last state follow the paper's diagram; the arc conditions
// (enable, fall of enable), the meaning of ready and ack, and the synchronous
// active-high reset are this design's choices, since the paper does not give
// them. reset returns the machine to ST_SET_RESET from any state.
module wcbm_ctrl
  import wcbm_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        enable,
  output wcbm_state_e state,
  output logic        ld_operands,
  output logic        ld_pp,
  output logic        ld_tree,
  output logic        ld_sum,
  output logic        ready,
  output logic        ack
);

  wcbm_state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_SET_RESET: if (enable) state_d = ST_BOOTH_MUL;
      ST_BOOTH_MUL: state_d = ST_CSA_TREE;
      ST_CSA_TREE:  state_d = ST_KSA;
      ST_KSA:       state_d = ST_OUTPUT;
      ST_OUTPUT:    if (!enable) state_d = ST_SET_RESET;
      default:      state_d = ST_SET_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) state_q <= ST_SET_RESET;
    else       state_q <= state_d;
  end

  always_comb begin
    state       = state_q;
    ready       = (state_q == ST_SET_RESET);
    ack         = (state_q == ST_OUTPUT);
    ld_operands = (state_q == ST_SET_RESET) && enable && !reset;
    ld_pp       = (state_q == ST_BOOTH_MUL) && !reset;
    ld_tree     = (state_q == ST_CSA_TREE)  && !reset;
    ld_sum      = (state_q == ST_KSA)       && !reset;
  end

  // The phases always run in order.
  property p_phase_order;
    @(posedge clk) disable iff (reset)
      state_q == ST_BOOTH_MUL |=> state_q == ST_CSA_TREE ##1 state_q == ST_KSA
                                  ##1 state_q == ST_OUTPUT;
  endproperty
  assert property (p_phase_order);

endmodule
