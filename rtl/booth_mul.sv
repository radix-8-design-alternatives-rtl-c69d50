// booth_mul: 64-bit Wallace-tree CSA-based radix-8 Booth multiplier (WCBM).
//
// Computes the 128-bit product sum = x * y of two unsigned N-bit operands in
// three one-clock phases:
//   1. Booth phase: y is recoded into 22 radix-8 digits in {-4..4}; each
//      selects 0, x, 2x, 3x or 4x (negated for negative digits) and is
//      aligned into a 2N-bit partial product (booth_pp_gen).
//   2. Tree phase: a 7-level Wallace tree of carry-save adders reduces the 22
//      partial products to a sum vector and a carry vector
//      (wallace_csa_tree).
//   3. KSA phase: a 2N-bit Kogge-Stone adder adds the two vectors. Its carry
//      out is dropped: the redundant pair may sum past 2N bits, but the
//      product itself never does.
// The result of each phase is registered, so the longest path is one phase.
//
// Interface (names as in the paper's top-level view): clk, reset, enable,
// x, y in; sum, ack, ready out. Protocol (this design's choice): while ready
// is high, raising enable starts an operation and x, y are captured on that
// clock edge. ack rises three clocks later with sum valid, and stays high,
// with sum held, as long as enable is high. Dropping enable returns the unit
// to ready. reset is synchronous, active high, and clears sum and the FSM.
// Operands are unsigned, which is how the paper's sample run reads.
module booth_mul
  import wcbm_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           enable,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] sum,
  output logic           ack,
  output logic           ready
);

  localparam int unsigned NPP = booth_num_pp(N);
  localparam int unsigned W   = 2 * N;

  wcbm_state_e state;
  logic ld_operands, ld_pp, ld_tree, ld_sum;

  logic [N-1:0]   x_q, y_q;
  logic [W-1:0]   pp_d [NPP];
  logic [W-1:0]   pp_q [NPP];
  logic [NPP-1:0] pp_neg;
  logic [W-1:0]   vs_d, vc_d, vs_q, vc_q;
  logic [W-1:0]   sum_d;
  logic           ksa_cout;

  wcbm_ctrl u_ctrl (
    .clk         (clk),
    .reset       (reset),
    .enable      (enable),
    .state       (state),
    .ld_operands (ld_operands),
    .ld_pp       (ld_pp),
    .ld_tree     (ld_tree),
    .ld_sum      (ld_sum),
    .ready       (ready),
    .ack         (ack)
  );

  // Phase 1: Booth partial products (x is the multiplicand, y is recoded).
  booth_pp_gen #(.N(N), .NPP(NPP)) u_ppgen (
    .a   (x_q),
    .b   (y_q),
    .pp  (pp_d),
    .neg (pp_neg)
  );

  // Phase 2: Wallace CSA tree.
  wallace_csa_tree #(.NOP(NPP), .W(W)) u_tree (
    .ops (pp_q),
    .vs  (vs_d),
    .vc  (vc_d)
  );

  // Phase 3: Kogge-Stone carry-propagate adder; carry out discarded.
  ksa #(.W(W)) u_ksa (
    .x    (vs_q),
    .y    (vc_q),
    .cin  (1'b0),
    .sum  (sum_d),
    .cout (ksa_cout)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      x_q  <= '0;
      y_q  <= '0;
      vs_q <= '0;
      vc_q <= '0;
      sum  <= '0;
      for (int i = 0; i < NPP; i++) pp_q[i] <= '0;
    end else begin
      if (ld_operands) begin
        x_q <= x;
        y_q <= y;
      end
      if (ld_pp) begin
        for (int i = 0; i < NPP; i++) pp_q[i] <= pp_d[i];
      end
      if (ld_tree) begin
        vs_q <= vs_d;
        vc_q <= vc_d;
      end
      if (ld_sum) sum <= sum_d;
    end
  end

  // The result only changes in the KSA phase; ack never rises outside it.
  assert property (@(posedge clk) disable iff (reset)
                   $rose(ack) |-> $past(state) == ST_KSA);

endmodule
