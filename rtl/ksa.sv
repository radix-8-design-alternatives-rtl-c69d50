// ksa: W-bit Kogge-Stone parallel-prefix adder, sum = x + y + cin.
//
// Three stages, as for every parallel-prefix adder:
//   1. pre-processing: per bit p = x ^ y (propagate), g = x & y (generate);
//   2. carry network: log2(W+1) levels of prefix cells. At level k the pair
//      of position i is combined with the pair 2^k positions below it:
//        G = G_hi | (P_hi & G_lo),  P = P_hi & P_lo.
//      Where the lower pair already covers everything down to bit 0, only
//      the generate half is needed (the "G only" cell);
//   3. post-processing: s[i] = p[i] ^ c[i], c[i] = group generate of all
//      positions below i.
// cin enters as the generate of an extra position -1 below bit 0, so the
// network spans W+1 positions (this design's choice; the paper's KSA has a Cin
// pin but does not say how it is merged). Port names, the 64-bit default and
// the cell equations follow the paper. Purely combinational; the delay grows
// with log2(W).
module ksa #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned M      = W + 1;      // positions incl. the cin slot
  localparam int unsigned LEVELS = $clog2(M);

  // gen[k][j] / prp[k][j]: group generate/propagate of position j after
  // k prefix levels (position 0 is the cin slot, position i+1 is bit i).
  logic [M-1:0] gen [0:LEVELS];
  logic [M-1:0] prp [0:LEVELS];
  logic [W-1:0] p_bit;

  // Stage 1: pre-processing.
  always_comb begin
    p_bit     = x ^ y;
    gen[0]    = {x & y, cin};
    prp[0]    = {p_bit, 1'b0};
  end

  // Stage 2: Kogge-Stone prefix network. A position j >= 2D combines with a
  // partial prefix and needs the full P,G cell. A position D <= j < 2D
  // combines with a prefix that already reaches position 0, so only the
  // generate half is needed (G-only cell); its group propagate is 0 because
  // position 0, the cin slot, never propagates.
  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    localparam int unsigned D = 1 << k;
    for (genvar j = 0; j < M; j++) begin : g_pos
      if (j >= 2 * D) begin : g_pg_cell
        assign gen[k+1][j] = gen[k][j] | (prp[k][j] & gen[k][j-D]);
        assign prp[k+1][j] = prp[k][j] & prp[k][j-D];
      end else if (j >= D) begin : g_g_cell
        assign gen[k+1][j] = gen[k][j] | (prp[k][j] & gen[k][j-D]);
        assign prp[k+1][j] = 1'b0;
      end else begin : g_pass
        assign gen[k+1][j] = gen[k][j];
        assign prp[k+1][j] = prp[k][j];
      end
    end
  end

  // Stage 3: sum. Carry into bit i is the prefix generate of position i
  // (bits i-1 .. 0 and cin); the carry out is the prefix of position W.
  always_comb begin
    sum  = p_bit ^ gen[LEVELS][W-1:0];
    cout = gen[LEVELS][W];
  end

endmodule
