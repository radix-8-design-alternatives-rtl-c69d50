// csa: W-bit carry-save adder (3:2 compressor row).
//
// Reduces three vectors to two without carry propagation: each bit position
// is an independent full adder, so the delay is one full adder whatever W is.
//   vs[i] = x[i] ^ y[i] ^ c[i]          (sum vector)
//   vc[i] = majority(x[i], y[i], c[i])  (carry vector, weight 2^(i+1))
// so x + y + c == vs + (vc << 1) (exactly, over W+1 bits).
//
// The row of full adders, the port names X, Y, C, Vs, Vc and the 64-bit
// default width follow the paper's CSA figure; leaving Vc unshifted (the
// user shifts it) matches that figure, where full adder i drives Vc bit i.
// Purely combinational.
module csa #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] c,
  output logic [W-1:0] vs,
  output logic [W-1:0] vc
);

  always_comb begin
    vs = x ^ y ^ c;
    vc = (x & y) | (x & c) | (y & c);
  end

endmodule
