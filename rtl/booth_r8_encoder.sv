// booth_r8_encoder: radix-8 Booth encoder and multiple selector for one
// group of the multiplier.
//
// The four recoding bits {b[i+2], b[i+1], b[i], b[i-1]} (overlapping the
// previous group by one bit) select a digit d in {-4..+4}:
//   0000,1111 -> 0     0001,0010 -> +A   0011,0100 -> +2A   0101,0110 -> +3A
//   0111      -> +4A   1000      -> -4A  1001,1010 -> -3A   1011,1100 -> -2A
//   1101,1110 -> -A
// i.e. d = -4*b[i+2] + 2*b[i+1] + b[i] + b[i-1]. This table is the paper's
// radix-8 encoding. 2A and 4A are wired shifts of A; the "hard" multiple 3A
// = 2A + A comes in precomputed so that one adder serves every group.
//
// Output pp = d * A as an (N+3)-bit two's-complement number. A negative
// digit is formed here as the full two's complement (invert and add one);
// that placement of the negation is this design's choice. Purely
// combinational. A is unsigned.
module booth_r8_encoder #(
  parameter int unsigned N = 64
) (
  input  logic [3:0]   grp,
  input  logic [N-1:0] a,
  input  logic [N+1:0] a3,
  output logic [N+2:0] pp,
  output logic         neg
);

  logic sel1, sel2, sel3, sel4;
  logic [N+2:0] mag;

  // Digit decode: sign and one-hot magnitude.
  always_comb begin
    {neg, sel1, sel2, sel3, sel4} = 5'b0_0000;
    unique case (grp)
      4'b0000, 4'b1111: ;
      4'b0001, 4'b0010: sel1 = 1'b1;
      4'b0011, 4'b0100: sel2 = 1'b1;
      4'b0101, 4'b0110: sel3 = 1'b1;
      4'b0111:          sel4 = 1'b1;
      4'b1000:          {neg, sel4} = 2'b11;
      4'b1001, 4'b1010: {neg, sel3} = 2'b11;
      4'b1011, 4'b1100: {neg, sel2} = 2'b11;
      4'b1101, 4'b1110: {neg, sel1} = 2'b11;
      default: ;
    endcase
  end

  // Multiple selection and conditional negation.
  always_comb begin
    mag = ({(N+3){sel1}} & {3'b000, a})
        | ({(N+3){sel2}} & {2'b00, a, 1'b0})
        | ({(N+3){sel3}} & {1'b0, a3})
        | ({(N+3){sel4}} & {1'b0, a, 2'b00});
    pp  = neg ? (~mag + 1'b1) : mag;
  end

endmodule
