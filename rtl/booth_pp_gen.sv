// booth_pp_gen: parallel radix-8 Booth partial-product generator.
//
// Splits the unsigned multiplier b into NPP = ceil((N+1)/3) overlapping
// groups of four bits, {b[3i+2], b[3i+1], b[3i], b[3i-1]} with b[-1] = 0 and
// zeros above bit N-1 (22 groups for N = 64, the count the paper gives), and
// feeds each to a booth_r8_encoder. The hard multiple 3A = 2A + A is formed
// once by a Kogge-Stone adder and shared by all encoders.
//
// Partial product i is the encoder's (N+3)-bit two's-complement result,
// sign-extended to 2N bits and shifted left by 3i, dropping bits above 2N-1.
// The sum of all pp[i] modulo 2^(2N) is a*b, which fits in 2N bits. Full
// sign extension (instead of a sign-encoding trick) is this design's choice.
// The low 3i bits of pp[i] are constant zero; synthesis removes them.
// Purely combinational; the multiplier registers the outputs.
module booth_pp_gen
  import wcbm_pkg::*;
#(
  parameter int unsigned N   = 64,
  parameter int unsigned NPP = booth_num_pp(N)
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] pp  [NPP],
  output logic [NPP-1:0] neg
);

  localparam int unsigned BW = 3 * NPP + 1;   // b with b[-1] and zero padding

  logic [N+1:0] a3;
  logic         a3_cout;
  logic [BW-1:0] b_ext;

  // 3A = 2A + A
  ksa #(.W(N + 2)) u_ksa_3a (
    .x    ({1'b0, a, 1'b0}),
    .y    ({2'b00, a}),
    .cin  (1'b0),
    .sum  (a3),
    .cout (a3_cout)
  );

  assign b_ext = {{(BW - N - 1){1'b0}}, b, 1'b0};

  for (genvar i = 0; i < NPP; i++) begin : g_grp
    logic [N+2:0]   pp_raw;
    logic [2*N-1:0] pp_ext;

    booth_r8_encoder #(.N(N)) u_enc (
      .grp (b_ext[3*i +: 4]),
      .a   (a),
      .a3  (a3),
      .pp  (pp_raw),
      .neg (neg[i])
    );

    assign pp_ext = {{(2*N - N - 3){pp_raw[N+2]}}, pp_raw};
    assign pp[i]  = pp_ext << (3 * i);
  end

  // 2A + A never exceeds N+2 bits, so the adder's carry out is always 0.
  always_comb assert (a3_cout == 1'b0) else $error("3A overflow");

endmodule
