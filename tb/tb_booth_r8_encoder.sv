// tb_booth_r8_encoder: self-checking test of one radix-8 Booth encoder.
// For every one of the 16 recoding patterns and many multiplicands (random,
// zero and all-ones) the output is compared with d * A, where the digit is
// computed arithmetically as d = -4*b3 + 2*b2 + b1 + b0 and the product is
// formed by the simulator in 67-bit signed arithmetic. The neg flag must be
// set exactly when d < 0.
module tb_booth_r8_encoder;
  localparam int N = 64;
  int checks = 0, failures = 0;

  logic [3:0]   grp;
  logic [N-1:0] a;
  logic [N+1:0] a3;
  logic [N+2:0] pp;
  logic         neg;

  booth_r8_encoder #(.N(N)) dut (.grp(grp), .a(a), .a3(a3), .pp(pp), .neg(neg));

  task automatic check();
    int d;
    logic signed [N+2:0] expect_pp;
    a3 = 3 * (N+2)'(a);
    #1;
    d = -4 * int'(grp[3]) + 2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
    expect_pp = (N+3)'(signed'(d)) * signed'({3'b000, a});
    checks++;
    if (pp != expect_pp || neg != (d < 0)) begin
      failures++;
      $display("FAIL enc grp=%b d=%0d a=%h pp=%h exp=%h neg=%b", grp, d, a, pp, expect_pp, neg);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 16; g++) begin
      grp = 4'(g);
      a = '0; check();
      a = '1; check();
      a = 64'd1; check();
      for (int n = 0; n < 40; n++) begin
        a = {$urandom(), $urandom()};
        check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
