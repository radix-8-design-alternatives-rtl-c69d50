// tb_csa: self-checking test of the carry-save adder.
// Drives random and corner vectors into a 64-bit and a 5-bit instance and
// checks, bit by bit, that vs is the xor and vc the majority of the three
// inputs, and that x + y + c == vs + 2*vc as a whole number.
module tb_csa;
  localparam int W = 64;
  int checks = 0, failures = 0;

  logic [W-1:0] x, y, c, vs, vc;
  logic [4:0]   xs, ys, cs, vss, vcs;

  csa #(.W(W)) dut   (.x(x),  .y(y),  .c(c),  .vs(vs),  .vc(vc));
  csa #(.W(5)) dut_s (.x(xs), .y(ys), .c(cs), .vs(vss), .vc(vcs));

  function automatic logic [W-1:0] rnd64();
    return {$urandom(), $urandom()};
  endfunction

  task automatic check64();
    logic [W+1:0] ref_sum, got_sum;
    int bad;
    #1;
    bad = 0;
    for (int i = 0; i < W; i++) begin
      int ones;
      ones = int'(x[i]) + int'(y[i]) + int'(c[i]);
      if (vs[i] != ones[0] || vc[i] != (ones >= 2)) bad++;
    end
    ref_sum = (W+2)'(x) + (W+2)'(y) + (W+2)'(c);
    got_sum = (W+2)'(vs) + ((W+2)'(vc) << 1);
    checks++;
    if (bad != 0 || ref_sum != got_sum) begin
      failures++;
      $display("FAIL csa x=%h y=%h c=%h vs=%h vc=%h", x, y, c, vs, vc);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; y = '0; c = '0; check64();
    x = '1; y = '1; c = '1; check64();
    x = '1; y = '0; c = '0; check64();
    x = '1; y = '1; c = '0; check64();
    for (int n = 0; n < 300; n++) begin
      x = rnd64(); y = rnd64(); c = rnd64();
      check64();
    end
    // exhaustive on a 5-bit row for the single-position truth table
    for (int v = 0; v < 8; v++) begin
      xs = {5{v[0]}}; ys = {5{v[1]}}; cs = {5{v[2]}};
      #1;
      checks++;
      if (vss != {5{v[0] ^ v[1] ^ v[2]}} ||
          vcs != {5{(v[0] & v[1]) | (v[0] & v[2]) | (v[1] & v[2])}}) begin
        failures++;
        $display("FAIL csa truth table v=%0d vs=%b vc=%b", v, vss, vcs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
