// tb_wallace_csa_tree: self-checking test of the CSA Wallace tree.
// The 22-operand, 128-bit tree (default) and a 10-operand, 16-bit tree get
// random operands (and all-ones, which forces carries out of the top bit);
// vs + vc must equal the sum of the operands modulo 2^W. The depth must be
// 7 levels for 22 operands and 5 for 10 (10-7-5-4-3-2).
module tb_wallace_csa_tree;
  localparam int NOP = 22;
  localparam int W   = 128;
  int checks = 0, failures = 0;

  logic [W-1:0] ops [NOP];
  logic [W-1:0] vs, vc;
  logic [15:0]  ops10 [10];
  logic [15:0]  vs10, vc10;

  wallace_csa_tree dut (.ops(ops), .vs(vs), .vc(vc));
  wallace_csa_tree #(.NOP(10), .W(16)) dut10 (.ops(ops10), .vs(vs10), .vc(vc10));

  task automatic check();
    logic [W-1:0] acc;
    logic [15:0]  acc10;
    #1;
    acc = '0;
    for (int i = 0; i < NOP; i++) acc += ops[i];
    acc10 = '0;
    for (int i = 0; i < 10; i++) acc10 += ops10[i];
    checks += 2;
    if (W'(vs + vc) != acc) begin
      failures++; $display("FAIL tree22 vs+vc=%h exp=%h", W'(vs + vc), acc);
    end
    if (16'(vs10 + vc10) != acc10) begin
      failures++; $display("FAIL tree10 vs+vc=%h exp=%h", 16'(vs10 + vc10), acc10);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks += 2;
    if (dut.LEVELS != 7)   begin failures++; $display("FAIL levels22=%0d", dut.LEVELS); end
    if (dut10.LEVELS != 5) begin failures++; $display("FAIL levels10=%0d", dut10.LEVELS); end
    for (int i = 0; i < NOP; i++) ops[i] = '1;
    for (int i = 0; i < 10; i++) ops10[i] = '1;
    check();
    for (int i = 0; i < NOP; i++) ops[i] = '0;
    for (int i = 0; i < 10; i++) ops10[i] = '0;
    check();
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < NOP; i++)
        ops[i] = {$urandom(), $urandom(), $urandom(), $urandom()};
      for (int i = 0; i < 10; i++) ops10[i] = 16'($urandom());
      // a single nonzero operand at a rotating position checks the routing
      if (n % 8 == 0) begin
        for (int i = 0; i < NOP; i++) if (i != (n / 8) % NOP) ops[i] = '0;
      end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
