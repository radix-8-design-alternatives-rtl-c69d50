// tb_wcbm_ctrl: self-checking test of the multiplier controller.
// Checks the reset state, that enable starts the phase sequence
// BOOTH_MUL -> CSA_TREE -> KSA -> OUTPUT one clock each with exactly the
// matching load strobe, that OUTPUT holds while enable stays high and
// returns to SET_RESET when it falls, that the machine waits in SET_RESET
// without enable, and that reset aborts an operation in every state.
module tb_wcbm_ctrl;
  import wcbm_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, reset, enable;
  wcbm_state_e state;
  logic ld_operands, ld_pp, ld_tree, ld_sum, ready, ack;

  wcbm_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic expect_state(input wcbm_state_e s, input string what);
    logic [5:0] strobes, exp_strobes;
    strobes = {ld_operands, ld_pp, ld_tree, ld_sum, ready, ack};
    exp_strobes = {(s == ST_SET_RESET) && enable && !reset, s == ST_BOOTH_MUL,
                   s == ST_CSA_TREE, s == ST_KSA, s == ST_SET_RESET, s == ST_OUTPUT};
    checks++;
    if (state != s || strobes != exp_strobes) begin
      failures++;
      $display("FAIL %s: state=%s exp=%s strobes=%b exp=%b", what, state.name(), s.name(),
               strobes, exp_strobes);
    end
  endtask

  // advance one clock, then look at the outputs mid-cycle
  task automatic step();
    @(posedge clk);
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; enable = 0;
    step(); step();
    reset = 0;
    #1 expect_state(ST_SET_RESET, "after reset");
    // idle without enable
    repeat (3) begin step(); expect_state(ST_SET_RESET, "idle"); end
    // one full operation
    enable = 1; #1 expect_state(ST_SET_RESET, "accept");
    step(); expect_state(ST_BOOTH_MUL, "phase 1");
    step(); expect_state(ST_CSA_TREE, "phase 2");
    step(); expect_state(ST_KSA, "phase 3");
    step(); expect_state(ST_OUTPUT, "output");
    repeat (4) begin step(); expect_state(ST_OUTPUT, "hold"); end
    enable = 0;
    step(); expect_state(ST_SET_RESET, "release");
    // phases do not wait for enable once started
    enable = 1; step(); enable = 0;
    #1 expect_state(ST_BOOTH_MUL, "started");
    step(); expect_state(ST_CSA_TREE, "phase 2 w/o enable");
    step(); expect_state(ST_KSA, "phase 3 w/o enable");
    step(); expect_state(ST_OUTPUT, "output w/o enable");
    step(); expect_state(ST_SET_RESET, "release 2");
    // reset aborts from every state
    for (int k = 1; k <= 5; k++) begin
      enable = 1;
      repeat (k) step();
      reset = 1;
      step();
      reset = 0; enable = 0;
      #1 expect_state(ST_SET_RESET, $sformatf("abort after %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
