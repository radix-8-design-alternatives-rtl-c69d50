// tb_booth_mul: end-to-end test of the 64-bit Wallace-tree radix-8 Booth
// multiplier at its default size.
//
// Runs the sample operands 123456789 x 987654321 (= 121932631112635269),
// corner cases and random pairs through the ready/enable/ack handshake and
// compares sum with the simulator's own 128-bit product. Also checks:
//  - the latency: ack rises exactly 3 clocks after the accepting edge;
//  - ready is low while busy and sum is 0 after reset;
//  - hold: with enable kept high, ack and sum stay put;
//  - abort: reset during an operation returns to ready, clears sum and no
//    ack follows.
// It counts how often each mechanism of the datapath happened and fails if
// one never did: a negative Booth digit, a 3x (hard) multiple, a carry out
// of the final KSA being dropped, the hold, and the abort.
module tb_booth_mul;
  localparam int N = 64;
  int checks = 0, failures = 0;
  int n_neg_digit = 0, n_hard_mult = 0, n_ksa_drop = 0, n_hold = 0, n_abort = 0;

  logic clk = 0, reset, enable;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] sum;
  logic ack, ready;

  booth_mul dut (.*);

  always #5 clk = ~clk;

  // Datapath events, sampled in the phase that uses them.
  always @(posedge clk) begin
    if (!reset && dut.state == wcbm_pkg::ST_BOOTH_MUL) begin
      n_neg_digit += $countones(dut.pp_neg);
      for (int i = 0; i < dut.NPP; i++) begin
        logic [3:0] g;
        g = dut.u_ppgen.b_ext[3*i +: 4];
        if (g inside {4'b0101, 4'b0110, 4'b1001, 4'b1010}) n_hard_mult++;
      end
    end
    if (!reset && dut.state == wcbm_pkg::ST_KSA && dut.ksa_cout) n_ksa_drop++;
  end

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One multiplication through the handshake; returns the clocks from the
  // accepting edge to ack.
  task automatic multiply(input logic [N-1:0] a, input logic [N-1:0] b, input int hold);
    logic [2*N-1:0] prod;
    int lat;
    prod = (2*N)'(a) * (2*N)'(b);
    @(negedge clk);
    check("ready before start", ready == 1'b1);
    x = a; y = b; enable = 1'b1;
    @(posedge clk);            // accepting edge
    @(negedge clk);
    x = '1 ^ a; y = '0;        // operands are captured; change the pins
    check("ready low while busy", ready == 1'b0);
    lat = 0;
    while (!ack && lat < 20) begin
      @(posedge clk); #1;
      lat++;
    end
    check($sformatf("latency %0d", lat), lat == 3);
    check($sformatf("product %0d * %0d = %0d (got %0d)", a, b, prod, sum), sum == prod);
    for (int h = 0; h < hold; h++) begin
      @(posedge clk); #1;
      check("hold", ack == 1'b1 && sum == prod);
    end
    if (hold > 0) n_hold++;
    @(negedge clk);
    enable = 1'b0;
    @(posedge clk); #1;
    check("release to ready", ready == 1'b1 && ack == 1'b0 && sum == prod);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; enable = 0; x = '0; y = '0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    check("sum cleared by reset", sum == '0 && ready == 1'b1 && ack == 1'b0);

    multiply(64'd123456789, 64'd987654321, 3);
    check("sample product", sum == 128'd121932631112635269);
    multiply('1, '1, 0);
    multiply('0, '1, 0);
    multiply('1, '0, 0);
    multiply(64'd1, '1, 0);
    multiply('1, 64'd1, 1);
    multiply(64'h8000_0000_0000_0000, 64'hFFFF_FFFF_FFFF_FFFF, 0);
    multiply(64'hFFFF_FFFF_FFFF_FFFF, 64'hB6DB_6DB6_DB6D_B6DB, 0);

    // abort: reset in the middle of an operation
    for (int k = 1; k <= 3; k++) begin
      @(negedge clk);
      x = {$urandom(), $urandom()}; y = {$urandom(), $urandom()}; enable = 1'b1;
      repeat (k) @(posedge clk);
      @(negedge clk);
      reset = 1'b1; enable = 1'b0;
      @(posedge clk);
      @(negedge clk);
      reset = 1'b0;
      check("abort clears", ready == 1'b1 && ack == 1'b0 && sum == '0);
      repeat (6) begin
        @(posedge clk); #1;
        check("no ack after abort", ack == 1'b0);
      end
      n_abort++;
    end

    for (int n = 0; n < 300; n++)
      multiply({$urandom(), $urandom()}, {$urandom(), $urandom()}, n % 3);

    check($sformatf("negative digits seen (%0d)", n_neg_digit), n_neg_digit > 0);
    check($sformatf("3x multiples seen (%0d)", n_hard_mult), n_hard_mult > 0);
    check($sformatf("KSA carries dropped (%0d)", n_ksa_drop), n_ksa_drop > 0);
    check($sformatf("holds (%0d)", n_hold), n_hold > 0);
    check($sformatf("aborts (%0d)", n_abort), n_abort > 0);
    $display("mechanisms: neg_digit=%0d hard_mult=%0d ksa_drop=%0d hold=%0d abort=%0d",
             n_neg_digit, n_hard_mult, n_ksa_drop, n_hold, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
