// tb_ksa: self-checking test of the Kogge-Stone adder.
// Instances at 64 bits (default), 128 bits (the multiplier's final adder)
// and 7 bits (a width that is not a power of two, tested exhaustively for
// cin = 0/1 over random pairs). Each result {cout, sum} is compared with the
// simulator's own + on wider vectors. Long carry chains (all-ones plus one)
// are included.
module tb_ksa;
  int checks = 0, failures = 0;

  logic [63:0]  a64, b64, s64;
  logic         ci64, co64;
  logic [127:0] a128, b128, s128;
  logic         ci128, co128;
  logic [6:0]   a7, b7, s7;
  logic         ci7, co7;

  ksa                dut64  (.x(a64),  .y(b64),  .cin(ci64),  .sum(s64),  .cout(co64));
  ksa #(.W(128))     dut128 (.x(a128), .y(b128), .cin(ci128), .sum(s128), .cout(co128));
  ksa #(.W(7))       dut7   (.x(a7),   .y(b7),   .cin(ci7),   .sum(s7),   .cout(co7));

  task automatic check();
    logic [64:0]  r64;
    logic [128:0] r128;
    logic [7:0]   r7;
    #1;
    r64  = 65'(a64) + 65'(b64) + 65'(ci64);
    r128 = 129'(a128) + 129'(b128) + 129'(ci128);
    r7   = 8'(a7) + 8'(b7) + 8'(ci7);
    checks += 3;
    if ({co64, s64} != r64) begin
      failures++; $display("FAIL ksa64 %h + %h + %b = %b_%h", a64, b64, ci64, co64, s64);
    end
    if ({co128, s128} != r128) begin
      failures++; $display("FAIL ksa128 %h + %h + %b = %b_%h", a128, b128, ci128, co128, s128);
    end
    if ({co7, s7} != r7) begin
      failures++; $display("FAIL ksa7 %h + %h + %b = %b_%h", a7, b7, ci7, co7, s7);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a64 = '1; b64 = '0; ci64 = 1; a128 = '1; b128 = '0; ci128 = 1;
    a7 = '1; b7 = '0; ci7 = 1;
    check();
    a64 = '1; b64 = 64'd1; ci64 = 0; a128 = '1; b128 = 128'd1; ci128 = 0;
    a7 = '1; b7 = 7'd1; ci7 = 0;
    check();
    a64 = '1; b64 = '1; ci64 = 1; a128 = '1; b128 = '1; ci128 = 1;
    a7 = '0; b7 = '0; ci7 = 0;
    check();
    for (int n = 0; n < 2000; n++) begin
      a64  = {$urandom(), $urandom()};
      b64  = {$urandom(), $urandom()};
      ci64 = 1'($urandom());
      a128 = {$urandom(), $urandom(), $urandom(), $urandom()};
      b128 = {$urandom(), $urandom(), $urandom(), $urandom()};
      // every fourth vector: b = ~a so the carry has to ripple the full width
      if (n % 4 == 0) begin
        b64 = ~a64; b128 = ~a128;
      end
      ci128 = 1'($urandom());
      a7 = 7'(n); b7 = 7'(n >> 7); ci7 = 1'(n >> 14);
      check();
    end
    for (int n = 0; n < (1 << 15); n++) begin
      a7 = 7'(n); b7 = 7'(n >> 7); ci7 = 1'(n >> 14);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
