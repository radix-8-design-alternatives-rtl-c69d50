// tb_booth_pp_gen: self-checking test of the parallel Booth partial-product
// generator at 64 bits (22 products) and 32 bits (11 products).
// For each operand pair, every partial product i is compared with
// d_i * a * 8^i modulo 2^(2N), where d_i is computed from the multiplier bits
// arithmetically, and the sum of all partial products modulo 2^(2N) is
// compared with a * b. The group count itself is checked against 22 and 11.
module tb_booth_pp_gen;
  localparam int N = 64;
  localparam int NPP = 22;
  localparam int N32 = 32;
  localparam int NPP32 = 11;
  int checks = 0, failures = 0;
  int neg_seen = 0;

  logic [N-1:0]     a, b;
  logic [2*N-1:0]   pp [NPP];
  logic [NPP-1:0]   neg;
  logic [N32-1:0]   a32, b32;
  logic [2*N32-1:0] pp32 [NPP32];
  logic [NPP32-1:0] neg32;

  booth_pp_gen #(.N(N))   dut   (.a(a),   .b(b),   .pp(pp),   .neg(neg));
  booth_pp_gen #(.N(N32)) dut32 (.a(a32), .b(b32), .pp(pp32), .neg(neg32));

  function automatic int digit(input logic [N+1:0] bb, input int i);
    // bits 3i+2, 3i+1, 3i, 3i-1 of b (b[-1] = 0, zero above the operand)
    logic [N+2:0] ext;
    ext = {bb, 1'b0};
    return -4 * int'(ext[3*i+3]) + 2 * int'(ext[3*i+2]) + int'(ext[3*i+1]) + int'(ext[3*i]);
  endfunction

  task automatic check64();
    logic [2*N-1:0] acc, expect_pp, prod;
    int bad;
    #1;
    acc = '0;
    bad = 0;
    for (int i = 0; i < NPP; i++) begin
      int d;
      d = digit({2'b00, b}, i);
      expect_pp = (2*N)'(signed'(d)) * (2*N)'(a);
      expect_pp = expect_pp << (3 * i);
      if (pp[i] !== expect_pp || neg[i] != (d < 0)) bad++;
      acc += pp[i];
    end
    prod = (2*N)'(a) * (2*N)'(b);
    neg_seen += $countones(neg);
    checks += 2;
    if (bad != 0) begin
      failures++; $display("FAIL pp64 a=%h b=%h: %0d wrong partial products", a, b, bad);
    end
    if (acc != prod) begin
      failures++; $display("FAIL pp64 sum a=%h b=%h sum=%h exp=%h", a, b, acc, prod);
    end
  endtask

  task automatic check32();
    logic [2*N32-1:0] acc, prod;
    #1;
    acc = '0;
    for (int i = 0; i < NPP32; i++) acc += pp32[i];
    prod = (2*N32)'(a32) * (2*N32)'(b32);
    checks++;
    if (acc != prod) begin
      failures++; $display("FAIL pp32 sum a=%h b=%h sum=%h exp=%h", a32, b32, acc, prod);
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
    if (dut.NPP != 22)   begin failures++; $display("FAIL NPP64=%0d", dut.NPP); end
    if (dut32.NPP != 11) begin failures++; $display("FAIL NPP32=%0d", dut32.NPP); end
    a = 64'd123456789; b = 64'd987654321; check64();
    a = '1; b = '1; check64();
    a = '0; b = '1; check64();
    a = '1; b = '0; check64();
    a = 64'h8000_0000_0000_0000; b = 64'h8000_0000_0000_0000; check64();
    a = '1; b = 64'h9249_2492_4924_9249; check64();  // ...001001 patterns
    a = '1; b = 64'hDB6D_B6DB_6DB6_DB6D; check64();
    for (int n = 0; n < 500; n++) begin
      a = {$urandom(), $urandom()};
      b = {$urandom(), $urandom()};
      check64();
      a32 = $urandom(); b32 = $urandom();
      check32();
    end
    a32 = '1; b32 = '1; check32();
    checks++;
    if (neg_seen == 0) begin failures++; $display("FAIL no negative digit seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
