// tb_vedic_mult64 -- end-to-end self-check of the 64 x 64-bit Vedic
// multiplier at its default size (no parameter override).
//
// Directed corner operands are followed by random ones drawn from several
// distributions (full random, one or both segments zero, segments all ones,
// single-bit operands). Each 128-bit product is compared with the product
// formed by the simulator's own 128-bit '*', and its low 64 bits with the
// truncated 64-bit product.
//
// The test also counts how often the cases that stress the summation and
// assembly stages occur, worked out from the operands alone:
//   cross_ovf  - the two crosswise segment products sum to 2^64 or more,
//                so their total needs a 65th bit;
//   carry_hi   - adding the shifted crosswise terms to the low vertical
//                product carries into the high vertical product;
//   zero_op    - an operand is zero;
//   all_ones   - both operands are all ones (largest product).
// Each must have occurred at least once, or a failure is counted.
module tb_vedic_mult64;
  logic [63:0]  a, b;
  logic [127:0] p;
  int checks = 0, failures = 0;
  int n_cross_ovf = 0, n_carry_hi = 0, n_zero_op = 0, n_all_ones = 0;

  vedic_mult64 dut (.a(a), .b(b), .p(p));

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  task automatic check(logic [63:0] x, logic [63:0] y);
    logic [127:0] want, xsum, low;
    a = x; b = y;
    #1;
    want  = 128'(x) * 128'(y);
    xsum = 128'(64'(x[63:32]) * 64'(y[31:0])) + 128'(64'(x[31:0]) * 64'(y[63:32]));
    low   = 128'(64'(x[31:0]) * 64'(y[31:0])) + (xsum << 32);
    if (xsum[64])                  n_cross_ovf++;
    if (low[127:64] != '0)          n_carry_hi++;
    if (x == '0 || y == '0)         n_zero_op++;
    if (x == '1 && y == '1)         n_all_ones++;
    checks++;
    if (p != want) begin
      failures++;
      $display("FAIL %h * %h: got %h want %h", x, y, p, want);
    end
    checks++;
    if (p[63:0] != x * y) begin
      failures++;
      $display("FAIL low half %h * %h", x, y);
    end
  endtask

  task automatic need(string what, int count);
    checks++;
    $display("%-10s occurred %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL %s never occurred", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('0, rnd64());
    check(64'd1, rnd64());
    check('1, '1);
    check('1, 64'd1);
    check(64'hFFFF_FFFF_0000_0000, 64'h0000_0000_FFFF_FFFF);
    check(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    check(64'h0000_0001_0000_0001, 64'hFFFF_FFFF_FFFF_FFFF);
    for (int n = 0; n < 20000; n++) begin
      logic [63:0] x, y;
      int unsigned kind, sa, sb;
      x    = rnd64();
      y    = rnd64();
      kind = $urandom_range(0, 5);
      sa   = $urandom_range(0, 63);
      sb   = $urandom_range(0, 63);
      unique case (kind)
        0: ;                                            // fully random
        1: x[63:32] = '0;                               // one segment empty
        2: begin x[31:0] = '1; y[63:32] = '1; end       // saturated segments
        3: begin x = 64'd1 << sa; y = 64'd1 << sb; end  // single bits
        4: begin x |= 64'hFFFF_FFF0_FFFF_FFF0; y |= 64'hFFF0_FFFF_FFF0_FFFF; end
        default: y = '0;
      endcase
      check(x, y);
    end
    need("cross_ovf", n_cross_ovf);
    need("carry_hi",  n_carry_hi);
    need("zero_op",   n_zero_op);
    need("all_ones",  n_all_ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
