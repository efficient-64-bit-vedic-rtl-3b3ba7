// tb_vedic_combine -- self-check of one level's carry-save summation and
// assembly. The four partial products are computed here with '*' from
// digit pairs, so they are the ones a real level delivers; the combined
// output must equal the product of the whole operands. Two instances run:
// WIDTH 4 (2-bit digits, every operand pair) and WIDTH 64 (32-bit digits,
// corner and random operands, as in the 64-bit design).
module tb_vedic_combine;
  int checks = 0, failures = 0;

  logic [3:0]   s_ll, s_hl, s_lh, s_hh;  logic [7:0]   s_p;
  logic [63:0]  w_ll, w_hl, w_lh, w_hh;  logic [127:0] w_p;

  vedic_combine #(.WIDTH(4))  dut_s (.pp_ll(s_ll), .pp_hl(s_hl), .pp_lh(s_lh), .pp_hh(s_hh), .p(s_p));
  vedic_combine #(.WIDTH(64)) dut_w (.pp_ll(w_ll), .pp_hl(w_hl), .pp_lh(w_lh), .pp_hh(w_hh), .p(w_p));

  task automatic check_w(logic [63:0] a, logic [63:0] b);
    w_ll = 64'(a[31:0])  * 64'(b[31:0]);
    w_hl = 64'(a[63:32]) * 64'(b[31:0]);
    w_lh = 64'(a[31:0])  * 64'(b[63:32]);
    w_hh = 64'(a[63:32]) * 64'(b[63:32]);
    #1;
    checks++;
    if (w_p != 128'(a) * 128'(b)) begin
      failures++;
      $display("FAIL 64: %h * %h got %h", a, b, w_p);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_ll = '0; w_hl = '0; w_lh = '0; w_hh = '0;
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        s_ll = 4'((a % 4) * (b % 4));
        s_hl = 4'((a / 4) * (b % 4));
        s_lh = 4'((a % 4) * (b / 4));
        s_hh = 4'((a / 4) * (b / 4));
        #1;
        checks++;
        if (int'(s_p) != a * b) begin
          failures++;
          $display("FAIL 4: %0d * %0d got %0d", a, b, s_p);
        end
      end
    check_w('0, '0);
    check_w('1, '1);
    check_w('1, 64'd1);
    check_w(64'hFFFF_FFFF_0000_0001, 64'h0000_0001_FFFF_FFFF);
    for (int n = 0; n < 2000; n++)
      check_w({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
