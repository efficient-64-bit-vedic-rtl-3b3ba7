// tb_vedic_mult -- self-check of the recursive Urdhva Tiryakbhyam multiplier.
// Three widths are instantiated side by side: 4 and 8 bits are tested
// exhaustively, 32 bits (the segment width of the 64-bit design) with corner
// and random operands. Products are compared with the shift-and-add
// reference below, which does not use the '*' operator.
module tb_vedic_mult;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;   logic [7:0]  p4;
  logic [7:0]  a8, b8;   logic [15:0] p8;
  logic [31:0] a32, b32; logic [63:0] p32;

  vedic_mult #(.WIDTH(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  vedic_mult #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mult #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .p(p32));

  // shift-and-add reference product
  function automatic logic [63:0] ref_mul(logic [31:0] x, logic [31:0] y);
    logic [63:0] acc = '0;
    for (int i = 0; i < 32; i++)
      if (y[i]) acc += 64'(x) << i;
    return acc;
  endfunction

  task automatic check32(logic [31:0] x, logic [31:0] y);
    a32 = x; b32 = y;
    #1;
    checks++;
    if (p32 != ref_mul(x, y)) begin
      failures++;
      $display("FAIL 32: %h*%h got %h want %h", x, y, p32, ref_mul(x, y));
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
    a32 = '0; b32 = '0; a8 = '0; b8 = '0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (p4 != 8'(ref_mul(32'(i), 32'(j)))) begin
          failures++;
          $display("FAIL 4: %0d*%0d got %0d", i, j, p4);
        end
      end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (p8 != 16'(ref_mul(32'(i), 32'(j)))) begin
          failures++;
          $display("FAIL 8: %0d*%0d got %0d", i, j, p8);
        end
      end
    check32('0, '0);
    check32('1, '1);
    check32('1, 32'd1);
    check32(32'hFFFF_0000, 32'h0000_FFFF);
    check32(32'h8000_0000, 32'h8000_0000);
    for (int n = 0; n < 2000; n++)
      check32($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
