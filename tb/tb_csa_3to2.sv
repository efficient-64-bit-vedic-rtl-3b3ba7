// tb_csa_3to2 -- self-check of the carry-save row. Random and corner operand
// triples are applied; the sum must equal the bitwise XOR, the carry the
// bitwise majority, and sum + 2*carry the arithmetic sum of the three
// operands (checked in a wider number so nothing is lost).
module tb_csa_3to2;
  localparam int unsigned W = 128;
  logic [W-1:0] x, y, z, sum, carry;
  int checks = 0, failures = 0;

  csa_3to2 #(.WIDTH(W)) dut (.x(x), .y(y), .z(z), .sum(sum), .carry(carry));

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic check();
    logic [W+1:0] want, got;
    #1;
    want = (W+2)'(x) + (W+2)'(y) + (W+2)'(z);
    got  = (W+2)'(sum) + ((W+2)'(carry) << 1);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL arithmetic: x=%h y=%h z=%h", x, y, z);
    end
    for (int i = 0; i < W; i++) begin
      checks++;
      if (sum[i] != (x[i] ^ y[i] ^ z[i]) ||
          carry[i] != ((x[i] & y[i]) | (x[i] & z[i]) | (y[i] & z[i]))) begin
        failures++;
        $display("FAIL bit %0d", i);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; y = '0; z = '0; check();
    x = '1; y = '1; z = '1; check();
    x = '1; y = '0; z = '1; check();
    for (int n = 0; n < 200; n++) begin
      x = rnd(); y = rnd(); z = rnd();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
