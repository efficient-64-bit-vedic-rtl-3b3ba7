// tb_product_assembly -- self-check of the final carry-propagate adder.
// Random and corner carry-save pairs are applied, including ones whose
// carry ripples across the whole width; the result must equal
// sum + 2*carry modulo 2^WIDTH, computed here in a wider number.
module tb_product_assembly;
  localparam int unsigned W = 128;
  logic [W-1:0] sum, carry, result;
  int checks = 0, failures = 0;

  product_assembly #(.WIDTH(W)) dut (.sum(sum), .carry(carry), .result(result));

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic check();
    logic [W+1:0] want;
    #1;
    want = (W+2)'(sum) + ((W+2)'(carry) << 1);
    checks++;
    if (result != want[W-1:0]) begin
      failures++;
      $display("FAIL sum=%h carry=%h got=%h want=%h", sum, carry, result, want[W-1:0]);
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
    sum = '0; carry = '0; check();
    sum = '1; carry = W'(1); check();          // ripples through every column
    sum = '1; carry = '1; check();
    sum = {1'b0, {(W-1){1'b1}}}; carry = W'(1); check();
    for (int n = 0; n < 500; n++) begin
      sum = rnd(); carry = rnd();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
