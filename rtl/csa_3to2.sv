// csa_3to2 -- one carry-save adder row (3:2 compressor).
//
// Reduces three WIDTH-bit operands to a sum vector and a carry vector with a
// row of independent full adders, so no carry travels along the row: the
// delay is one full adder whatever WIDTH is. x + y + z == sum + 2*carry.
//
// Interface: x, y, z in; sum = x^y^z; carry = majority(x,y,z), still at the
// weight of its own column (the caller shifts it left by one).
// Timing: purely combinational.
// Summing partial products with carry-save adders follows the design; the
// WIDTH default (128, the product width of the 64-bit multiplier) is this
// design's choice.
module csa_3to2 #(
  parameter int unsigned WIDTH = 128
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] carry
);

  always_comb begin
    sum   = x ^ y ^ z;
    carry = (x & y) | (x & z) | (y & z);
  end

endmodule
