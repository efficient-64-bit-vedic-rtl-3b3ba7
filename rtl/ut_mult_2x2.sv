// ut_mult_2x2 -- 2x2-bit Urdhva Tiryakbhyam ("vertical and crosswise") cell.
//
// The leaf of the recursive Vedic multiplier. The three columns of the
// vertical-and-crosswise pattern are formed at once:
//   column 0 (vertical):  a0*b0
//   column 1 (crosswise): a1*b0 + a0*b1, added by a half adder
//   column 2 (vertical):  a1*b1 plus the column-1 carry, by a second half adder
// The second half adder's carry is product bit 3.
//
// Interface: a, b are 2-bit unsigned operands, p = a*b (4 bits).
// Timing: purely combinational, four AND gates and two half adders deep.
// The vertical/crosswise column pattern follows the algorithm the design is
// built on; using a 2x2 cell as the recursion leaf is this design's choice.
module ut_mult_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic v0, x1a, x1b, v2;  // vertical and crosswise bit products
  logic c1;                // carry out of the crosswise column

  always_comb begin
    v0  = a[0] & b[0];
    x1a = a[1] & b[0];
    x1b = a[0] & b[1];
    v2  = a[1] & b[1];
    c1  = x1a & x1b;
    p[0] = v0;
    p[1] = x1a ^ x1b;
    p[2] = v2 ^ c1;
    p[3] = v2 & c1;
  end

endmodule
