// vedic_mult64 -- 64 x 64-bit unsigned Vedic multiplier (top level).
//
// Computes the full 128-bit product of two 64-bit unsigned operands in one
// combinational pass, in the four stages of the Urdhva Tiryakbhyam design:
//   1. input decomposition: each operand is cut into two 32-bit segments;
//   2. partial product generation: the four segment products (low*low,
//      high*low, low*high, high*high) are formed in parallel by 32x32
//      vedic_mult instances, each built the same way down to 2x2 cells;
//   3. summation: vedic_combine lays the two vertical products side by side
//      as one operand and the two crosswise products, shifted by 32, as two
//      more, and reduces the three with one carry-save row;
//   4. final product assembly: one 128-bit carry-propagate addition, also
//      inside vedic_combine.
//
// Interface: a, b (WIDTH bits), p = a*b (2*WIDTH bits). WIDTH defaults to 64
// and may be set to another power of two of 4 or more.
// Timing: purely combinational, no clock and no registers; register the
// inputs and outputs around it as the surrounding system requires.
// The stages and the 32-bit segments follow the design. The design speaks of
// a "64-bit output"; this module returns the full 128-bit product, whose low
// 64 bits are the product truncated to 64 bits.
module vedic_mult64 #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);

  localparam int unsigned SEG = WIDTH / 2;  // segment width, 32 by default

  // 1. input decomposition
  logic [SEG-1:0] a_lo, a_hi, b_lo, b_hi;
  always_comb begin
    a_lo = a[SEG-1:0];
    a_hi = a[WIDTH-1:SEG];
    b_lo = b[SEG-1:0];
    b_hi = b[WIDTH-1:SEG];
  end

  // 2. partial product generation: four segment multipliers in parallel
  logic [WIDTH-1:0] pp_ll, pp_hl, pp_lh, pp_hh;
  vedic_mult #(.WIDTH(SEG)) u_seg_ll (.a(a_lo), .b(b_lo), .p(pp_ll));
  vedic_mult #(.WIDTH(SEG)) u_seg_hl (.a(a_hi), .b(b_lo), .p(pp_hl));
  vedic_mult #(.WIDTH(SEG)) u_seg_lh (.a(a_lo), .b(b_hi), .p(pp_lh));
  vedic_mult #(.WIDTH(SEG)) u_seg_hh (.a(a_hi), .b(b_hi), .p(pp_hh));

  // 3. carry-save summation and 4. final product assembly
  vedic_combine #(.WIDTH(WIDTH)) u_sum (
    .pp_ll(pp_ll), .pp_hl(pp_hl), .pp_lh(pp_lh), .pp_hh(pp_hh), .p(p)
  );

endmodule
