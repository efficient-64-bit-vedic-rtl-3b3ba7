// product_assembly -- final carry-propagate adder of the multiplier.
//
// Merges the carry-save pair left by the summation stage into one binary
// number: result = sum + (carry << 1), modulo 2^WIDTH. This is the only
// place in a multiplier level where a carry travels the full width; the
// adder is written as a single '+' so that synthesis can map it onto the
// fastest adder the target offers (a dedicated carry chain on an FPGA, a
// prefix adder in a standard-cell flow).
//
// Interface: sum and carry from csa_3to2 (carry unshifted), result out.
// The carry bit shifted out of the top column is dropped: for a product it
// is always zero, because sum + 2*carry is below 2^WIDTH.
// Timing: purely combinational.
// The stage itself follows the design; the adder architecture is this
// design's choice, as the design leaves it open.
module product_assembly #(
  parameter int unsigned WIDTH = 128
) (
  input  logic [WIDTH-1:0] sum,
  input  logic [WIDTH-1:0] carry,
  output logic [WIDTH-1:0] result
);

  always_comb result = sum + {carry[WIDTH-2:0], 1'b0};

endmodule
