// vedic_combine -- summation and assembly stage of one Vedic multiplier level.
//
// Takes the four partial products of a level whose operands were split into
// two digits of H = WIDTH/2 bits, a = {aH, aL} and b = {bH, bL}:
//   pp_ll = aL*bL and pp_hh = aH*bH (the vertical products),
//   pp_hl = aH*bL and pp_lh = aL*bH (the crosswise products),
// and returns the full product a*b. The vertical products do not overlap and
// form one operand {pp_hh, pp_ll}; the crosswise products, moved up by H
// bits, are the other two. One carry-save row (csa_3to2) reduces the three
// to a sum and a carry vector, and product_assembly adds those two.
//
// Interface: four WIDTH-bit partial products in, p (2*WIDTH bits) out.
// Timing: purely combinational; one full adder plus one 2*WIDTH-bit
// carry-propagate adder.
// The carry-save summation and the final assembly follow the design; the
// choice of a single 3:2 row (three aligned operands are all there is to
// add) is this design's.
module vedic_combine #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0]   pp_ll,
  input  logic [WIDTH-1:0]   pp_hl,
  input  logic [WIDTH-1:0]   pp_lh,
  input  logic [WIDTH-1:0]   pp_hh,
  output logic [2*WIDTH-1:0] p
);

  localparam int unsigned H = WIDTH / 2;

  logic [2*WIDTH-1:0] op_vert, op_cross1, op_cross2, cs_sum, cs_carry;

  // align the three operands
  always_comb begin
    op_vert   = {pp_hh, pp_ll};
    op_cross1 = {{H{1'b0}}, pp_hl, {H{1'b0}}};
    op_cross2 = {{H{1'b0}}, pp_lh, {H{1'b0}}};
  end

  csa_3to2 #(.WIDTH(2*WIDTH)) u_csa (
    .x(op_vert), .y(op_cross1), .z(op_cross2),
    .sum(cs_sum), .carry(cs_carry)
  );

  product_assembly #(.WIDTH(2*WIDTH)) u_asm (
    .sum(cs_sum), .carry(cs_carry), .result(p)
  );

endmodule
