// vedic_mult -- WIDTH x WIDTH unsigned Urdhva Tiryakbhyam multiplier.
//
// The operands are cut into 2-bit digits and the product is built bottom-up
// in log2(WIDTH) levels, all in parallel combinational logic:
//   level 1:  every pair of 2-bit digits (a digit i, b digit j) is multiplied
//             by a ut_mult_2x2 vertical-and-crosswise cell;
//   level L:  digits are 2^L bits wide. Each product of digit pair (i, j) is
//             made from the four level L-1 products of its half-digits,
//             (2i,2j) low*low, (2i+1,2j) high*low, (2i,2j+1) low*high and
//             (2i+1,2j+1) high*high, by a vedic_combine stage (one
//             carry-save row plus a carry-propagate adder).
// The single digit pair left at the last level is the product. So every
// level performs the design's four stages (decomposition, partial products,
// carry-save summation, assembly) on digits twice as wide as the level
// below.
//
// Interface: a, b unsigned WIDTH bits; p = a*b, 2*WIDTH bits. WIDTH must be
// a power of two, 2 or more; the default 32 is the segment multiplier of the
// 64-bit design.
// Timing: purely combinational; per level above the 2x2 cells one full adder
// and one carry-propagate adder of twice the level's digit width.
// The 32-bit segment and the four stages follow the design; carrying the
// same split down to 2x2 cells is this design's reading of "scalable and
// modular".
module vedic_mult #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);

  localparam int unsigned LEVELS = $clog2(WIDTH);

  for (genvar lv = 1; lv <= LEVELS; lv++) begin : g_lvl
    localparam int unsigned DW = 1 << lv;        // digit width at this level
    localparam int unsigned ND = WIDTH / DW;     // digits per operand

    // pp[i][j] = (digit i of a) * (digit j of b), 2*DW bits
    logic [2*DW-1:0] pp [ND][ND];

    for (genvar i = 0; i < ND; i++) begin : g_i
      for (genvar j = 0; j < ND; j++) begin : g_j
        if (lv == 1) begin : g_cell
          ut_mult_2x2 u_cell (
            .a(a[2*i +: 2]), .b(b[2*j +: 2]), .p(pp[i][j])
          );
        end else begin : g_comb
          vedic_combine #(.WIDTH(DW)) u_comb (
            .pp_ll(g_lvl[lv-1].pp[2*i  ][2*j  ]),
            .pp_hl(g_lvl[lv-1].pp[2*i+1][2*j  ]),
            .pp_lh(g_lvl[lv-1].pp[2*i  ][2*j+1]),
            .pp_hh(g_lvl[lv-1].pp[2*i+1][2*j+1]),
            .p    (pp[i][j])
          );
        end
      end
    end
  end

  always_comb p = g_lvl[LEVELS].pp[0][0];

endmodule
