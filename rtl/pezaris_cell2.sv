// pezaris_cell2: two-bit operator cell of a cellular multiplier for signed numbers.
//
// A two-bit cell is a cascade of two one-bit operators (see pezaris_cell): the low
// cell, of kind KIND_LO, works on x[0], y[0] and the carry in r; its carry feeds the
// high cell, of kind KIND_HI, which works on x[1], y[1] and gives the carry out r2.
// Each one-bit kind fixes the signs of its terms:
//   kind     x    y    r in   s    r out
//   CELL_A   +    +    +      +    +2
//   CELL_B   -    +    +      -    +2
//   CELL_C   +    -    -      +    -2
// so the cell computes, with sg() the sign of a term in the table above,
//   sum_i 2^i (sg(x_i) x_i + sg(y_i) y_i) + sg(r) r = 4 sg(r2) r2 + sum_i 2^i sg(s_i) s_i
// The chain is exact only when the carry weight the low cell gives (+2 for A and B,
// -2 for C) is the weight the high cell takes, so C pairs only with C, and A and B
// mix freely. Other pairs stop the elaboration.
// The source names three two-bit cells: an ordinary two-bit adder (A, A), a mirror
// code two-bit adder (B, B) and a cascade of both types (one of A, B and one of the
// other). Building them from the one-bit cells, and the parameter names, are this
// design's choices. The defaults give the ordinary adder. Purely combinational, two
// cell delays from r to r2.
module pezaris_cell2
  import mirror_pkg::*;
#(
  parameter cell_kind_e KIND_LO = CELL_A,  // operator of bit 0
  parameter cell_kind_e KIND_HI = CELL_A   // operator of bit 1
) (
  input  logic [1:0] x,
  input  logic [1:0] y,
  input  logic       r,   // carry in, weight 1
  output logic [1:0] s,
  output logic       r2   // carry out, weight 4
);

  if ((KIND_LO == CELL_C) != (KIND_HI == CELL_C)) begin : g_bad_pair
    $error("pezaris_cell2: kind C can only be cascaded with kind C");
  end

  logic r1;  // carry from bit 0 to bit 1, weight 2

  pezaris_cell #(.KIND(KIND_LO)) u_lo (.x (x[0]), .y (y[0]), .r (r),  .s (s[0]), .r1 (r1));
  pezaris_cell #(.KIND(KIND_HI)) u_hi (.x (x[1]), .y (y[1]), .r (r1), .s (s[1]), .r1 (r2));

endmodule
