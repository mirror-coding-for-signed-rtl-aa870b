// pezaris_cell: one-bit operator cell of a cellular multiplier for signed numbers.
//
// A signed array multiplier needs three one-bit operators:
//   CELL_A:  v(x) + v(y) + v(r) = 2 r1 + s    ordinary full adder
//   CELL_B: -v(x) + v(y) + v(r) = 2 r1 - s    result in mirror code
//   CELL_C:  v(x) - v(y) - v(r) = s - 2 r1    ordinary subtractor (r is a borrow)
// Seen through mirror code, CELL_B is the CELL_C equation multiplied by -1, so both
// are the same borrow logic: s = x ^ y ^ r, r1 = maj(~x, y, r). CELL_A is
// s = x ^ y ^ r, r1 = maj(x, y, r). The arithmetic definitions are the source's; the
// gate equations are derived from them. Purely combinational.
module pezaris_cell
  import mirror_pkg::*;
#(
  parameter cell_kind_e KIND = CELL_A
) (
  input  logic x,
  input  logic y,
  input  logic r,
  output logic s,
  output logic r1
);

  always_comb begin
    s = x ^ y ^ r;
    unique case (KIND)
      CELL_A:  r1 = maj(x, y, r);
      default: r1 = maj(~x, y, r);  // CELL_B and CELL_C share the borrow logic
    endcase
  end

endmodule
