// mirror_cell: one-digit adder that subtracts its carry input, with a mirror-code output.
//
// It forms v(x) + v(y) - v(r), a value in {-1, 0, 1, 2}, and writes it as two mirror
// digits: value = 2*r1 - shat. The low digit carries the negative weight, so -1 is
// "0 1" and +2 is "1 0"; no third digit is needed, as it would be in two's complement.
//   shat = x ^ y ^ r
//   r1   = maj(x, y, ~r)      (a borrow cell with its inputs permuted)
// Both equations and the truth table are the source's; the port names are this design's.
// Purely combinational.
module mirror_cell
  import mirror_pkg::*;
(
  input  logic x,     // x_0
  input  logic y,     // y_0
  input  logic r,     // r_0, subtracted
  output logic shat,  // mirror digit, weight -1
  output logic r1     // mirror digit, weight +2
);

  always_comb begin
    shat = x ^ y ^ r;
    r1   = maj(x, y, ~r);
  end

endmodule
