// mirror_ha: half adder with a mirror-code output.
//
// It writes u + v (0, 1 or 2) as two mirror digits, value = 2 r - s:
//   r = u | v      (weight +2)
//   s = u ^ v      (weight -1)
// so 1 is "1 1" and 2 is "1 0". Unlike an ordinary half adder it produces a carry
// whenever either input is 1, which leaves a sum digit of 0 or -1; this is what lets
// the adders built from it absorb an incoming positive carry without propagating it.
// Equations as given in the source. Purely combinational.
module mirror_ha (
  input  logic u,
  input  logic v,
  output logic r,  // +2
  output logic s   // -1
);

  assign r = u | v;
  assign s = u ^ v;

endmodule
