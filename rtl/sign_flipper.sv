// sign_flipper: converter between ordinary (two's complement) code and mirror code.
//
// The mirror code of a number has the bits of the two's complement code of its
// additive inverse, so this converter is a combinational negator. It is a row of
// identical cells rippling from the least significant digit:
//   xhat_i  = x_i ^ r_i
//   r_(i+1) = x_i | r_i,   r_0 = 0
// i.e. digits up to and including the lowest 1 pass unchanged and all digits above
// it are inverted. The same circuit converts in both directions. Zero maps to zero;
// the most negative word (1 0 ... 0) maps to itself, which in the other code reads
// as the value of opposite sign.
// Cell equations are the source's; the width parameter's default matches its
// four-digit drawings. Purely combinational.
module sign_flipper #(
  parameter int unsigned W = 4  // digits per word
) (
  input  logic [W-1:0] x,     // word in one code
  output logic [W-1:0] xhat   // same value in the other code
);

  always_comb begin
    logic seen;  // ripple signal r_i: some lower digit was 1
    seen = 1'b0;
    for (int i = 0; i < W; i++) begin
      xhat[i] = x[i] ^ seen;
      seen    = x[i] | seen;
    end
  end

endmodule
