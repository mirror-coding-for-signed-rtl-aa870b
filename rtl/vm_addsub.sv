// vm_addsub: adder / subtractor for variable mode numbers.
//
// A variable mode number is a mode bit plus an (N+1)-digit word. Mode 0 (direct)
// reads the word as two's complement, weights {-2^N, 2^(N-1), ..., 1}; mode 1
// (mirror) reads it with all weights negated, {+2^N, -2^(N-1), ..., -1}, so its value
// is minus the two's complement value. Range: [-2^N, +2^N], symmetric, and negation
// is a flip of the mode bit with no carry and no overflow.
//
// The unit computes (-1)^neg_x * x + (-1)^neg_y * y. Negating an operand flips its
// effective mode (A' = A ^ neg_x, B' = B ^ neg_y). If the effective modes agree, the
// two words are added; if they differ, one word is subtracted from the other, the
// ripple signal then acting as a borrow. Either way the digit logic is one ordinary
// adder row with one operand conditionally inverted inside the carry function:
//   s_i     = x_i ^ y_i ^ r_i,   r_0 = 0
//   SOLUTION 1: r_(i+1) = maj(x_i ^ A' ^ B', y_i, r_i),  S = A'   (keeps x's mode)
//   SOLUTION 2: r_(i+1) = maj(x_i, y_i ^ A' ^ B', r_i),  S = B'   (keeps y's mode)
// The control A' ^ B' costs one or two gates, as in an ordinary add/subtract unit.
// The equations are the source's; folding neg_x into the mode and the overflow flag
// ovf (sign-digit carry in xor carry out: the word could not hold the result in mode
// S) are this design's. Purely combinational.
module vm_addsub
  import mirror_pkg::*;
#(
  parameter int unsigned N        = 3,  // digits below the sign digit
  parameter int unsigned SOLUTION = 1   // 1: result in x's mode, 2: in y's mode
) (
  input  logic         x_mode,  // A: 0 direct, 1 mirror
  input  logic [N:0]   x,
  input  logic         y_mode,  // B
  input  logic [N:0]   y,
  input  logic         neg_x,   // D: use -x
  input  logic         neg_y,   // C: use -y
  output logic         s_mode,  // S
  output logic [N:0]   s,
  output logic         ovf
);

  logic       a_eff, b_eff, sub;

  assign a_eff = x_mode ^ neg_x;
  assign b_eff = y_mode ^ neg_y;
  assign sub   = a_eff ^ b_eff;

  always_comb begin
    logic r, r_sign;  // ripple signal into the current digit / into the sign digit
    r      = 1'b0;
    r_sign = 1'b0;
    for (int i = 0; i <= N; i++) begin
      if (i == N) r_sign = r;
      s[i] = x[i] ^ y[i] ^ r;
      if (SOLUTION == 1) r = maj(x[i] ^ sub, y[i], r);
      else               r = maj(x[i], y[i] ^ sub, r);
    end
    ovf = r_sign ^ r;
  end

  assign s_mode = (SOLUTION == 1) ? a_eff : b_eff;

endmodule
