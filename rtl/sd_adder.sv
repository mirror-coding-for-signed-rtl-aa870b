// sd_adder: complete carry-free adder for signed-digit numbers, digits in {-1, 0, +1}.
//
// It is one sd_adder_section of N+1 ranks. The transfers into rank 0 are zero, and
// the extra rank N has zero operand digits: its cells only collect the transfers
// t'_N and t''_N leaving the operand ranks, so no transfer leaves rank N and the
// N+1 result digits are exact: sum_i s_i 2^i = x + y. Every digit takes three cell
// delays whatever N is.
// Digits are coded in two's complement (00 = 0, 01 = +1, 11 = -1), this design's
// choice. The three-level scheme is the source's (see sd_adder_section).
// Purely combinational.
module sd_adder
  import mirror_pkg::*;
#(
  parameter int unsigned N = 3  // signed digits per operand
) (
  input  sd_digit_t [N-1:0] x,
  input  sd_digit_t [N-1:0] y,
  output sd_digit_t [N:0]   s
);

  sd_digit_t t1_top, t2_top;

  sd_adder_section #(.N(N + 1)) u_sec (
    .x      ({SD_ZERO, x}),
    .y      ({SD_ZERO, y}),
    .t1_in  (SD_ZERO),
    .t2_in  (SD_ZERO),
    .s      (s),
    .t1_out (t1_top),
    .t2_out (t2_top)
  );

  // With zero digits in rank N, rank N passes no transfer on.
  always_comb assert (t1_top == SD_ZERO && t2_top == SD_ZERO)
    else $error("sd_adder: transfer out of the top rank");

endmodule
