// sd_out_adder: binary adder with a signed-digit result, in two carry-free levels.
//
// Operands are unsigned binary. Level 1 is a row of mirror half adders (mirror_ha,
// cell b):
//   x_i + y_i = 2 t_(i+1) - m_i,   t_(i+1) = x_i | y_i,   m_i = x_i ^ y_i
// so the transfer t is 0 or +1 and the mirror digit m stands for 0 or -1.
// Level 2 (cell c) adds the transfer from the rank below: s_i = t_i - m_i, which
// lies in {-1, 0, +1} and needs no carry. Rank N holds the last transfer t_N.
// Result: sum_i s_i 2^i = x + y with N+1 signed digits, two's complement coded
// (00, 01, 11 - this design's code). Depth is two cells whatever N is.
// The cells and their output ranges are the source's. Purely combinational.
module sd_out_adder
  import mirror_pkg::*;
#(
  parameter int unsigned N = 4  // digits per operand
) (
  input  logic [N-1:0]    x,
  input  logic [N-1:0]    y,
  output sd_digit_t [N:0] s
);

  logic [N:0] t;  // transfer into rank i
  logic [N:0] m;  // mirror digit of rank i (weight -1)

  assign t[0] = 1'b0;
  assign m[N] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_b
    mirror_ha u_b (.u(x[i]), .v(y[i]), .r(t[i+1]), .s(m[i]));
  end

  always_comb begin
    for (int i = 0; i <= N; i++) begin
      unique case ({t[i], m[i]})
        2'b10:   s[i] = SD_POS;
        2'b01:   s[i] = SD_NEG;
        default: s[i] = SD_ZERO;
      endcase
    end
  end

endmodule
