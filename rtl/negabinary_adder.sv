// negabinary_adder: binary adder whose result comes out in base -2.
//
// Operands are unsigned binary; the result digit z_i is worth -(-2)^i, i.e. the
// weights run -1, +2, -4, +8, ... This is the base -2 code of -(x + y) (the "cosum"),
// equivalently x + y with alternating-sign weights.
// The adder is a triangular array. Rank i has levels 1 .. i+1 and delivers z_i at
// level i+1. Every cell takes a "digit" from the level above at the same rank and a
// "carry" from the level below at the rank below, and emits a digit and a carry, each
// of fixed sign:
//   level 1, mirror_ha (a):     r = x_i | y_i (+2),   s = x_i ^ y_i (-1)
//   even levels, d_cell (d0):   u = digit (-), v = carry (+): r0 = u & ~v (-2), s = u ^ v (+1)
//   odd levels >= 3, d_cell (d1): u = carry (-), v = digit (+): r1 = ~u & v (+2), s = u ^ v (-1)
// The output digit of level k has weight sign (-1)^k, which matches rank k-1's sign.
// M = N + 3 ranks always hold x + y, and cout (the carries leaving rank M-1, one per
// level) is then all zero.
// Cell equations, the a/d0/d1 alternation and the sign convention are the source's;
// the triangular extension to N digits and M are this design's. Purely combinational.
module negabinary_adder
  import mirror_pkg::*;
#(
  parameter int unsigned N = 4,      // digits per operand
  parameter int unsigned M = N + 3   // result digits
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [M-1:0] z,     // digit i weighted -(-2)^i
  output logic [M-1:0] cout   // cout[k-1]: carry of level k out of rank M-1
);

  // Level k (generate block g_level[k]) holds dig[i], the digit of rank i after
  // level k, and car[i], the carry of level k into rank i. Level 0 is unused.
  for (genvar k = 1; k <= M; k++) begin : g_level
    logic [M-1:0] dig;
    logic [M:0]   car;

    assign car[0] = 1'b0;

    for (genvar i = 0; i < M; i++) begin : g_rank
      if (k == 1) begin : g_a
        if (i < N) begin : g_op
          mirror_ha u_a (.u(x[i]), .v(y[i]), .r(car[i+1]), .s(dig[i]));
        end else begin : g_zero
          assign car[i+1] = 1'b0;
          assign dig[i]   = 1'b0;
        end
      end else if (i >= k - 1) begin : g_cell
        logic unused_mode;  // the fixed-code cells always report their own code
        if (k % 2 == 0) begin : g_d0
          d_cell #(.CODE(D_DIRECT)) u_d (
            .u (g_level[k-1].dig[i]), .v (g_level[k-1].car[i]),
            .mode (unused_mode), .r (car[i+1]), .s (dig[i])
          );
        end else begin : g_d1
          d_cell #(.CODE(D_MIRROR)) u_d (
            .u (g_level[k-1].car[i]), .v (g_level[k-1].dig[i]),
            .mode (unused_mode), .r (car[i+1]), .s (dig[i])
          );
        end
      end else begin : g_done
        assign car[i+1] = 1'b0;                  // no cell: rank already finished
        assign dig[i]   = g_level[k-1].dig[i];
      end
    end

    assign z[k-1]    = dig[k-1];
    assign cout[k-1] = car[M];
  end

endmodule
