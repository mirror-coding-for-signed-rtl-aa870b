// ha_array_adder: unsigned binary adder built from half adders only.
//
// Cell a is a half adder: carry u & v, sum u ^ v. The adder is a triangular array:
// rank i has levels 1 .. i+1, level 1 adds x_i and y_i, and every further level adds
// the sum from above and the carry of the previous level at the rank below. Rank i's
// result bit leaves level i+1. N+1 ranks hold x + y, and no carry leaves the top
// rank; an assertion checks it.
// The half-adder cell is the source's; the array shape for N digits is this
// design's. Purely combinational.
module ha_array_adder #(
  parameter int unsigned N = 4  // digits per operand
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N:0]   s
);

  localparam int unsigned M = N + 1;  // result ranks

  logic [M:0][M-1:0] dig;
  logic [M:0][M:0]   car;

  always_comb begin
    dig = '0;
    car = '0;
    for (int i = 0; i < N; i++) begin
      dig[1][i]   = x[i] ^ y[i];
      car[1][i+1] = x[i] & y[i];
    end
    for (int k = 2; k <= M; k++) begin
      for (int i = 0; i < M; i++) begin
        if (i >= k - 1) begin
          dig[k][i]   = dig[k-1][i] ^ car[k-1][i];
          car[k][i+1] = dig[k-1][i] & car[k-1][i];
        end else begin
          dig[k][i] = dig[k-1][i];
        end
      end
    end
    for (int i = 0; i < M; i++) s[i] = dig[i+1][i];
  end

  for (genvar k = 1; k <= M; k++) begin : g_chk
    always_comb assert (car[k][M] == 1'b0)
      else $error("ha_array_adder: carry out of the top rank at level %0d", k);
  end

endmodule
