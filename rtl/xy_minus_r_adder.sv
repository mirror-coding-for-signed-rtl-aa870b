// xy_minus_r_adder: adder that subtracts one unit, s = x + y - v(r0) (modulo 2^W).
//
// Such an adder serves, for instance, addition modulo 2^k + 1. The source lists
// several ways to build it, and the parameter STRUCTURE selects one:
//   XR_FLIP_SUB (default)  x - (-y) - r0. A sign flipper (mirror/ordinary converter)
//       forms -y, and a row of ripple-borrow subtractor cells subtracts it from x,
//       with r0 as the borrow into the lowest cell:
//         s_i = x_i ^ ny_i ^ b_i,   b_(i+1) = maj(~x_i, ny_i, b_i),   b_0 = r0
//   XR_FLIP_ADD  -[(-x) + (-y) + r0]. Flippers on x and y, a ripple-carry adder with
//       r0 as its carry in, and a third flipper on the sum.
//   XR_ADD_DEC   (x + y) - r0. A ripple-carry adder with zero carry in, then a
//       decrementer that subtracts r0:
//         s_i = u_i ^ d_i,   d_(i+1) = ~u_i & d_i,   d_0 = r0
// The formulas of each structure come from the source; their cell-level logic
// (majority carries, OR-chain flippers) is this design's. The source also sketches
// a structure that repeats the one-digit mirror cell (mirror_cell) at every rank and
// then converts the result. It cannot be chained beyond one digit: each cell emits
// its carry with weight +2 but takes its carry input with weight -1. So it is not
// offered here.
// r_out is the ripple signal leaving the top cell of the arithmetic row: the
// subtractor's borrow, the adder's carry, or the decrementer's borrow. It is not
// part of the result. Purely combinational; the longest path runs through one
// flipper chain and one ripple row (two rows of W cells each, three for
// XR_FLIP_ADD).
module xy_minus_r_adder
  import mirror_pkg::*;
#(
  parameter int unsigned W         = 4,           // digits per operand, sign digit included
  parameter xr_struct_e  STRUCTURE = XR_FLIP_SUB  // how the function is built
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         r0,    // unit subtracted from x + y
  output logic [W-1:0] s,     // x + y - r0, two's complement, modulo 2^W
  output logic         r_out  // ripple signal leaving the arithmetic row
);

  if (STRUCTURE == XR_FLIP_SUB) begin : g_flip_sub

    logic [W-1:0] ny;  // -y

    sign_flipper #(.W(W)) u_flip_y (
      .x    (y),
      .xhat (ny)
    );

    always_comb begin
      logic b;  // borrow into the current cell
      b = r0;
      for (int i = 0; i < W; i++) begin
        s[i] = x[i] ^ ny[i] ^ b;
        b    = maj(~x[i], ny[i], b);
      end
      r_out = b;
    end

  end else if (STRUCTURE == XR_FLIP_ADD) begin : g_flip_add

    logic [W-1:0] nx;   // -x
    logic [W-1:0] ny;   // -y
    logic [W-1:0] sum;  // (-x) + (-y) + r0

    sign_flipper #(.W(W)) u_flip_x (
      .x    (x),
      .xhat (nx)
    );

    sign_flipper #(.W(W)) u_flip_y (
      .x    (y),
      .xhat (ny)
    );

    always_comb begin
      logic c;  // carry into the current cell
      c = r0;
      for (int i = 0; i < W; i++) begin
        sum[i] = nx[i] ^ ny[i] ^ c;
        c      = maj(nx[i], ny[i], c);
      end
      r_out = c;
    end

    sign_flipper #(.W(W)) u_flip_s (
      .x    (sum),
      .xhat (s)
    );

  end else begin : g_add_dec

    logic [W-1:0] u;  // x + y
    logic         unused_carry;

    always_comb begin
      logic c;  // carry into the current adder cell
      logic d;  // borrow into the current decrementer cell
      c = 1'b0;
      for (int i = 0; i < W; i++) begin
        u[i] = x[i] ^ y[i] ^ c;
        c    = maj(x[i], y[i], c);
      end
      unused_carry = c;  // the sum is taken modulo 2^W
      d = r0;
      for (int i = 0; i < W; i++) begin
        s[i] = u[i] ^ d;
        d    = ~u[i] & d;
      end
      r_out = d;
    end

  end

endmodule
