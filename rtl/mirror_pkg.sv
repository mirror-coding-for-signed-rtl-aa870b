// mirror_pkg: shared helpers for the mirror-code and signed-digit arithmetic units.
//
// Mirror code writes a number with the weights {+2^n, -2^(n-1), ..., -2^0}, the
// two's complement weights with every sign reversed, so the mirror code of x has
// the same bits as the two's complement code of -x. The units built on it need the
// three-input majority function and a small code for signed digits in {-1, 0, +1}.
//
// Signed digits travel as two bits in two's complement ("ordinary" two-digit
// code): 00 = 0, 01 = +1, 11 = -1. The pattern 10 (-2) never appears on a digit
// port. This code is this design's choice; only the digit set is the source's.
package mirror_pkg;

  // Signed digit in {-1, 0, +1}, two's complement coded.
  typedef logic [1:0] sd_digit_t;

  localparam sd_digit_t SD_ZERO = 2'b00;
  localparam sd_digit_t SD_POS  = 2'b01;
  localparam sd_digit_t SD_NEG  = 2'b11;

  // Kind of one-bit cell of a signed array multiplier (see pezaris_cell).
  typedef enum logic [1:0] {
    CELL_A = 2'd0,  //  x + y + r = 2 r1 + s0
    CELL_B = 2'd1,  // -x + y + r = 2 r1 - s0  (mirror output)
    CELL_C = 2'd2   //  x - y - r = s0 - 2 r1
  } cell_kind_e;

  // Output code of a (d) cell, which adds a digit of weight -1 (u) and one of weight
  // +1 (v), giving a value in {-1, 0, +1}.
  typedef enum logic [1:0] {
    D_DIRECT   = 2'd0,  // (d0): value = -2 r + s
    D_MIRROR   = 2'd1,  // (d1): value = +2 r - s
    D_VARIABLE = 2'd2   // mode bit + two digits; mode 0 direct, 1 mirror
  } d_code_e;

  // Structure of the x + y - r0 adder (see xy_minus_r_adder).
  typedef enum logic [1:0] {
    XR_FLIP_SUB = 2'd0,  // x - (-y) - r0: flipper on y, ripple-borrow subtractor
    XR_FLIP_ADD = 2'd1,  // -[(-x) + (-y) + r0]: three flippers, ripple-carry adder
    XR_ADD_DEC  = 2'd2   // (x + y) - r0: ripple-carry adder, then a decrementer
  } xr_struct_e;

  // Three-variable majority.
  function automatic logic maj(input logic u, input logic v, input logic w);
    return (u & v) | (u & w) | (v & w);
  endfunction

endpackage
