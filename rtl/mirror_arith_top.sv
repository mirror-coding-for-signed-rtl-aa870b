// mirror_arith_top: the mirror-code arithmetic units side by side.
//
// The units are independent examples of one idea: writing numbers with the mirror
// weight set {+2^n, -2^(n-1), ..., -2^0} next to (or instead of) the two's complement
// set {-2^n, 2^(n-1), ..., 2^0}. They share no signals; each brings out its own ports,
// prefixed by its name:
//   vm_*   variable mode adder/subtractor (mode bit + 4-digit word, result in x's mode)
//   fl_*   ordinary <-> mirror converter (sign flipper), 4 digits
//   mc_*   one-digit mirror cell, x + y - r = 2 r1 - shat
//   xr_*   4-digit adder s = x + y - r0
//   sd_*   3-digit carry-free signed-digit adder
//   so_*   4-bit binary adder with signed-digit output
//   nb_*   4-bit binary adder with base -2 output (7 digits)
//   ha_*   4-bit adder made of half adders only
//   pa_*, pb_*, pc_*  the three one-bit operators of a signed array multiplier
//   p2_*   inputs shared by its three two-bit cells: p2a_* ordinary two-bit adder,
//          p2b_* mirror code two-bit adder, p2m_* cascade (A cell low, B cell high)
// Everything is combinational; there is no clock or reset. All widths are the
// sub-modules' defaults.
module mirror_arith_top
  import mirror_pkg::*;
(
  // variable mode adder/subtractor
  input  logic            vm_x_mode,
  input  logic [3:0]      vm_x,
  input  logic            vm_y_mode,
  input  logic [3:0]      vm_y,
  input  logic            vm_neg_x,
  input  logic            vm_neg_y,
  output logic            vm_s_mode,
  output logic [3:0]      vm_s,
  output logic            vm_ovf,
  // sign flipper
  input  logic [3:0]      fl_x,
  output logic [3:0]      fl_xhat,
  // mirror cell
  input  logic            mc_x,
  input  logic            mc_y,
  input  logic            mc_r,
  output logic            mc_shat,
  output logic            mc_r1,
  // x + y - r0 adder
  input  logic [3:0]      xr_x,
  input  logic [3:0]      xr_y,
  input  logic            xr_r0,
  output logic [3:0]      xr_s,
  output logic            xr_r_out,
  // signed-digit adder
  input  sd_digit_t [2:0] sd_x,
  input  sd_digit_t [2:0] sd_y,
  output sd_digit_t [3:0] sd_s,
  // binary adder with signed-digit output
  input  logic [3:0]      so_x,
  input  logic [3:0]      so_y,
  output sd_digit_t [4:0] so_s,
  // binary adder with base -2 output
  input  logic [3:0]      nb_x,
  input  logic [3:0]      nb_y,
  output logic [6:0]      nb_z,
  output logic [6:0]      nb_cout,
  // half-adder array adder
  input  logic [3:0]      ha_x,
  input  logic [3:0]      ha_y,
  output logic [4:0]      ha_s,
  // multiplier cells (a), (b), (c)
  input  logic [2:0]      pa_xyr,
  output logic [1:0]      pa_r1s,
  input  logic [2:0]      pb_xyr,
  output logic [1:0]      pb_r1s,
  input  logic [2:0]      pc_xyr,
  output logic [1:0]      pc_r1s,
  // multiplier two-bit cells
  input  logic [1:0]      p2_x,
  input  logic [1:0]      p2_y,
  input  logic            p2_r,
  output logic [1:0]      p2a_s,
  output logic            p2a_r2,
  output logic [1:0]      p2b_s,
  output logic            p2b_r2,
  output logic [1:0]      p2m_s,
  output logic            p2m_r2
);

  vm_addsub u_vm (
    .x_mode (vm_x_mode), .x (vm_x), .y_mode (vm_y_mode), .y (vm_y),
    .neg_x  (vm_neg_x),  .neg_y (vm_neg_y),
    .s_mode (vm_s_mode), .s (vm_s), .ovf (vm_ovf)
  );

  sign_flipper u_fl (.x (fl_x), .xhat (fl_xhat));

  mirror_cell u_mc (.x (mc_x), .y (mc_y), .r (mc_r), .shat (mc_shat), .r1 (mc_r1));

  xy_minus_r_adder u_xr (.x (xr_x), .y (xr_y), .r0 (xr_r0), .s (xr_s), .r_out (xr_r_out));

  sd_adder u_sd (.x (sd_x), .y (sd_y), .s (sd_s));

  sd_out_adder u_so (.x (so_x), .y (so_y), .s (so_s));

  negabinary_adder u_nb (.x (nb_x), .y (nb_y), .z (nb_z), .cout (nb_cout));

  ha_array_adder u_ha (.x (ha_x), .y (ha_y), .s (ha_s));

  pezaris_cell #(.KIND(CELL_A)) u_pa (
    .x (pa_xyr[2]), .y (pa_xyr[1]), .r (pa_xyr[0]), .s (pa_r1s[0]), .r1 (pa_r1s[1])
  );
  pezaris_cell #(.KIND(CELL_B)) u_pb (
    .x (pb_xyr[2]), .y (pb_xyr[1]), .r (pb_xyr[0]), .s (pb_r1s[0]), .r1 (pb_r1s[1])
  );
  pezaris_cell #(.KIND(CELL_C)) u_pc (
    .x (pc_xyr[2]), .y (pc_xyr[1]), .r (pc_xyr[0]), .s (pc_r1s[0]), .r1 (pc_r1s[1])
  );

  pezaris_cell2 #(.KIND_LO(CELL_A), .KIND_HI(CELL_A)) u_p2a (
    .x (p2_x), .y (p2_y), .r (p2_r), .s (p2a_s), .r2 (p2a_r2)
  );
  pezaris_cell2 #(.KIND_LO(CELL_B), .KIND_HI(CELL_B)) u_p2b (
    .x (p2_x), .y (p2_y), .r (p2_r), .s (p2b_s), .r2 (p2b_r2)
  );
  pezaris_cell2 #(.KIND_LO(CELL_A), .KIND_HI(CELL_B)) u_p2m (
    .x (p2_x), .y (p2_y), .r (p2_r), .s (p2m_s), .r2 (p2m_r2)
  );

endmodule
