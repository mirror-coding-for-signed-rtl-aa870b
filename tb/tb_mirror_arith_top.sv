// tb_mirror_arith_top: end-to-end test of every unit through the top's ports, with
// all parameters at their defaults.
// Random operands drive all units at once; each output is compared with an
// arithmetic reference written here. The test also counts how often each mechanism
// of the units occurred and fails if one never did:
//   subtraction by differing modes, negation by a mode flip, the cosum -(x+y),
//   overflow, a mirror result, negation of -2^n without overflow, a mirror cell
//   digit pair of value -1 and of value +2, a borrowed unit r0 = 1, level-A and
//   level-B transfers in the signed-digit adder, -1 output digits, base -2 digits of
//   both signs, a carry rippling through every half-adder level, all three
//   one-bit multiplier cells, and a carry out of each of the three two-bit cells.
module tb_mirror_arith_top;
  import mirror_pkg::*;

  logic vm_x_mode, vm_y_mode, vm_neg_x, vm_neg_y, vm_s_mode, vm_ovf;
  logic [3:0] vm_x, vm_y, vm_s;
  logic [3:0] fl_x, fl_xhat;
  logic mc_x, mc_y, mc_r, mc_shat, mc_r1;
  logic [3:0] xr_x, xr_y, xr_s;
  logic xr_r0, xr_r_out;
  sd_digit_t [2:0] sd_x, sd_y;
  sd_digit_t [3:0] sd_s;
  logic [3:0] so_x, so_y;
  sd_digit_t [4:0] so_s;
  logic [3:0] nb_x, nb_y;
  logic [6:0] nb_z, nb_cout;
  logic [3:0] ha_x, ha_y;
  logic [4:0] ha_s;
  logic [2:0] pa_xyr, pb_xyr, pc_xyr;
  logic [1:0] pa_r1s, pb_r1s, pc_r1s;
  logic [1:0] p2_x, p2_y, p2a_s, p2b_s, p2m_s;
  logic p2_r, p2a_r2, p2b_r2, p2m_r2;

  int checks = 0, failures = 0;

  typedef enum int {
    EV_VM_SUB, EV_VM_NEG, EV_VM_COSUM, EV_VM_OVF, EV_VM_MIRROR, EV_FL_MIN,
    EV_MC_M1, EV_MC_P2, EV_XR_R0, EV_SD_TA, EV_SD_TB, EV_SD_NEG, EV_SO_NEG,
    EV_NB_NEG, EV_NB_POS, EV_HA_RIPPLE, EV_PZ_B, EV_PZ_C,
    EV_P2A_CARRY, EV_P2B_CARRY, EV_P2M_CARRY, EV_COUNT
  } event_e;
  int seen [EV_COUNT];

  mirror_arith_top dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int vm_value(input logic mode, input logic [3:0] w);
    return mode ? -int'($signed(w)) : int'($signed(w));
  endfunction

  function automatic int sd_val(input sd_digit_t d);
    return (d == SD_POS) ? 1 : (d == SD_NEG) ? -1 : 0;
  endfunction

  function automatic sd_digit_t sd_enc(input int d);
    return (d > 0) ? SD_POS : (d < 0) ? SD_NEG : SD_ZERO;
  endfunction

  task automatic expect_eq(input int got, input int want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    for (int e = 0; e < EV_COUNT; e++) seen[e] = 0;
    for (int it = 0; it < 20000; it++) begin
      int vx, vy, want, v;
      {vm_x_mode, vm_y_mode, vm_neg_x, vm_neg_y} = 4'($urandom);
      vm_x = 4'($urandom); vm_y = 4'($urandom);
      fl_x = (it % 50 == 0) ? 4'b1000 : 4'($urandom);
      {mc_x, mc_y, mc_r} = 3'($urandom);
      xr_x = 4'($urandom); xr_y = 4'($urandom); xr_r0 = 1'($urandom);
      vx = 0; vy = 0;
      for (int i = 0; i < 3; i++) begin
        int dx, dy;
        dx = int'($urandom_range(2)) - 1;
        dy = int'($urandom_range(2)) - 1;
        sd_x[i] = sd_enc(dx); sd_y[i] = sd_enc(dy);
        vx += dx << i; vy += dy << i;
      end
      so_x = 4'($urandom); so_y = 4'($urandom);
      nb_x = 4'($urandom); nb_y = 4'($urandom);
      ha_x = (it % 40 == 0) ? 4'hF : 4'($urandom);
      ha_y = (it % 40 == 0) ? 4'h1 : 4'($urandom);
      pa_xyr = 3'($urandom); pb_xyr = 3'($urandom); pc_xyr = 3'($urandom);
      {p2_x, p2_y, p2_r} = 5'($urandom);
      #1;

      // variable mode unit: result in x's effective mode
      want = (vm_neg_x ? -1 : 1) * vm_value(vm_x_mode, vm_x)
           + (vm_neg_y ? -1 : 1) * vm_value(vm_y_mode, vm_y);
      expect_eq(int'(vm_s_mode), (vm_x_mode ^ vm_neg_x) ? 1 : 0, "vm mode");
      if (vm_s_mode ? (want >= -7 && want <= 8) : (want >= -8 && want <= 7)) begin
        expect_eq(int'(vm_ovf), 0, "vm ovf");
        expect_eq(vm_value(vm_s_mode, vm_s), want, "vm value");
        if (vm_s_mode) seen[EV_VM_MIRROR]++;
      end else begin
        expect_eq(int'(vm_ovf), 1, "vm ovf");
        seen[EV_VM_OVF]++;
      end
      if ((vm_x_mode ^ vm_neg_x) != (vm_y_mode ^ vm_neg_y)) seen[EV_VM_SUB]++;
      if (vm_neg_x ^ vm_neg_y) seen[EV_VM_NEG]++;
      if (vm_neg_x && vm_neg_y) seen[EV_VM_COSUM]++;

      // sign flipper
      expect_eq(int'(fl_xhat), (16 - int'(fl_x)) % 16, "flipper");
      if (fl_x == 4'b1000 && fl_xhat == 4'b1000) seen[EV_FL_MIN]++;

      // mirror cell
      v = 2 * int'(mc_r1) - int'(mc_shat);
      expect_eq(v, int'(mc_x) + int'(mc_y) - int'(mc_r), "mirror cell");
      if (v == -1) seen[EV_MC_M1]++;
      if (v == 2) seen[EV_MC_P2]++;

      // x + y - r0
      expect_eq(int'(xr_s), (int'(xr_x) + int'(xr_y) - int'(xr_r0) + 32) % 16, "x+y-r0");
      if (xr_r0) seen[EV_XR_R0]++;

      // signed-digit adder
      v = 0;
      for (int i = 0; i <= 3; i++) begin
        v += sd_val(sd_s[i]) << i;
        if (sd_s[i] == SD_NEG) seen[EV_SD_NEG]++;
      end
      expect_eq(v, vx + vy, "sd adder");
      for (int i = 1; i <= 3; i++) begin
        if (dut.u_sd.u_sec.ta[i] != 0) seen[EV_SD_TA]++;
        if (dut.u_sd.u_sec.tb[i] != 0) seen[EV_SD_TB]++;
      end

      // binary adder, signed-digit output
      v = 0;
      for (int i = 0; i <= 4; i++) begin
        v += sd_val(so_s[i]) << i;
        if (so_s[i] == SD_NEG) seen[EV_SO_NEG]++;
      end
      expect_eq(v, int'(so_x) + int'(so_y), "sd-output adder");

      // base -2 output adder
      v = 0;
      for (int i = 0; i < 7; i++) begin
        v += int'(nb_z[i]) * ((i % 2 == 0) ? -(1 << i) : (1 << i));
        if (nb_z[i] && i % 2 == 0) seen[EV_NB_NEG]++;
        if (nb_z[i] && i % 2 == 1) seen[EV_NB_POS]++;
      end
      expect_eq(v, int'(nb_x) + int'(nb_y), "base -2 adder");
      expect_eq(int'(nb_cout), 0, "base -2 carry out");

      // half-adder array
      expect_eq(int'(ha_s), int'(ha_x) + int'(ha_y), "half-adder array");
      if (ha_x == 4'hF && ha_y == 4'h1) seen[EV_HA_RIPPLE]++;

      // multiplier cells
      expect_eq(2 * int'(pa_r1s[1]) + int'(pa_r1s[0]),
                int'(pa_xyr[2]) + int'(pa_xyr[1]) + int'(pa_xyr[0]), "cell a");
      expect_eq(2 * int'(pb_r1s[1]) - int'(pb_r1s[0]),
                -int'(pb_xyr[2]) + int'(pb_xyr[1]) + int'(pb_xyr[0]), "cell b");
      expect_eq(int'(pc_r1s[0]) - 2 * int'(pc_r1s[1]),
                int'(pc_xyr[2]) - int'(pc_xyr[1]) - int'(pc_xyr[0]), "cell c");
      if (pb_xyr[2] && !pb_xyr[1]) seen[EV_PZ_B]++;
      if (pc_xyr[1] || pc_xyr[0]) seen[EV_PZ_C]++;

      // two-bit multiplier cells
      expect_eq(4 * int'(p2a_r2) + int'(p2a_s),
                int'(p2_x) + int'(p2_y) + int'(p2_r), "2-bit cell a a");
      expect_eq(4 * int'(p2b_r2) - int'(p2b_s),
                -int'(p2_x) + int'(p2_y) + int'(p2_r), "2-bit cell b b");
      expect_eq(4 * int'(p2m_r2) - 2 * int'(p2m_s[1]) + int'(p2m_s[0]),
                int'(p2_x[0]) - 2 * int'(p2_x[1]) + int'(p2_y) + int'(p2_r), "2-bit cell a b");
      if (p2a_r2) seen[EV_P2A_CARRY]++;
      if (p2b_r2) seen[EV_P2B_CARRY]++;
      if (p2m_r2) seen[EV_P2M_CARRY]++;
    end

    for (int e = 0; e < EV_COUNT; e++) begin
      event_e ev;
      ev = event_e'(e);
      $display("%-14s %0d", ev.name(), seen[e]);
      checks++;
      if (seen[e] == 0) begin
        failures++;
        $display("mechanism %s never happened", ev.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
