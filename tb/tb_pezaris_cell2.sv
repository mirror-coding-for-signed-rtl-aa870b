// tb_pezaris_cell2: exhaustive check of the five legal two-bit cells (A A, B B, A B,
// B A, C C) over all 32 input patterns. The reference is the weighted sum of the
// cell's terms, with the sign of each term taken from the one-bit operator that
// owns it: both sides of
//   sum_i 2^i (sg(x_i) x_i + sg(y_i) y_i) + sg(r) r = 4 sg(r2) r2 + sum_i 2^i sg(s_i) s_i
// are computed here and compared.
module tb_pezaris_cell2;
  import mirror_pkg::*;

  localparam int NCELL = 5;
  localparam cell_kind_e LO [NCELL] = '{CELL_A, CELL_B, CELL_A, CELL_B, CELL_C};
  localparam cell_kind_e HI [NCELL] = '{CELL_A, CELL_B, CELL_B, CELL_A, CELL_C};

  logic [1:0] x, y;
  logic       r;
  logic [1:0] s  [NCELL];
  logic       r2 [NCELL];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NCELL; k++) begin : g_dut
    pezaris_cell2 #(.KIND_LO(LO[k]), .KIND_HI(HI[k])) dut (
      .x (x), .y (y), .r (r), .s (s[k]), .r2 (r2[k])
    );
  end

  // Signs of the terms of a one-bit operator.
  function automatic int sg_x(cell_kind_e k);
    return (k == CELL_B) ? -1 : 1;
  endfunction
  function automatic int sg_y(cell_kind_e k);
    return (k == CELL_C) ? -1 : 1;
  endfunction
  function automatic int sg_r(cell_kind_e k);   // carry in, and carry out
    return (k == CELL_C) ? -1 : 1;
  endfunction
  function automatic int sg_s(cell_kind_e k);
    return (k == CELL_B) ? -1 : 1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {x, y, r} = 5'(v);
      #1;
      for (int k = 0; k < NCELL; k++) begin
        int lhs, rhs;
        lhs = sg_x(LO[k]) * int'(x[0]) + sg_y(LO[k]) * int'(y[0]) + sg_r(LO[k]) * int'(r)
            + 2 * (sg_x(HI[k]) * int'(x[1]) + sg_y(HI[k]) * int'(y[1]));
        rhs = sg_s(LO[k]) * int'(s[k][0]) + 2 * sg_s(HI[k]) * int'(s[k][1])
            + 4 * sg_r(HI[k]) * int'(r2[k]);
        checks++;
        if (lhs != rhs) begin
          failures++;
          $display("cell %s/%s: x=%b y=%b r=%b gave s=%b r2=%b (%0d, expected %0d)",
                   LO[k].name(), HI[k].name(), x, y, r, s[k], r2[k], rhs, lhs);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
