// tb_d_cell: exhaustive check of the (d) cell in its three output codes.
// For each input pair the value v - u must be represented: direct -2r + s with mode
// 0, mirror 2r - s with mode 1, variable mode (-1)^mode (-2r + s). The variable-mode
// code is also compared with its table: 0;00, 0;01, 1;01, 1;00 for u v = 00, 01, 10, 11.
module tb_d_cell;
  import mirror_pkg::*;
  logic u, v;
  logic m0, r0, s0, m1, r1, s1, mv, rv, sv;
  int checks = 0, failures = 0;

  d_cell #(.CODE(D_DIRECT))   dut0 (.u(u), .v(v), .mode(m0), .r(r0), .s(s0));
  d_cell #(.CODE(D_MIRROR))   dut1 (.u(u), .v(v), .mode(m1), .r(r1), .s(s1));
  d_cell #(.CODE(D_VARIABLE)) dutv (.u(u), .v(v), .mode(mv), .r(rv), .s(sv));

  localparam logic [2:0] VTABLE [4] = '{3'b0_00, 3'b0_01, 3'b1_01, 3'b1_00};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: u=%0b v=%0b got %0d want %0d", what, u, v, got, want);
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin
      int want, dv;
      {u, v} = 2'(k);
      #1;
      want = int'(v) - int'(u);
      expect_eq(-2 * int'(r0) + int'(s0), want, "direct value");
      expect_eq(int'(m0), 0, "direct mode");
      expect_eq(2 * int'(r1) - int'(s1), want, "mirror value");
      expect_eq(int'(m1), 1, "mirror mode");
      dv = -2 * int'(rv) + int'(sv);
      expect_eq(mv ? -dv : dv, want, "variable value");
      expect_eq(int'({mv, rv, sv}), int'(VTABLE[k]), "variable code");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
