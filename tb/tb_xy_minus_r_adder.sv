// tb_xy_minus_r_adder: exhaustive check of s = x + y - r0 (modulo 2^W) for all three
// structures at W = 4, and for the default structure at W = 6. The ripple output
// r_out is checked against the unsigned arithmetic of the row that produces it:
//   XR_FLIP_SUB  borrow of x - (-y) - r0      = [x < (-y mod 2^W) + r0]
//   XR_FLIP_ADD  carry of (-x) + (-y) + r0    = [(-x mod 2^W) + (-y mod 2^W) + r0 >= 2^W]
//   XR_ADD_DEC   borrow of ((x + y) mod 2^W) - r0 = [r0 and (x + y) mod 2^W = 0]
module tb_xy_minus_r_adder;
  import mirror_pkg::*;

  logic [3:0] x4, y4, s4_fs, s4_fa, s4_ad;
  logic [5:0] x6, y6, s6;
  logic       r0, ro4_fs, ro4_fa, ro4_ad, ro6;
  int checks = 0, failures = 0;

  xy_minus_r_adder                            dut_fs (.x(x4), .y(y4), .r0(r0), .s(s4_fs), .r_out(ro4_fs));
  xy_minus_r_adder #(.STRUCTURE(XR_FLIP_ADD)) dut_fa (.x(x4), .y(y4), .r0(r0), .s(s4_fa), .r_out(ro4_fa));
  xy_minus_r_adder #(.STRUCTURE(XR_ADD_DEC))  dut_ad (.x(x4), .y(y4), .r0(r0), .s(s4_ad), .r_out(ro4_ad));
  xy_minus_r_adder #(.W(6))                   dut6   (.x(x6), .y(y6), .r0(r0), .s(s6), .r_out(ro6));

  task automatic check(input int got, input int want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: x=%0d y=%0d r0=%0d gave %0d, expected %0d", what, x4, y4, r0, got, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++) begin
      r0 = 1'(b);
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          int want, nx, ny, u;
          x4 = 4'(i); y4 = 4'(j);
          #1;
          want = (i + j - b + 32) % 16;
          nx   = (16 - i) % 16;
          ny   = (16 - j) % 16;
          u    = (i + j) % 16;
          check(int'(s4_fs), want, "flip+sub s");
          check(int'(s4_fa), want, "flip+add s");
          check(int'(s4_ad), want, "add+dec s");
          check(int'(ro4_fs), (i < ny + b) ? 1 : 0, "flip+sub r_out");
          check(int'(ro4_fa), (nx + ny + b >= 16) ? 1 : 0, "flip+add r_out");
          check(int'(ro4_ad), (b == 1 && u == 0) ? 1 : 0, "add+dec r_out");
        end
      for (int i = 0; i < 64; i++)
        for (int j = 0; j < 64; j++) begin
          x6 = 6'(i); y6 = 6'(j);
          #1;
          checks++;
          if (s6 != 6'((i + j - b + 128) % 64)) begin
            failures++;
            $display("W=6: %0d + %0d - %0d gave %0d", i, j, b, s6);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
