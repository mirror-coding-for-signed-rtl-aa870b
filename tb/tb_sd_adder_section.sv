// tb_sd_adder_section: two default (3-rank) sections placed side by side form a
// 6-digit signed-digit adder; the low section's transfer outputs feed the high
// section's transfer inputs, and the low section's inputs are zero.
// All 3^12 operand pairs are applied. Checked: every digit is a legal code, the low
// section alone satisfies sum(s) + (t1_out + t2_out) 2^3 = x_lo + y_lo, and the
// result of both sections plus the final transfers equals x + y. It also counts
// transfers that cross the section boundary.
module tb_sd_adder_section;
  import mirror_pkg::*;
  sd_digit_t [2:0] xl, yl, xh, yh, sl, sh;
  sd_digit_t t1m, t2m, t1h, t2h;
  int checks = 0, failures = 0;
  int n_cross1 = 0, n_cross2 = 0;

  sd_adder_section lo (.x(xl), .y(yl), .t1_in(SD_ZERO), .t2_in(SD_ZERO),
                       .s(sl), .t1_out(t1m), .t2_out(t2m));
  sd_adder_section hi (.x(xh), .y(yh), .t1_in(t1m), .t2_in(t2m),
                       .s(sh), .t1_out(t1h), .t2_out(t2h));

  function automatic sd_digit_t enc(input int d);
    return (d > 0) ? SD_POS : (d < 0) ? SD_NEG : SD_ZERO;
  endfunction

  function automatic int dval(input sd_digit_t d);
    return (d == SD_POS) ? 1 : (d == SD_NEG) ? -1 : 0;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    total = 1;
    for (int k = 0; k < 12; k++) total *= 3;
    for (int c = 0; c < total; c++) begin
      int t, vxl, vyl, vxh, vyh, vlo, vall;
      t = c; vxl = 0; vyl = 0; vxh = 0; vyh = 0;
      for (int i = 0; i < 3; i++) begin xl[i] = enc(t % 3 - 1); vxl += (t % 3 - 1) << i; t /= 3; end
      for (int i = 0; i < 3; i++) begin yl[i] = enc(t % 3 - 1); vyl += (t % 3 - 1) << i; t /= 3; end
      for (int i = 0; i < 3; i++) begin xh[i] = enc(t % 3 - 1); vxh += (t % 3 - 1) << i; t /= 3; end
      for (int i = 0; i < 3; i++) begin yh[i] = enc(t % 3 - 1); vyh += (t % 3 - 1) << i; t /= 3; end
      #1;
      vlo = 0;
      vall = 0;
      for (int i = 0; i < 3; i++) begin
        vlo  += dval(sl[i]) << i;
        vall += (dval(sl[i]) << i) + (dval(sh[i]) << (i + 3));
      end
      checks++;
      if (sl == 6'b10_10_10 || sh == 6'b10_10_10 || t1h == 2'b10 || t2h == 2'b10 ||
          t1m == 2'b10 || t2m == 2'b10) begin
        failures++; $display("illegal digit code");
      end
      checks++;
      if (vlo + ((dval(t1m) + dval(t2m)) << 3) != vxl + vyl) begin
        failures++; $display("low section identity fails for case %0d", c);
      end
      vall += (dval(t1h) + dval(t2h)) << 6;
      checks++;
      if (vall != vxl + vyl + ((vxh + vyh) << 3)) begin
        failures++; $display("two sections: got %0d want %0d", vall, vxl + vyl + ((vxh + vyh) << 3));
      end
      if (t1m != SD_ZERO) n_cross1++;
      if (t2m != SD_ZERO) n_cross2++;
    end
    checks++;
    if (n_cross1 == 0 || n_cross2 == 0) begin
      failures++; $display("a transfer never crossed the section boundary");
    end
    $display("transfers t' across: %0d, t'' across: %0d", n_cross1, n_cross2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
