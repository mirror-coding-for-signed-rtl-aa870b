// tb_sd_adder: exhaustive check of the three-level signed-digit adder at N = 3 and 4.
// Every operand pair of digits in {-1, 0, 1} is applied; the result must have value
// x + y, and every result digit must be a legal code (never 10).
module tb_sd_adder;
  import mirror_pkg::*;
  sd_digit_t [2:0] x3, y3;
  sd_digit_t [3:0] s3;
  sd_digit_t [3:0] x4, y4;
  sd_digit_t [4:0] s4;
  int checks = 0, failures = 0;

  sd_adder          dut3 (.x(x3), .y(y3), .s(s3));
  sd_adder #(.N(4)) dut4 (.x(x4), .y(y4), .s(s4));

  function automatic sd_digit_t enc(input int d);
    return (d > 0) ? SD_POS : (d < 0) ? SD_NEG : SD_ZERO;
  endfunction

  function automatic int dval(input sd_digit_t d);
    return (d == SD_POS) ? 1 : (d == SD_NEG) ? -1 : 0;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total3, total4;
    total3 = 1;
    total4 = 1;
    for (int k = 0; k < 6; k++) total3 *= 3;
    for (int k = 0; k < 8; k++) total4 *= 3;
    for (int c = 0; c < total3; c++) begin
      int t, vx, vy, vs;
      t = c; vx = 0; vy = 0;
      for (int i = 0; i < 3; i++) begin x3[i] = enc(t % 3 - 1); vx += (t % 3 - 1) << i; t /= 3; end
      for (int i = 0; i < 3; i++) begin y3[i] = enc(t % 3 - 1); vy += (t % 3 - 1) << i; t /= 3; end
      #1;
      vs = 0;
      for (int i = 0; i <= 3; i++) begin
        vs += dval(s3[i]) * (1 << i);
        checks++;
        if (s3[i] == 2'b10) begin failures++; $display("N=3 illegal digit"); end
      end
      checks++;
      if (vs != vx + vy) begin
        failures++;
        $display("N=3: %0d + %0d gave %0d", vx, vy, vs);
      end
    end
    for (int c = 0; c < total4; c++) begin
      int t, vx, vy, vs;
      t = c; vx = 0; vy = 0;
      for (int i = 0; i < 4; i++) begin x4[i] = enc(t % 3 - 1); vx += (t % 3 - 1) << i; t /= 3; end
      for (int i = 0; i < 4; i++) begin y4[i] = enc(t % 3 - 1); vy += (t % 3 - 1) << i; t /= 3; end
      #1;
      vs = 0;
      for (int i = 0; i <= 4; i++) begin
        vs += dval(s4[i]) * (1 << i);
        checks++;
        if (s4[i] == 2'b10) begin failures++; $display("N=4 illegal digit"); end
      end
      checks++;
      if (vs != vx + vy) begin
        failures++;
        $display("N=4: %0d + %0d gave %0d", vx, vy, vs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
