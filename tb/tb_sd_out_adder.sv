// tb_sd_out_adder: exhaustive check of the binary adder with signed-digit output at
// N = 4 and N = 6: the digits must be legal codes and sum_i s_i 2^i must equal x + y.
module tb_sd_out_adder;
  import mirror_pkg::*;
  logic [3:0] x4, y4;
  logic [5:0] x6, y6;
  sd_digit_t [4:0] s4;
  sd_digit_t [6:0] s6;
  int checks = 0, failures = 0;
  int n_neg_digit = 0;

  sd_out_adder          dut4 (.x(x4), .y(y4), .s(s4));
  sd_out_adder #(.N(6)) dut6 (.x(x6), .y(y6), .s(s6));

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
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        int v;
        x4 = 4'(i); y4 = 4'(j);
        #1;
        v = 0;
        for (int k = 0; k <= 4; k++) begin
          v += dval(s4[k]) << k;
          if (s4[k] == SD_NEG) n_neg_digit++;
          checks++;
          if (s4[k] == 2'b10) begin failures++; $display("illegal digit"); end
        end
        checks++;
        if (v != i + j) begin failures++; $display("N=4: %0d + %0d gave %0d", i, j, v); end
      end
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        int v;
        x6 = 6'(i); y6 = 6'(j);
        #1;
        v = 0;
        for (int k = 0; k <= 6; k++) v += dval(s6[k]) << k;
        checks++;
        if (v != i + j) begin failures++; $display("N=6: %0d + %0d gave %0d", i, j, v); end
      end
    checks++;
    if (n_neg_digit == 0) begin failures++; $display("no -1 digit was ever produced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
