// tb_ha_array_adder: exhaustive check of the half-adder array adder at N = 4 and N = 6.
module tb_ha_array_adder;
  logic [3:0] x4, y4;
  logic [4:0] s4;
  logic [5:0] x6, y6;
  logic [6:0] s6;
  int checks = 0, failures = 0;

  ha_array_adder          dut4 (.x(x4), .y(y4), .s(s4));
  ha_array_adder #(.N(6)) dut6 (.x(x6), .y(y6), .s(s6));

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
        x4 = 4'(i); y4 = 4'(j);
        #1;
        checks++;
        if (int'(s4) != i + j) begin failures++; $display("N=4: %0d + %0d gave %0d", i, j, s4); end
      end
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        x6 = 6'(i); y6 = 6'(j);
        #1;
        checks++;
        if (int'(s6) != i + j) begin failures++; $display("N=6: %0d + %0d gave %0d", i, j, s6); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
