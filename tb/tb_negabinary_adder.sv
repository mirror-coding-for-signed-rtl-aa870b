// tb_negabinary_adder: exhaustive check of the base -2 output adder at N = 4 and N = 6.
// The result digits, weighted -(-2)^i, must add up to x + y, and no carry may leave
// the array.
module tb_negabinary_adder;
  logic [3:0] x4, y4;
  logic [6:0] z4, c4;
  logic [5:0] x6, y6;
  logic [8:0] z6, c6;
  int checks = 0, failures = 0;

  negabinary_adder          dut4 (.x(x4), .y(y4), .z(z4), .cout(c4));
  negabinary_adder #(.N(6)) dut6 (.x(x6), .y(y6), .z(z6), .cout(c6));

  function automatic int weight(input int i);
    return (i % 2 == 0) ? -(1 << i) : (1 << i);
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
        for (int k = 0; k < 7; k++) v += int'(z4[k]) * weight(k);
        checks++;
        if (v != i + j) begin failures++; $display("N=4: %0d + %0d gave %0d (z=%b)", i, j, v, z4); end
        checks++;
        if (c4 != '0) begin failures++; $display("N=4: carry out %b", c4); end
      end
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        int v;
        x6 = 6'(i); y6 = 6'(j);
        #1;
        v = 0;
        for (int k = 0; k < 9; k++) v += int'(z6[k]) * weight(k);
        checks++;
        if (v != i + j) begin failures++; $display("N=6: %0d + %0d gave %0d", i, j, v); end
        checks++;
        if (c6 != '0) begin failures++; $display("N=6: carry out %b", c6); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
