// tb_mirror_ha: exhaustive check of the mirror-code half adder: u + v = 2 r - s, and
// the two-digit codes 0 -> 00, 1 -> 11, 2 -> 10.
module tb_mirror_ha;
  logic u, v, r, s;
  int checks = 0, failures = 0;

  mirror_ha dut (.u(u), .v(v), .r(r), .s(s));

  localparam logic [1:0] CODE [4] = '{2'b00, 2'b11, 2'b11, 2'b10};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      {u, v} = 2'(k);
      #1;
      checks++;
      if (int'(u) + int'(v) != 2 * int'(r) - int'(s)) begin
        failures++; $display("value wrong for u=%0b v=%0b", u, v);
      end
      checks++;
      if ({r, s} != CODE[k]) begin
        failures++; $display("code wrong for u=%0b v=%0b: %02b", u, v, {r, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
