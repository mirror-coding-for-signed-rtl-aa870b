// tb_sign_flipper: exhaustive check of the ordinary/mirror converter at 4 and 8 digits.
// The output must be the two's complement negation of the input (modulo 2^W), and
// converting twice must give the input back. It also checks the worked example
// -3 = 1101 (ordinary) = 0011 (mirror).
module tb_sign_flipper;
  logic [3:0] x4, h4, hh4;
  logic [7:0] x8, h8;
  int checks = 0, failures = 0;

  sign_flipper             dut4  (.x(x4), .xhat(h4));
  sign_flipper             dut4b (.x(h4), .xhat(hh4));
  sign_flipper #(.W(8))    dut8  (.x(x8), .xhat(h8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      x4 = 4'(k);
      #1;
      checks++;
      if (h4 != 4'((16 - k) % 16)) begin
        failures++;
        $display("W=4: x=%0d got %0d", k, h4);
      end
      checks++;
      if (hh4 != x4) begin
        failures++;
        $display("W=4: double conversion of %0d gave %0d", k, hh4);
      end
    end
    // -3 is 1101 in ordinary code and 0011 in mirror code
    x4 = 4'b1101;
    #1;
    checks++;
    if (h4 != 4'b0011) begin
      failures++;
      $display("1101 converted to %b, want 0011", h4);
    end
    for (int k = 0; k < 256; k++) begin
      x8 = 8'(k);
      #1;
      checks++;
      if (h8 != 8'((256 - k) % 256)) begin
        failures++;
        $display("W=8: x=%0d got %0d", k, h8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
