// tb_mirror_cell: exhaustive check of the one-digit mirror-code cell.
// For all eight inputs it checks the value identity x + y - r = 2*r1 - shat and the
// digit pair against the cell's truth table, written out here by hand.
module tb_mirror_cell;
  logic x, y, r, shat, r1;
  int checks = 0, failures = 0;

  mirror_cell dut (.x(x), .y(y), .r(r), .shat(shat), .r1(r1));

  // Expected {r1, shat} for input index {x, y, r}.
  localparam logic [1:0] TABLE [8] = '{2'b00, 2'b01, 2'b11, 2'b00, 2'b11, 2'b00, 2'b10, 2'b11};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      {x, y, r} = 3'(k);
      #1;
      checks++;
      if (int'(x) + int'(y) - int'(r) != 2 * int'(r1) - int'(shat)) begin
        failures++;
        $display("value mismatch x=%0b y=%0b r=%0b -> r1=%0b shat=%0b", x, y, r, r1, shat);
      end
      checks++;
      if ({r1, shat} != TABLE[k]) begin
        failures++;
        $display("table mismatch at %03b: got %02b want %02b", k[2:0], {r1, shat}, TABLE[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
