// tb_pezaris_cell: exhaustive check of the three one-bit multiplier operators.
//   (a)  x + y + r = 2 r1 + s      (b) -x + y + r = 2 r1 - s      (c) x - y - r = s - 2 r1
module tb_pezaris_cell;
  import mirror_pkg::*;
  logic x, y, r;
  logic sa, ra, sb, rb, sc, rc;
  int checks = 0, failures = 0;

  pezaris_cell #(.KIND(CELL_A)) dut_a (.x(x), .y(y), .r(r), .s(sa), .r1(ra));
  pezaris_cell #(.KIND(CELL_B)) dut_b (.x(x), .y(y), .r(r), .s(sb), .r1(rb));
  pezaris_cell #(.KIND(CELL_C)) dut_c (.x(x), .y(y), .r(r), .s(sc), .r1(rc));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      int vx, vy, vr;
      {x, y, r} = 3'(k);
      vx = int'(x); vy = int'(y); vr = int'(r);
      #1;
      checks++;
      if (vx + vy + vr != 2 * int'(ra) + int'(sa)) begin
        failures++; $display("cell a wrong at %03b", k[2:0]);
      end
      checks++;
      if (-vx + vy + vr != 2 * int'(rb) - int'(sb)) begin
        failures++; $display("cell b wrong at %03b", k[2:0]);
      end
      checks++;
      if (vx - vy - vr != int'(sc) - 2 * int'(rc)) begin
        failures++; $display("cell c wrong at %03b", k[2:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
