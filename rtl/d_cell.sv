// d_cell: adds a digit of negative weight and a digit of positive weight.
//
// Inputs u and v are bits; the cell forms v(v) - v(u), a value in {-1, 0, +1}, and
// writes it in one of three two-digit codes chosen by CODE:
//   D_DIRECT   (d0): value = -2 r + s,  r = u & ~v,  s = u ^ v   (-1 is "1 1")
//   D_MIRROR   (d1): value = +2 r - s,  r = ~u & v,  s = u ^ v   (+1 is "1 1")
//   D_VARIABLE     : value = (-1)^mode * (-2 r + s) with r = 0, s = u ^ v and
//                    mode = u; -1 is mode 1 (mirror) with digits "0 1".
// The sum digit is u ^ v in every code; only the carry (or the mode) differs.
// The three codes and the gate equations of (d0) and (d1) are the source's; the
// variable-mode gate equations are read off its code table. mode is 0 in the direct
// and 1 in the mirror code. Purely combinational.
module d_cell
  import mirror_pkg::*;
#(
  parameter d_code_e CODE = D_DIRECT
) (
  input  logic u,     // weight -1
  input  logic v,     // weight +1
  output logic mode,  // code of the output: 0 direct, 1 mirror
  output logic r,     // carry digit
  output logic s      // sum digit
);

  always_comb begin
    s = u ^ v;
    unique case (CODE)
      D_DIRECT: begin
        mode = 1'b0;
        r    = u & ~v;
      end
      D_MIRROR: begin
        mode = 1'b1;
        r    = ~u & v;
      end
      default: begin  // D_VARIABLE
        mode = u;
        r    = 1'b0;
      end
    endcase
  end

endmodule
