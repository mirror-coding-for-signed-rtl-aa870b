// sd_adder_section: N ranks of the carry-free signed-digit adder, with the transfers
// into its lowest rank and out of its highest rank brought out, so that sections
// can be placed side by side to form a longer adder.
//
// Digits are in {-1, 0, +1}. Each rank goes through three levels of cells:
//   level A, cell a:  w = x'_i + y'_i in [-2, 2]. Emits a transfer whenever it can:
//                     t'_(i+1) = sign(w), s'_i = w - 2 t'_(i+1)  (in {-1, 0, 1}).
//   level B, cell b:  w = s'_i + t'_i in [-2, 2]. Emits a transfer only when it must:
//                     t''_(i+1) = +1 / -1 for w = +2 / -2, else 0; s''_i = w - 2 t''_(i+1).
//   level C, cell c:  s_i = s''_i + t''_i, which always lies in {-1, 0, 1}: t''_i = +1
//                     needs s'_(i-1) = +1, hence x'+y' = -1 at rank i-1 and t'_i = -1,
//                     so s''_i = +1 is then impossible (and symmetrically for -1).
// That argument needs t1_in / t2_in to come from a section below (or be zero). An
// assertion checks that no level-C digit leaves {-1, 0, 1}.
// Value: sum_i s_i 2^i + (t1_out + t2_out) 2^N = x + y + t1_in + t2_in.
// Digits are coded in two's complement (00, 01, 11), this design's choice. The cell
// rules and the three-level structure with its transfer ports are the source's.
// Purely combinational; no signal crosses more than two ranks.
module sd_adder_section
  import mirror_pkg::*;
#(
  parameter int unsigned N = 3  // ranks in the section
) (
  input  sd_digit_t [N-1:0] x,
  input  sd_digit_t [N-1:0] y,
  input  sd_digit_t         t1_in,   // t'_0  from the section below
  input  sd_digit_t         t2_in,   // t''_0 from the section below
  output sd_digit_t [N-1:0] s,
  output sd_digit_t         t1_out,  // t'_N
  output sd_digit_t         t2_out   // t''_N
);

  // Small signed values between the levels; index = rank.
  logic signed [2:0] sa [N];     // s'_i
  logic signed [2:0] ta [N+1];   // t'_i
  logic signed [2:0] sb [N];     // s''_i
  logic signed [2:0] tb [N+1];   // t''_i
  logic signed [2:0] sc [N];     // s_i before coding

  always_comb begin
    logic signed [2:0] w;
    ta[0] = 3'(signed'(t1_in));
    tb[0] = 3'(signed'(t2_in));
    // level A
    for (int i = 0; i < N; i++) begin
      w = 3'(signed'(x[i])) + 3'(signed'(y[i]));
      ta[i+1] = (w > 0) ? 3'sd1 : (w < 0) ? -3'sd1 : 3'sd0;
      sa[i]   = w - 3'(ta[i+1] <<< 1);
    end
    // level B
    for (int i = 0; i < N; i++) begin
      w = sa[i] + ta[i];
      tb[i+1] = (w == 3'sd2) ? 3'sd1 : (w == -3'sd2) ? -3'sd1 : 3'sd0;
      sb[i]   = w - 3'(tb[i+1] <<< 1);
    end
    // level C
    for (int i = 0; i < N; i++) begin
      sc[i] = sb[i] + tb[i];
      s[i]  = sd_digit_t'(sc[i]);
    end
    t1_out = sd_digit_t'(ta[N]);
    t2_out = sd_digit_t'(tb[N]);
  end

  // Level C never produces a carry.
  for (genvar i = 0; i < N; i++) begin : g_chk
    always_comb assert (sc[i] >= -3'sd1 && sc[i] <= 3'sd1)
      else $error("sd_adder_section: level C digit %0d out of range at rank %0d", sc[i], i);
  end

endmodule
