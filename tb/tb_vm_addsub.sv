// tb_vm_addsub: exhaustive check of the variable mode adder/subtractor at N = 3,
// both result-mode solutions, all operand modes and all four sign controls.
// Reference: value(mode, w) = (mode ? -1 : +1) * (two's complement of w). The
// expected result (-1)^D x + (-1)^C y is checked against value(s_mode, s), and ovf
// must be set exactly when that result is outside the range of mode s_mode
// ([-8, 7] direct, [-7, 8] mirror). It also checks the mode rule S = A^D or B^C.
module tb_vm_addsub;
  localparam int N = 3;
  logic         xm, ym, nx, ny;
  logic [N:0]   x, y;
  logic         sm1, sm2, ov1, ov2;
  logic [N:0]   s1, s2;
  int checks = 0, failures = 0;
  int n_modeswitch = 0, n_sub = 0, n_ovf = 0;

  vm_addsub #(.N(N), .SOLUTION(1)) dut1 (.x_mode(xm), .x(x), .y_mode(ym), .y(y),
    .neg_x(nx), .neg_y(ny), .s_mode(sm1), .s(s1), .ovf(ov1));
  vm_addsub #(.N(N), .SOLUTION(2)) dut2 (.x_mode(xm), .x(x), .y_mode(ym), .y(y),
    .neg_x(nx), .neg_y(ny), .s_mode(sm2), .s(s2), .ovf(ov2));

  function automatic int value(input logic mode, input logic [N:0] w);
    int tc;
    tc = int'($signed(w));
    return mode ? -tc : tc;
  endfunction

  function automatic bit in_range(input logic mode, input int v);
    int lo, hi;
    lo = -(1 << N);
    hi = (1 << N) - 1;
    return mode ? (v >= -hi && v <= -lo) : (v >= lo && v <= hi);
  endfunction

  task automatic check(input int sol, input logic smode, input logic [N:0] s,
                       input logic ov, input logic want_mode, input int want);
    checks++;
    if (smode != want_mode) begin
      failures++;
      $display("sol%0d: mode %0b want %0b", sol, smode, want_mode);
    end
    checks++;
    if (ov != !in_range(want_mode, want)) begin
      failures++;
      $display("sol%0d: ovf=%0b for result %0d in mode %0b", sol, ov, want, want_mode);
    end else if (!ov) begin
      checks++;
      if (value(smode, s) != want) begin
        failures++;
        $display("sol%0d: A=%0b x=%b B=%0b y=%b D=%0b C=%0b -> S=%0b s=%b (%0d), want %0d",
                 sol, xm, x, ym, y, nx, ny, smode, s, value(smode, s), want);
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ctl = 0; ctl < 16; ctl++) begin
      {xm, ym, nx, ny} = 4'(ctl);
      for (int i = 0; i < (2 << N); i++)
        for (int j = 0; j < (2 << N); j++) begin
          int want;
          x = (N+1)'(i);
          y = (N+1)'(j);
          #1;
          want = (nx ? -1 : 1) * value(xm, x) + (ny ? -1 : 1) * value(ym, y);
          check(1, sm1, s1, ov1, xm ^ nx, want);
          check(2, sm2, s2, ov2, ym ^ ny, want);
          if ((xm ^ nx) != (ym ^ ny)) n_sub++;
          if (sm1 != xm) n_modeswitch++;
          if (ov1) n_ovf++;
        end
    end
    // negation of the most negative direct word has no overflow: it is a mode flip
    xm = 1'b0; x = {1'b1, {N{1'b0}}}; nx = 1'b1; ym = 1'b0; y = '0; ny = 1'b0;
    #1;
    checks++;
    if (ov1 || value(sm1, s1) != (1 << N)) begin
      failures++;
      $display("negating -2^N failed");
    end
    $display("subtractions %0d, result mode flips %0d, overflows %0d", n_sub, n_modeswitch, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
