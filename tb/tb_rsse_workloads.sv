// tb_rsse_workloads - acquisition performance at the operating points the
// method is evaluated on.
//
// Erroneous loading probability Pe (any of the S estimated chips wrong) of
// the default S = 13 receiver, g(D) = 1 + D + D^3 + D^4 + D^13:
//   AWGN,     Ec/N0 = -0.5 dB, L = 40 S  =  520 chips (reported ~1e-4)
//   AWGN,     Ec/N0 = -1 dB,   L = 80 S  = 1040 chips (reported ~1e-3)
//   Rayleigh, Ec/N0 = -1 dB,   L = 500 S = 6500 chips (reported ~1e-3),
//             fading correlated from chip to chip (rho = 0.99)
// With a few hundred trials each, the AWGN pass limit is a measured Pe of at
// most 2 %, which still separates the recursion from chip-by-chip hard
// decisions (at -1 dB a single chip is wrong with probability about 0.10, so
// 13 hard decisions are wrong together with probability about 0.75).
// The Rayleigh point uses the same 2 % limit. It is run a second time with
// fading drawn independently for every chip: there the sign/min recursion
// does not build up reliability (a floating-point model of the same
// equations behaves alike), so that run only has to beat 13 hard decisions
// (Pe about 0.91); the measured value is printed.
// Decision reliability |L(y_i)| versus L/S (S = 13 at -1 dB and S = 5 with
// g(D) = 1 + D^2 + D^5 at -4 dB): it must grow from L/S = 5 to 10 to 20 to 40.
module tb_rsse_workloads;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cp13 [4] = '{65, 130, 260, 520};   // L/S = 5, 10, 20, 40
  int cp5  [4] = '{25, 50, 100, 200};
  int none [4] = '{0, 0, 0, 0};

  rsse_trial_runner #(.S(13), .TAPS(13'h100D)) r13 (.clk(clk));
  rsse_trial_runner #(.S(5),  .TAPS(5'h12))    r5  (.clk(clk));

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int errs;
    real rel [4];
    r13.reset_dut();
    r5.reset_dut();

    r13.run_trials(-0.5, 1'b0, 0.0, 520, 400, none, errs, rel);
    $display("AWGN -0.5 dB, L=520:  erroneous loads %0d / 400", errs);
    check(errs <= 8, "AWGN -0.5 dB L=40S Pe <= 2%");

    r13.run_trials(-1.0, 1'b0, 0.0, 1040, 400, cp13, errs, rel);
    $display("AWGN -1 dB, L=1040:   erroneous loads %0d / 400", errs);
    check(errs <= 8, "AWGN -1 dB L=80S Pe <= 2%");
    $display("S=13 -1 dB mean |L(y)| at L/S=5,10,20,40: %0.1f %0.1f %0.1f %0.1f",
             rel[0], rel[1], rel[2], rel[3]);
    check(rel[0] < rel[1] && rel[1] < rel[2] && rel[2] < rel[3], "S=13 reliability grows");

    r13.run_trials(-1.0, 1'b1, 0.99, 6500, 100, none, errs, rel);
    $display("Rayleigh (rho 0.99) -1 dB, L=6500: erroneous loads %0d / 100", errs);
    check(errs <= 2, "Rayleigh -1 dB L=500S Pe <= 2%");

    r13.run_trials(-1.0, 1'b1, 0.0, 6500, 100, none, errs, rel);
    $display("Rayleigh (independent per chip) -1 dB, L=6500: erroneous loads %0d / 100", errs);
    check(errs < 80, "independent fading: better than 13 hard decisions (Pe 0.91)");

    r5.run_trials(-4.0, 1'b0, 0.0, 200, 400, cp5, errs, rel);
    $display("S=5 -4 dB mean |L(y)| at L/S=5,10,20,40: %0.1f %0.1f %0.1f %0.1f (erroneous loads at 40S: %0d / 400)",
             rel[0], rel[1], rel[2], rel[3], errs);
    check(rel[0] < rel[1] && rel[1] < rel[2] && rel[2] < rel[3], "S=5 reliability grows");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
