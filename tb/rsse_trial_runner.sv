// rsse_trial_runner - test harness for repeated acquisition trials.
//
// Holds one rsse_acq receiver and a transmitter/channel model for the same
// generator. Each trial starts from a random code phase, clears the receiver
// with start, sends a fixed number of chips over an AWGN or Rayleigh channel
// and then compares the soft-chip register's hard decisions with the S most
// recently sent chips: a mismatch is an erroneous loading. The channel:
// Z_i = alpha_i c_i + n_i with n_i Gaussian of variance N0/(2Ec) and, for
// Rayleigh fading, alpha_i = |f_i| with f_i a complex Gaussian gain of unit
// power that follows f_i = rho f_{i-1} + sqrt(1 - rho^2) w_i (rho = 0 gives
// independent fading per chip), known to the receiver through
// lc = 4 alpha_i Ec/N0. Checkpoints record
// the mean decision reliability |L(y_i)| at chosen chip counts.
module rsse_trial_runner #(
  parameter int unsigned  S    = 13,
  parameter logic [S-1:0] TAPS = 13'h100D
) (
  input logic clk
);

  import rsse_pkg::*;

  logic rst_n = 1'b1;
  logic start = 1'b0;
  logic z_valid = 1'b0;
  logic signed [7:0] z = '0;
  logic [7:0] lc = '0;
  logic signed [11:0] lapr = '0;
  logic [11:0] load_thr = 12'hFFF;   // never load: only the estimate is observed
  logic [14:0] lock_thr = 15'd2048;
  logic chip;
  logic [S-1:0] gen_state;
  logic signed [11:0] ext_llr, llr;
  logic llr_sat;
  logic [12:0] min_mag;
  logic load, reload, dump, locked;
  logic signed [15:0] corr;
  acq_state_e state;
  logic [19:0] n_loads, n_reloads, chips, chips_at_load;

  rsse_acq #(.S(S), .TAPS(TAPS)) dut (.*);

  bit hist [1:S];

  function automatic bit tx_next();
    bit c = 1'b0;
    for (int k = 1; k <= S; k++) if (TAPS[k-1]) c ^= hist[k];
    for (int k = S; k > 1; k--) hist[k] = hist[k-1];
    hist[1] = c;
    return c;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // Complex fading gain, unit mean power, first-order Gauss-Markov in time.
  real f_re, f_im;

  task automatic new_fading();
    f_re = gauss() / $sqrt(2.0);
    f_im = gauss() / $sqrt(2.0);
  endtask

  task automatic send_chip(real ecn0, bit rayleigh, real rho);
    real alpha, zr, lr;
    int zq, lq;
    bit c;
    c = tx_next();
    alpha = 1.0;
    if (rayleigh) begin
      f_re = rho * f_re + $sqrt((1.0 - rho * rho) / 2.0) * gauss();
      f_im = rho * f_im + $sqrt((1.0 - rho * rho) / 2.0) * gauss();
      alpha = $sqrt(f_re * f_re + f_im * f_im);
    end
    zr = (c ? -alpha : alpha) + $sqrt(1.0 / (2.0 * ecn0)) * gauss();
    zq = int'($floor(zr * 32.0 + 0.5));
    if (zq > 127) zq = 127;
    if (zq < -128) zq = -128;
    lr = 4.0 * alpha * ecn0 * 16.0;
    lq = int'($floor(lr + 0.5));
    if (lq > 255) lq = 255;
    z = 8'(zq);
    lc = 8'(lq);
    z_valid = 1'b1;
    @(negedge clk);
    z_valid = 1'b0;
  endtask

  task automatic reset_dut();
    #1 rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Runs trials of L chips; errors counts wrong S-chip estimates. rel[j]
  // is the mean |L(y_i)| at chip count cp[j] (over all trials).
  task automatic run_trials(input real ecn0_db, input bit rayleigh, input real rho, input int L,
                            input int trials, input int cp [4],
                            output int errors, output real rel [4]);
    real ecn0;
    ecn0 = 10.0 ** (ecn0_db / 10.0);
    errors = 0;
    for (int j = 0; j < 4; j++) rel[j] = 0.0;
    for (int t = 0; t < trials; t++) begin
      bit wrong;
      for (int k = 1; k <= S; k++) hist[k] = 1'($urandom_range(0, 1));
      hist[S] = 1'b1;
      for (int k = 0; k < 50; k++) void'(tx_next());
      new_fading();
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int n = 1; n <= L; n++) begin
        send_chip(ecn0, rayleigh, rho);
        for (int j = 0; j < 4; j++)
          if (n == cp[j]) rel[j] += real'(dut.u_scr.scdu[0] < 0 ? -dut.u_scr.scdu[0]
                                                                 : dut.u_scr.scdu[0]) / 8.0;
      end
      wrong = 1'b0;
      for (int k = 1; k <= S; k++)
        if (dut.u_mon.hard[k-1] != hist[k]) wrong = 1'b1;
      if (wrong) errors++;
    end
    for (int j = 0; j < 4; j++) rel[j] = rel[j] / real'(trials);
  endtask

endmodule
