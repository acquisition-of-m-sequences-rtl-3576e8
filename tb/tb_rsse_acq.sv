// tb_rsse_acq - end-to-end test of the RSSE acquisition device at its
// default size (S = 13, g(D) = 1 + D + D^3 + D^4 + D^13, 12-bit LLRs,
// 128-chip dwell).
//
// A transmitter model runs the m-sequence recursion on its own and sends
// each chip as Z_i = c_i + n_i over an AWGN channel (Box-Muller Gaussian
// noise of variance N0/(2Ec)), quantised to the 8-bit sample format; the
// receiver is given Lc = 4 Ec/N0. Three acquisitions are run at
// Ec/N0 = -1 dB:
//   1. a deliberately tiny loading threshold, so that early loads are wrong
//      and the tracking check must reject them and reload;
//   2. after lock, a jump of the transmitted code phase, which must be seen
//      as a loss of lock and re-acquired;
//   3. a fresh start with a high threshold, which should lock on its first
//      load, with idle cycles (z_valid low) between some chips.
// After every lock the replica chip must equal the transmitted chip for
// 1000 chips (9000 in run 3, long enough for the soft outputs to saturate).
// Each mechanism (load, failed verification and reload, lock,
// loss of lock, clear, LLR saturation, idle cycle) is counted and must happen.
module tb_rsse_acq;

  import rsse_pkg::*;

  localparam real ECN0_DB = -1.0;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic start = 1'b0;
  logic z_valid = 1'b0;
  logic signed [7:0] z = '0;
  logic [7:0] lc = '0;
  logic signed [11:0] lapr = '0;
  logic [11:0] load_thr = '0;
  logic [14:0] lock_thr = '0;
  logic chip;
  logic [12:0] gen_state;
  logic signed [11:0] ext_llr;
  logic signed [11:0] llr;
  logic llr_sat;
  logic [12:0] min_mag;
  logic load, reload, dump, locked;
  logic signed [15:0] corr;
  acq_state_e state;
  logic [19:0] n_loads, n_reloads, chips, chips_at_load;

  int checks = 0;
  int failures = 0;

  rsse_acq dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Mechanism counters, sampled at every clock edge.
  int m_load = 0, m_verify_fail = 0, m_lock = 0, m_loss = 0, m_sat = 0, m_clear = 0;
  bit was_locked = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (load) m_load++;
      if (reload && state == ST_VERIFY) m_verify_fail++;
      if (reload && state == ST_LOCK) m_loss++;
      if (llr_sat && z_valid) m_sat++;
      if (dut.scr_clr) m_clear++;
      if (locked && !was_locked) m_lock++;
      was_locked <= locked;
    end
  end

  // Transmitter: its own copy of the recursion, hist[k] = c_{i-k}.
  bit hist [1:13];
  bit tx_chip;

  function automatic bit tx_next();
    bit c;
    c = hist[1] ^ hist[3] ^ hist[4] ^ hist[13];
    for (int k = 13; k > 1; k--) hist[k] = hist[k-1];
    hist[1] = c;
    return c;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // Send one chip over the AWGN channel; with gaps set, an idle cycle
  // (z_valid low) comes before a quarter of the chips.
  bit gaps = 1'b0;
  int m_gap = 0;

  task automatic send_chip(real ecn0);
    real zr;
    int zq;
    if (gaps && $urandom_range(0, 3) == 0) begin
      z_valid = 1'b0;
      z = 8'($urandom_range(0, 255));   // ignored while z_valid is low
      m_gap++;
      @(negedge clk);
    end
    tx_chip = tx_next();
    zr = (tx_chip ? -1.0 : 1.0) + $sqrt(1.0 / (2.0 * ecn0)) * gauss();
    zq = int'($floor(zr * 32.0 + 0.5));
    if (zq > 127) zq = 127;
    if (zq < -128) zq = -128;
    z = 8'(zq);
    lc = 8'(int'($floor(4.0 * ecn0 * 16.0 + 0.5)));
    z_valid = 1'b1;
    @(negedge clk);
  endtask

  // Run until lock or until max chips; returns the chips it took.
  task automatic run_to_lock(real ecn0, int max_chips, output int used);
    used = 0;
    while (!locked && used < max_chips) begin
      send_chip(ecn0);
      used++;
    end
  endtask

  // With lock held, the replica must follow the transmitted chips.
  task automatic check_replica(real ecn0, int n);
    int bad = 0;
    for (int i = 0; i < n; i++) begin
      tx_chip = hist[1] ^ hist[3] ^ hist[4] ^ hist[13];
      #1;
      if (chip != tx_chip) bad++;
      #1;
      send_chip(ecn0);
    end
    check(bad == 0, "replica follows transmitter");
    check(locked, "lock held");
    $display("  replica mismatches over %0d chips: %0d", n, bad);
  endtask

  task automatic do_start();
    start = 1'b1;
    z_valid = 1'b0;
    @(negedge clk);
    start = 1'b0;
    for (int k = 0; k < S; k++)
      check(dut.u_scr.scdu[k] == '0, "soft-chip register cleared");
  endtask

  initial begin
    real ecn0;
    int used;
    ecn0 = 10.0 ** (ECN0_DB / 10.0);
    for (int k = 1; k <= 13; k++) hist[k] = 1'($urandom_range(0, 1));
    hist[13] = 1'b1;
    lock_thr = 15'd2048;   // half the noiseless 128-chip correlation of 4096
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(state == ST_IDLE && !locked, "idle after reset");

    // 1. Tiny threshold: early loads are unreliable.
    load_thr = 12'd1;
    do_start();
    run_to_lock(ecn0, 40000, used);
    $display("run 1: locked=%0b after %0d chips, loads=%0d reloads=%0d",
             locked, used, n_loads, n_reloads);
    check(locked, "run 1 locks");
    check(n_reloads >= 1, "run 1 rejected at least one load");
    check(n_loads == n_reloads + 1, "run 1 loads = reloads + 1");
    check_replica(ecn0, 1000);

    // 2. Jump of the transmitted phase while locked.
    for (int i = 0; i < 3000; i++) void'(tx_next());
    load_thr = 12'd160;    // 20 in LLR units
    used = 0;
    while (locked && used < 1000) begin
      send_chip(ecn0);
      used++;
    end
    check(!locked, "lock lost within one dwell after the jump");
    check(used <= 2 * DWELL, "loss of lock detected within two dwells");
    used = 0;
    while (!locked && used < 40000) begin
      send_chip(ecn0);
      used++;
    end
    $display("run 2: loss of lock seen=%0d, relocked=%0b after %0d chips",
             m_loss, locked, used);
    check(m_loss >= 1, "phase jump detected as loss of lock");
    check(locked, "run 2 re-locks");
    check_replica(ecn0, 1000);

    // 3. Fresh start, high threshold: expect the first load to be right.
    //    Chips now arrive with idle cycles between some of them.
    load_thr = 12'd320;    // 40 in LLR units
    gaps = 1'b1;
    do_start();
    run_to_lock(ecn0, 40000, used);
    $display("run 3: locked=%0b after %0d chips, first load at chip %0d (L/S = %0d), reloads=%0d",
             locked, used, chips_at_load, chips_at_load / 20'(S), n_reloads);
    check(locked, "run 3 locks");
    check(n_reloads == 0, "run 3 locks on its first load");
    check(chips_at_load >= 20'(S), "no load before S chips");
    check_replica(ecn0, 1000);
    // Keep tracking long enough for the soft outputs to reach saturation.
    check_replica(ecn0, 8000);

    $display("mechanisms: loads=%0d failed-verifications=%0d locks=%0d losses=%0d clears=%0d saturations=%0d idle-cycles=%0d",
             m_load, m_verify_fail, m_lock, m_loss, m_clear, m_sat, m_gap);
    check(m_load > 0, "load happened");
    check(m_verify_fail > 0, "failed verification and reload happened");
    check(m_lock >= 3, "lock happened in every run");
    check(m_loss > 0, "loss of lock happened");
    check(m_clear >= 3, "soft-chip register clears happened");
    check(m_sat > 0, "LLR saturation happened");
    check(m_gap > 0, "idle cycles between chips happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
