// tb_mseq_gen - self-checking test of the loadable m-sequence generator.
//
// A reference keeps the chip history in an array and applies the recursion
// c_i = c_{i-1} c_{i-3} c_{i-4} c_{i-13} of g(D) = 1 + D + D^3 + D^4 + D^13
// written out tap by tap. Checked: every replica chip against the
// reference, the period 2^13 - 1 = 8191 (the loaded state comes back then
// and not earlier), the balance of one period (4096 chips -1, 4095 chips
// +1), a load without a shift, and a load in the same cycle as a shift.
module tb_mseq_gen;

  localparam int S = 13;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic en = 1'b0;
  logic load = 1'b0;
  logic [S-1:0] load_chips = '0;
  logic chip;
  logic [S-1:0] state;

  int checks = 0;
  int failures = 0;

  mseq_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
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

  // hist[k] = c_{i-k} for k = 1..13
  bit hist [1:13];

  function automatic bit ref_next();
    return hist[1] ^ hist[3] ^ hist[4] ^ hist[13];
  endfunction

  function automatic void ref_shift(bit c);
    for (int k = 13; k > 1; k--) hist[k] = hist[k-1];
    hist[1] = c;
  endfunction

  initial begin
    logic [S-1:0] init;
    int ones;
    int period;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    check(state == '0, "reset state");
    rst_n = 1'b1;
    @(negedge clk);

    // Load without shifting.
    init = 13'h0A5B;
    load = 1'b1;
    load_chips = init;
    @(negedge clk);
    load = 1'b0;
    check(state == init, "load without shift");
    for (int k = 1; k <= 13; k++) hist[k] = init[k-1];

    // Run two periods, checking each chip and the period.
    ones = 0;
    period = 0;
    en = 1'b1;
    for (int n = 1; n <= 2 * 8191; n++) begin
      bit r;
      r = ref_next();
      check(chip == r, "replica chip");
      if (n <= 8191 && r) ones++;
      ref_shift(r);
      @(negedge clk);
      if (period == 0 && state == init) period = n;
    end
    en = 1'b0;
    check(period == 8191, "period 8191");
    check(ones == 4096, "balance of one period");
    $display("period=%0d ones=%0d", period, ones);

    // Load and shift in the same cycle.
    init = 13'h1C03;
    for (int k = 1; k <= 13; k++) hist[k] = init[k-1];
    load = 1'b1;
    load_chips = init;
    en = 1'b1;
    #1;
    check(chip == ref_next(), "chip of load+shift cycle");
    ref_shift(ref_next());
    @(negedge clk);
    load = 1'b0;
    for (int n = 0; n < 200; n++) begin
      bit r;
      r = ref_next();
      check(chip == r, "chip after load+shift");
      ref_shift(r);
      @(negedge clk);
    end
    en = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
