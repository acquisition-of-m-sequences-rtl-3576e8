// tb_reliability_monitor - self-checking test of the loading condition.
//
// For random soft-chip register contents and thresholds the reference
// computes the smallest |LLR| over all 13 units, the ready flag
// (smallest >= threshold) and the sign decisions, and compares.
module tb_reliability_monitor;

  localparam int S = 13;
  localparam int LLR_W = 12;

  logic signed [LLR_W-1:0] scdu [S];
  logic [LLR_W-1:0] thr;
  logic ready;
  logic [S-1:0] hard;
  logic [LLR_W:0] min_mag;

  int checks = 0;
  int failures = 0;
  int n_ready = 0;

  reliability_monitor dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int mn;
      bit r;
      logic [S-1:0] h;
      int lo;
      lo = $urandom_range(0, 300);
      for (int k = 0; k < S; k++) begin
        int m;
        m = $urandom_range(lo, lo + 200);
        scdu[k] = 12'($urandom_range(0, 1) != 0 ? -m : m);
      end
      if (n % 97 == 0) scdu[$urandom_range(0, S - 1)] = '0;
      thr = 12'($urandom_range(0, 500));
      #1;
      mn = 1 << 20;
      for (int k = 0; k < S; k++) begin
        int v;
        v = int'(scdu[k]);
        h[k] = (v < 0);
        if (v < 0) v = -v;
        if (v < mn) mn = v;
      end
      r = (mn >= int'(thr));
      if (r) n_ready++;
      checks++;
      if (ready != r || hard != h || int'(min_mag) != mn) begin
        failures++;
        if (failures < 10)
          $display("FAIL thr=%0d ready=%0b/%0b min=%0d/%0d hard=%h/%h",
                   thr, ready, r, min_mag, mn, hard, h);
      end
      #1;
    end
    checks++;
    if (n_ready == 0 || n_ready == 20000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
