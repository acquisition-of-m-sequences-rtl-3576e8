// tb_code_track_loop - self-checking test of despreading, integrate-and-dump
// and the phase-hold decision.
//
// Random samples and replica chips are fed with random gaps. A reference sum
// of z*(+/-1) over each dwell of 128 chips is compared with corr, pass with
// corr >= lock_thr, and the dump pulse must be seen right after the clock edge that
// takes the 128th chip of a dwell and at no other time. Clears in mid-dwell restart the
// count. Passing and failing dwells must both occur.
module tb_code_track_loop;

  localparam int Z_W = 8;
  localparam int DWELL = 128;
  localparam int ACC_W = Z_W + $clog2(DWELL) + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic clr = 1'b0;
  logic en = 1'b0;
  logic signed [Z_W-1:0] z = '0;
  logic chip = 1'b0;
  logic [ACC_W-2:0] lock_thr;
  logic dump;
  logic pass;
  logic signed [ACC_W-1:0] corr;

  int checks = 0;
  int failures = 0;
  int n_pass = 0;
  int n_fail = 0;

  code_track_loop dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  initial begin
    int acc, cnt;
    bit exp_dump;
    int exp_corr;
    bit aligned;
    lock_thr = 15'd2048;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    check(dump == 1'b0 && corr == '0, "reset");
    rst_n = 1'b1;
    acc = 0;
    cnt = 0;
    exp_dump = 0;
    exp_corr = 0;
    aligned = 1;
    for (int n = 0; n < 60000; n++) begin
      bit c;
      int zv;
      if (n % 1000 == 0) aligned = 1'($urandom_range(0, 1));
      en  = ($urandom_range(0, 4) != 0);
      clr = ($urandom_range(0, 2999) == 0);
      c   = 1'($urandom_range(0, 1));
      // A sample that mostly agrees with the replica when aligned.
      zv  = aligned ? ((c ? -32 : 32) + int'($urandom_range(0, 60)) - 30)
                    : (int'($urandom_range(0, 120)) - 60);
      z    = 8'(zv);
      chip = c;
      exp_dump = 0;
      if (clr) begin
        acc = 0;
        cnt = 0;
      end else if (en) begin
        acc += c ? -zv : zv;
        cnt++;
        if (cnt == DWELL) begin
          exp_dump = 1;
          exp_corr = acc;
          acc = 0;
          cnt = 0;
        end
      end
      @(negedge clk);
      check(dump == exp_dump, "dump timing");
      if (exp_dump) begin
        check(int'(corr) == exp_corr, "correlation");
        check(pass == (exp_corr >= 2048), "pass decision");
        if (exp_corr >= 2048) n_pass++; else n_fail++;
      end
    end
    check(n_pass > 0 && n_fail > 0, "both outcomes seen");
    $display("dwells passed=%0d failed=%0d", n_pass, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
