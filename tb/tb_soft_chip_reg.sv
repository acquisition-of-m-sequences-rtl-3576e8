// tb_soft_chip_reg - self-checking test of the soft-chip register.
//
// Random LLRs are shifted in on random cycles; a reference array of the
// most recent S values (index 0 = newest) is compared with every unit after
// each clock. Clear, clear over shift and reset clearing are checked too.
module tb_soft_chip_reg;

  localparam int S = 13;
  localparam int LLR_W = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic clr = 1'b0;
  logic shift = 1'b0;
  logic signed [LLR_W-1:0] din = '0;
  logic signed [LLR_W-1:0] scdu [S];

  int checks = 0;
  int failures = 0;
  int ref_q [S];

  soft_chip_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    for (int k = 0; k < S; k++) begin
      checks++;
      if (int'(scdu[k]) != ref_q[k]) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s unit %0d: %0d expected %0d", what, k, scdu[k], ref_q[k]);
      end
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    for (int k = 0; k < S; k++) ref_q[k] = 0;
    repeat (2) @(negedge clk);
    compare("reset");
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      shift = ($urandom_range(0, 3) != 0);
      clr   = ($urandom_range(0, 199) == 0);
      din   = LLR_W'($urandom_range(0, 4094) - 2047);
      @(negedge clk);
      if (clr) begin
        for (int k = 0; k < S; k++) ref_q[k] = 0;
      end else if (shift) begin
        for (int k = S - 1; k > 0; k--) ref_q[k] = ref_q[k-1];
        ref_q[0] = int'(din);
      end
      compare(clr ? "clear" : "shift");
    end
    // Forced clear while shifting.
    shift = 1'b1;
    clr = 1'b1;
    din = 12'sd100;
    @(negedge clk);
    for (int k = 0; k < S; k++) ref_q[k] = 0;
    compare("clear over shift");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
