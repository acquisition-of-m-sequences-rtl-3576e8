// tb_acq_controller - self-checking test of the acquisition sequencing.
//
// ready, dump and pass are driven directly. Checked against an explicit
// expectation: start clears the soft-chip register and enters acquisition;
// load is given only in acquisition and only with ready; a passing dump
// after a load locks; a failing dump in verification or lock gives a reload
// and returns to acquisition, clearing the soft-chip register only when the
// lock was held; the load/reload counters and the chip count at
// the last load follow.
module tb_acq_controller;

  import rsse_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic start = 1'b0;
  logic en = 1'b0;
  logic ready = 1'b0;
  logic dump = 1'b0;
  logic pass = 1'b0;
  logic scr_clr, load, reload, trk_clr, locked;
  acq_state_e state;
  logic [19:0] n_loads, n_reloads, chips, chips_at_load;

  int checks = 0;
  int failures = 0;

  acq_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t (state %s)", what, $time, state.name());
    end
  endtask

  initial begin
    acq_state_e exp_st;
    int exp_loads, exp_reloads, exp_chips, exp_at_load;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(state == ST_IDLE, "idle after reset");

    // Nothing happens before start.
    ready = 1'b1;
    #1 check(load == 1'b0, "no load before start");
    @(negedge clk);
    check(state == ST_IDLE, "still idle");

    start = 1'b1;
    ready = 1'b0;
    #1 check(scr_clr && trk_clr, "start clears");
    @(negedge clk);
    start = 1'b0;
    check(state == ST_ACQ && n_loads == 0 && chips == 0, "acquiring");

    exp_st = ST_ACQ;
    exp_loads = 0;
    exp_reloads = 0;
    exp_chips = 0;
    exp_at_load = 0;
    for (int n = 0; n < 10000; n++) begin
      bit exp_load, exp_reload;
      en    = ($urandom_range(0, 3) != 0);
      ready = ($urandom_range(0, 9) == 0);
      dump  = (exp_st != ST_ACQ) && ($urandom_range(0, 19) == 0);
      pass  = $urandom_range(0, 2) != 0;
      #1;
      exp_load   = (exp_st == ST_ACQ) && ready;
      exp_reload = (exp_st == ST_VERIFY || exp_st == ST_LOCK) && dump && !pass;
      check(load == exp_load, "load");
      check(reload == exp_reload, "reload");
      check(trk_clr == exp_load, "tracking restart on load");
      check(scr_clr == (exp_reload && exp_st == ST_LOCK), "clear only on loss of lock");
      check(locked == (exp_st == ST_LOCK), "locked flag");
      if (exp_load) begin
        exp_loads++;
        exp_at_load = exp_chips;
        exp_st = ST_VERIFY;
      end else if (exp_st != ST_ACQ && dump) begin
        if (pass) exp_st = ST_LOCK;
        else begin
          exp_st = ST_ACQ;
          exp_reloads++;
        end
      end
      if (en) exp_chips++;
      @(negedge clk);
      check(state == exp_st, "state");
      check(int'(n_loads) == exp_loads && int'(n_reloads) == exp_reloads, "counters");
      check(int'(chips) == exp_chips && int'(chips_at_load) == exp_at_load, "chip counters");
    end
    check(exp_loads > 10 && exp_reloads > 5, "loads and reloads exercised");
    $display("loads=%0d reloads=%0d", exp_loads, exp_reloads);

    // A start in the middle of things restarts.
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(state == ST_ACQ && n_loads == 0 && chips == 0, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
