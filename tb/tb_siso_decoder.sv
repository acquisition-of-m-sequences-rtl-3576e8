// tb_siso_decoder - self-checking test of the SISO decoder equations.
//
// The reference evaluates L(y_i) = Lc*Z_i + L(c_i) + Le(c_i) in real
// arithmetic on the same fixed-point grid: Lc*Z_i is z*lc/2^9 rounded half
// up to 1/8, Le is the product of the signs (+1 for zero) of the tapped
// LLRs (stages 1, 3, 4, 13) times their smallest magnitude, and the sum is
// clipped to +/-2047. Random and corner stimuli are applied.
module tb_siso_decoder;

  localparam int S = 13;
  localparam int LLR_W = 12;

  logic signed [7:0] z;
  logic [7:0] lc;
  logic signed [LLR_W-1:0] lapr;
  logic signed [LLR_W-1:0] scdu [S];
  logic signed [LLR_W-1:0] le;
  logic signed [LLR_W-1:0] lout;
  logic sat;

  int checks = 0;
  int failures = 0;
  int n_sat = 0;
  int taps [4] = '{1, 3, 4, 13};

  siso_decoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_llr(int mode);
    case (mode)
      0: return 0;
      1: return $urandom_range(0, 4094) - 2047;
      2: return $urandom_range(0, 40) - 20;
      default: return ($urandom_range(0, 1) != 0 ? 2047 : -2047);
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      real ch;
      int ch_i, sgn, mn, e_ref, y_ref;
      bit want_sat;
      int mode;
      mode = $urandom_range(0, 3);
      z    = 8'($urandom_range(0, 255));
      lc   = 8'($urandom_range(0, 255));
      lapr = (n % 3 == 0) ? 12'sd0 : 12'(rnd_llr(2));
      for (int k = 0; k < S; k++) scdu[k] = 12'(rnd_llr(mode == 0 ? $urandom_range(0, 3) : mode));
      if (n == 5) for (int k = 0; k < S; k++) scdu[k] = '0;
      #1;
      ch = $floor(real'(int'(z) * int'(lc)) / 64.0 + 0.5);
      ch_i = int'(ch) + int'(lapr);
      sgn = 1;
      mn = 1 << 20;
      foreach (taps[t]) begin
        int v;
        v = int'(scdu[taps[t] - 1]);
        if (v < 0) sgn = -sgn;
        if ((v < 0 ? -v : v) < mn) mn = (v < 0 ? -v : v);
      end
      e_ref = sgn * mn;
      y_ref = ch_i + e_ref;
      want_sat = (y_ref > 2047) || (y_ref < -2047);
      if (y_ref > 2047) y_ref = 2047;
      if (y_ref < -2047) y_ref = -2047;
      if (want_sat) n_sat++;
      checks++;
      if (int'(le) != e_ref || int'(lout) != y_ref || sat != want_sat) begin
        failures++;
        if (failures < 10)
          $display("FAIL z=%0d lc=%0d lapr=%0d: le=%0d/%0d out=%0d/%0d sat=%0b",
                   z, lc, lapr, le, e_ref, lout, y_ref, sat);
      end
      #1;
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("saturated cases: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
