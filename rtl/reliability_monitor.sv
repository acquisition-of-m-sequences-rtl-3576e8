// reliability_monitor - decides when the soft-chip register may be loaded
// into the local m-sequence generator.
//
// The method watches the amplitudes of the S most recent soft outputs and
// activates the loading command once they are high enough for a low
// erroneous-loading probability. Here "high enough" is: the smallest of the
// S magnitudes |L(y_{i-k})| is at least the run-time threshold thr (the
// weakest chip bounds the loading error). The method names no threshold
// value; thr is an input. The module also gives the hard decisions of the
// S units (bit 1 = chip -1 = negative LLR, a zero LLR decides +1) and the
// smallest magnitude, which a receiver can read as its current reliability.
//
// Interface and timing: purely combinational.
module reliability_monitor #(
  parameter int unsigned S     = rsse_pkg::S,
  parameter int unsigned LLR_W = rsse_pkg::LLR_W
) (
  input  logic signed [LLR_W-1:0] scdu [S],
  input  logic        [LLR_W-1:0] thr,
  output logic                    ready,
  output logic        [S-1:0]     hard,
  output logic        [LLR_W:0]   min_mag
);

  logic [LLR_W:0] mag_k;

  always_comb begin
    min_mag = '1;
    for (int k = 0; k < S; k++) begin
      hard[k] = scdu[k][LLR_W-1];
      mag_k   = scdu[k][LLR_W-1] ? -(LLR_W+1)'(scdu[k]) : (LLR_W+1)'(scdu[k]);
      if (mag_k < min_mag) min_mag = mag_k;
    end
    ready = (min_mag >= {1'b0, thr});
  end

endmodule
