// siso_decoder - recursive soft-in/soft-out chip decoder of the RSSE scheme.
//
// For every received sample Z_i it forms the soft output
//   L(y_i) = Lc*Z_i + L(c_i) + Le(c_i)
//   Le(c_i) = [prod_m sign L(y_{i-s_m})] * min_m |L(y_{i-s_m})|
// where the L(y_{i-s_m}) are the soft-chip register units selected by the
// generator taps. The first two terms are the channel LLR of the chip, the
// third is the extrinsic information the m-sequence recursion
// c_i = prod c_{i-s_m} gives about it, in the usual sign/min
// approximation of the box-plus of several LLRs. These equations are the
// method's; the fixed-point realisation is this design's:
//   * Lc*Z_i is a full product of the Z_W-bit sample and the LC_W-bit
//     unsigned reliability (Lc = 4*alpha_i*Ec/N0, so a fading amplitude is
//     applied per sample through lc), rounded to LLR_FRAC fractional bits;
//   * sign(0) is taken as +1 (a zero LLR contributes zero magnitude, so the
//     choice has no effect on the result);
//   * the sum is saturated symmetrically to +/-(2^(LLR_W-1)-1); sat flags it.
//
// Interface and timing: purely combinational, one chip per clock in the top
// level; scdu[k-1] must hold L(y_{i-k}). Needs Z_FRAC + LC_FRAC > LLR_FRAC.
module siso_decoder #(
  parameter int unsigned S        = rsse_pkg::S,
  parameter logic [S-1:0] TAPS    = rsse_pkg::TAPS,
  parameter int unsigned Z_W      = rsse_pkg::Z_W,
  parameter int unsigned Z_FRAC   = rsse_pkg::Z_FRAC,
  parameter int unsigned LC_W     = rsse_pkg::LC_W,
  parameter int unsigned LC_FRAC  = rsse_pkg::LC_FRAC,
  parameter int unsigned LLR_W    = rsse_pkg::LLR_W,
  parameter int unsigned LLR_FRAC = rsse_pkg::LLR_FRAC
) (
  input  logic signed [Z_W-1:0]   z,
  input  logic        [LC_W-1:0]  lc,
  input  logic signed [LLR_W-1:0] lapr,
  input  logic signed [LLR_W-1:0] scdu [S],
  output logic signed [LLR_W-1:0] le,
  output logic signed [LLR_W-1:0] lout,
  output logic                    sat
);

  localparam int unsigned SH    = Z_FRAC + LC_FRAC - LLR_FRAC;
  localparam int unsigned P_W   = Z_W + LC_W + 1;
  localparam int unsigned SUM_W = (P_W > LLR_W + 2) ? P_W + 2 : LLR_W + 4;
  localparam logic signed [SUM_W-1:0] LMAX = SUM_W'((1 << (LLR_W - 1)) - 1);

  logic signed [P_W-1:0]   prod;
  logic signed [SUM_W-1:0] lch;
  logic                    ext_neg;
  logic        [LLR_W:0]   ext_mag;
  logic        [LLR_W:0]   mag_k;
  logic signed [SUM_W-1:0] sum;

  always_comb begin
    // Channel term Lc*Z_i (eq. 3), rounded to the LLR grid, plus L(c_i).
    prod = z * $signed({1'b0, lc});
    lch  = (SUM_W'(prod) + SUM_W'(1 << (SH - 1))) >>> SH;
    lch  = lch + SUM_W'(lapr);

    // Extrinsic term (eq. 4): sign product and minimum magnitude over taps.
    ext_neg = 1'b0;
    ext_mag = '1;
    for (int k = 0; k < S; k++) begin
      if (TAPS[k]) begin
        ext_neg = ext_neg ^ scdu[k][LLR_W-1];
        mag_k   = scdu[k][LLR_W-1] ? -(LLR_W+1)'(scdu[k]) : (LLR_W+1)'(scdu[k]);
        if (mag_k < ext_mag) ext_mag = mag_k;
      end
    end
    if (ext_mag > (LLR_W+1)'(LMAX)) ext_mag = (LLR_W+1)'(LMAX);
    le = ext_neg ? -LLR_W'(ext_mag) : LLR_W'(ext_mag);

    // Soft output (eq. 5), saturated.
    sum = lch + SUM_W'(le);
    sat = 1'b0;
    if (sum > LMAX) begin
      lout = LLR_W'(LMAX);
      sat  = 1'b1;
    end else if (sum < -LMAX) begin
      lout = LLR_W'(-LMAX);
      sat  = 1'b1;
    end else begin
      lout = LLR_W'(sum);
    end
  end

endmodule
