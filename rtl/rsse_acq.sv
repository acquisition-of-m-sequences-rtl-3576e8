// rsse_acq - recursive soft sequential estimation (RSSE) acquisition of an
// m-sequence.
//
// The receiver must find the phase of a long m-sequence. Instead of waiting
// for S error-free hard chip decisions, a SISO decoder refines the
// reliability of every chip with the recursion c_i = prod c_{i-s_m} that the
// sequence obeys: each new chip's LLR adds the channel LLR to an extrinsic
// LLR built from the previous soft outputs at the tap positions, and the
// result is shifted into a soft-chip register of S units. Once all S LLRs
// are large, their hard decisions are loaded into the local generator, whose
// replica then despreads the input; a code tracking loop checks the phase
// and requests a reload when it fails. Hardware grows linearly with S.
//
//   z, lc, lapr --> siso_decoder --> soft_chip_reg --+--> reliability_monitor
//                        ^                           |          | ready, hard
//                        +------- tap LLRs ----------+          v
//                                                       acq_controller -- load
//   z -------------------------> code_track_loop <--chip-- mseq_gen <-----+
//
// Interface and timing: one received chip per z_valid cycle (it may be high
// every cycle). z is the matched-filter sample (Z_FRAC fractional bits), lc
// the channel reliability Lc = 4*alpha_i*Ec/N0 (LC_FRAC fractional bits),
// lapr the a priori LLR L(c_i) (zero without prior knowledge). start clears
// the soft-chip register and begins an acquisition. load_thr is the LLR
// magnitude every unit must reach before loading, lock_thr the dwell
// correlation that counts as holding the phase. chip is the replica chip
// aligned with the z of the same cycle once a load has happened (0 = +1).
// The structure and equations follow the method; widths, thresholds, the
// integrate-and-dump tracking check and the controller are this design's.
module rsse_acq #(
  parameter int unsigned S        = rsse_pkg::S,
  parameter logic [S-1:0] TAPS    = rsse_pkg::TAPS,
  parameter int unsigned Z_W      = rsse_pkg::Z_W,
  parameter int unsigned Z_FRAC   = rsse_pkg::Z_FRAC,
  parameter int unsigned LC_W     = rsse_pkg::LC_W,
  parameter int unsigned LC_FRAC  = rsse_pkg::LC_FRAC,
  parameter int unsigned LLR_W    = rsse_pkg::LLR_W,
  parameter int unsigned LLR_FRAC = rsse_pkg::LLR_FRAC,
  parameter int unsigned DWELL    = rsse_pkg::DWELL,
  parameter int unsigned CNT_W    = 20,
  localparam int unsigned ACC_W   = Z_W + $clog2(DWELL) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    z_valid,
  input  logic signed [Z_W-1:0]   z,
  input  logic        [LC_W-1:0]  lc,
  input  logic signed [LLR_W-1:0] lapr,
  input  logic        [LLR_W-1:0] load_thr,
  input  logic        [ACC_W-2:0] lock_thr,
  output logic                    chip,
  output logic        [S-1:0]     gen_state,
  output logic signed [LLR_W-1:0] ext_llr,
  output logic signed [LLR_W-1:0] llr,
  output logic                    llr_sat,
  output logic        [LLR_W:0]   min_mag,
  output logic                    load,
  output logic                    reload,
  output logic                    dump,
  output logic signed [ACC_W-1:0] corr,
  output logic                    locked,
  output rsse_pkg::acq_state_e    state,
  output logic        [CNT_W-1:0] n_loads,
  output logic        [CNT_W-1:0] n_reloads,
  output logic        [CNT_W-1:0] chips,
  output logic        [CNT_W-1:0] chips_at_load
);

  logic signed [LLR_W-1:0] scdu [S];
  logic                    ready;
  logic        [S-1:0]     hard;
  logic                    scr_clr;
  logic                    trk_clr;
  logic                    pass;

  siso_decoder #(
    .S(S), .TAPS(TAPS), .Z_W(Z_W), .Z_FRAC(Z_FRAC), .LC_W(LC_W),
    .LC_FRAC(LC_FRAC), .LLR_W(LLR_W), .LLR_FRAC(LLR_FRAC)
  ) u_dec (
    .z(z), .lc(lc), .lapr(lapr), .scdu(scdu),
    .le(ext_llr), .lout(llr), .sat(llr_sat)
  );

  soft_chip_reg #(.S(S), .LLR_W(LLR_W)) u_scr (
    .clk(clk), .rst_n(rst_n), .clr(scr_clr), .shift(z_valid),
    .din(llr), .scdu(scdu)
  );

  reliability_monitor #(.S(S), .LLR_W(LLR_W)) u_mon (
    .scdu(scdu), .thr(load_thr), .ready(ready), .hard(hard), .min_mag(min_mag)
  );

  mseq_gen #(.S(S), .TAPS(TAPS)) u_gen (
    .clk(clk), .rst_n(rst_n), .en(z_valid), .load(load),
    .load_chips(hard), .chip(chip), .state(gen_state)
  );

  code_track_loop #(.Z_W(Z_W), .DWELL(DWELL)) u_trk (
    .clk(clk), .rst_n(rst_n), .clr(trk_clr), .en(z_valid), .z(z),
    .chip(chip), .lock_thr(lock_thr), .dump(dump), .pass(pass), .corr(corr)
  );

  acq_controller #(.CNT_W(CNT_W)) u_ctl (
    .clk(clk), .rst_n(rst_n), .start(start), .en(z_valid), .ready(ready),
    .dump(dump), .pass(pass), .scr_clr(scr_clr), .load(load),
    .reload(reload), .trk_clr(trk_clr), .locked(locked), .state(state),
    .n_loads(n_loads), .n_reloads(n_reloads), .chips(chips),
    .chips_at_load(chips_at_load)
  );

endmodule
