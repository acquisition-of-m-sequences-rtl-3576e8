// code_track_loop - despreading, low-pass filtering and phase-hold decision
// after the generator has been loaded.
//
// The method despreads the received signal with the local replica, low-pass
// filters it and hands it to a code tracking loop; if that loop cannot hold
// the phase it asks for a reload. Only this function is specified, so the
// simplest realisation is used: with one sample per chip the despread value
// is +/-Z_i (Z_i times the replica chip), the low-pass filter is an
// integrate-and-dump over DWELL chips, and the phase counts as held when the
// dumped correlation reaches lock_thr. A correctly loaded replica gives a
// correlation near DWELL times the mean sample amplitude, a wrong one a value
// near zero (the off-peak autocorrelation of an m-sequence is -1/N). Fine
// sub-chip phase correction (an early/late loop) needs more than one sample
// per chip and is not part of this block.
//
// Interface and timing: clr (priority) empties the integrator and restarts
// the dwell. Each en adds one despread sample; on the en that completes a
// dwell, dump pulses for one cycle in the following cycle with corr and
// pass registered.
module code_track_loop #(
  parameter int unsigned Z_W   = rsse_pkg::Z_W,
  parameter int unsigned DWELL = rsse_pkg::DWELL,
  localparam int unsigned ACC_W = Z_W + $clog2(DWELL) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    en,
  input  logic signed [Z_W-1:0]   z,
  input  logic                    chip,
  input  logic        [ACC_W-2:0] lock_thr,
  output logic                    dump,
  output logic                    pass,
  output logic signed [ACC_W-1:0] corr
);

  localparam int unsigned CNT_W = $clog2(DWELL) + 1;

  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] acc_n;
  logic        [CNT_W-1:0] cnt;

  always_comb begin
    acc_n = chip ? acc - ACC_W'(z) : acc + ACC_W'(z);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      cnt  <= '0;
      dump <= 1'b0;
      pass <= 1'b0;
      corr <= '0;
    end else if (clr) begin
      acc  <= '0;
      cnt  <= '0;
      dump <= 1'b0;
    end else begin
      dump <= 1'b0;
      if (en) begin
        if (cnt == CNT_W'(DWELL - 1)) begin
          corr <= acc_n;
          pass <= (acc_n >= $signed({1'b0, lock_thr}));
          dump <= 1'b1;
          acc  <= '0;
          cnt  <= '0;
        end else begin
          acc  <= acc_n;
          cnt  <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
