// mseq_gen - loadable local m-sequence generator.
//
// A Fibonacci feedback shift register of S stages. Stage k (state[k-1])
// holds the chip c_{i-k}; the chip produced for the current chip period is
// c_i = prod over the taps of c_{i-s_m}, which in the bit encoding of
// rsse_pkg (0 = +1, 1 = -1) is the XOR of the tapped stages. This follows
// the generator of the method: the same feedback connections g_k as the
// soft-chip register, with a product of +/-1 values as the feedback.
//
// Interface and timing:
//   load / load_chips : loads the S hard decisions, load_chips[k-1] = c_{i-k}
//                       (the stage order of the soft-chip register).
//   en                : one chip period has passed; the stages shift by one
//                       and c_i enters stage 1.
//   chip              : combinational, the replica chip c_i for the current
//                       chip period. When load and en are high together the
//                       freshly loaded chips are used, so the replica chip of
//                       that same period already comes from the loaded state.
//   state             : the S stages.
// Reset clears the stages to all-zero bits (all chips +1). That state repeats
// itself forever, so the replica is meaningful only after a load; the reset
// value is this design's choice.
module mseq_gen #(
  parameter int unsigned S = rsse_pkg::S,
  parameter logic [S-1:0] TAPS = rsse_pkg::TAPS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [S-1:0] load_chips,
  output logic         chip,
  output logic [S-1:0] state
);

  logic [S-1:0] state_q;
  logic [S-1:0] eff;

  always_comb begin
    eff  = load ? load_chips : state_q;
    chip = ^(eff & TAPS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
    end else if (en) begin
      state_q <= {eff[S-2:0], chip};
    end else if (load) begin
      state_q <= load_chips;
    end
  end

  assign state = state_q;

endmodule
