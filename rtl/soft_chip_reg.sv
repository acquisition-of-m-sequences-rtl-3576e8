// soft_chip_reg - the soft-chip register of S soft-chip delay units (SCDUs).
//
// Each SCDU holds one LLR. When a new decoder output L(y_i) is shifted in it
// enters the left-most unit (scdu[0]), every other value moves one unit to
// the right, and the value in the right-most unit (L(y_{i-S})) is dropped.
// After the shift scdu[k-1] = L(y_{i+1-k}): the register always holds the S
// most recent soft outputs, as the method requires. clr sets every unit to
// zero, the initial state of the method (no a priori knowledge).
//
// Interface and timing: shift and clr act at the rising clock edge, clr
// having priority; scdu is registered. Asynchronous active-low reset also
// clears the units (this design's choice).
module soft_chip_reg #(
  parameter int unsigned S     = rsse_pkg::S,
  parameter int unsigned LLR_W = rsse_pkg::LLR_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    shift,
  input  logic signed [LLR_W-1:0] din,
  output logic signed [LLR_W-1:0] scdu [S]
);

  logic signed [LLR_W-1:0] r [S];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < S; k++) r[k] <= '0;
    end else if (clr) begin
      for (int k = 0; k < S; k++) r[k] <= '0;
    end else if (shift) begin
      r[0] <= din;
      for (int k = 1; k < S; k++) r[k] <= r[k-1];
    end
  end

  assign scdu = r;

endmodule
