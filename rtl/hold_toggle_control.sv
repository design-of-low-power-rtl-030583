// hold_toggle_control -- T flip-flop that splits each scan shift period of the
// PRESTO generator into alternating hold and toggle intervals.
//
// In a hold interval (state 0) all hold latches are disabled; in a toggle
// interval (state 1) the latches selected by the toggle control register pass
// PRPG data.  Four 2-input multiplexers, steered by the T flip-flop, select the
// 4-bit code of the hold register (in a hold interval) or of the toggle
// register (in a toggle interval).  The code drives a weighted_logic block; a 1
// from it flips the T flip-flop.  Thus the hold code sets the mean length of a
// hold interval (1/p cycles) and the toggle code that of a toggle interval.
// A code of 0000 keeps the generator in that state.  All of this follows the
// design.  Starting every pattern in a toggle interval, and the reset value,
// are this implementation's choices.
//
// Interface / timing: `shift_en` lets the T flip-flop change; `restart`
// (pattern start) forces the toggle state on the next edge.  `state` is the
// flip-flop output.  Synchronous active-low reset to the toggle state.
module hold_toggle_control
  import lp_bist_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift_en,
  input  logic              restart,
  input  code_t             hold_code,
  input  code_t             toggle_code,
  input  logic [CODE_W-1:0] rnd,
  output logic              state
);

  code_t sel_code;
  logic  flip;

  assign sel_code = state ? toggle_code : hold_code;

  weighted_logic u_weight (
    .code (sel_code),
    .rnd  (rnd),
    .out  (flip)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= 1'b1;
    end else if (restart) begin
      state <= 1'b1;
    end else if (shift_en) begin
      state <= state ^ flip;
    end
  end

endmodule
