// transition_controller -- adaptive input stage of one scan chain (low-power
// RTPG of the functional architecture).
//
// A 2-input multiplexer and a D flip-flop sit between the phase shifter and
// cell 1 of the chain.  Input 0 of the multiplexer is the new phase-shifter
// bit; input 1 is the D flip-flop's own output, i.e. the bit shifted in one
// cycle earlier.  The select is the XOR of the chain's last two cells (k-1 and
// k), which during shifting hold the responses of the previous pattern on
// their way out.  When they differ the previous stimulus bit is repeated, so
// no transition enters the chain; when they agree a fresh random bit is taken.
// Mux, D flip-flop and the XOR of cells k-1 and k follow the design; which mux
// input the XOR selects, and the `tc_enable` switch that turns the feedback
// off, are this implementation's reading and choice.
//
// Interface / timing: `clear` (session start, priority) resets the flip-flop
// to 0.  On an edge with `shift_en` = 1 the flip-flop loads the mux output; `scan_in` (flip-flop output) feeds cell 1.  `repeat_bit` is the
// combinational mux select.  Synchronous active-low reset to 0.
module transition_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic shift_en,
  input  logic tc_enable,
  input  logic ps_bit,
  input  logic tail_km1,
  input  logic tail_k,
  output logic scan_in,
  output logic repeat_bit
);

  assign repeat_bit = tc_enable & (tail_km1 ^ tail_k);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      scan_in <= 1'b0;
    end else if (shift_en) begin
      scan_in <= repeat_bit ? scan_in : ps_bit;
    end
  end

endmodule
