// lp_config_regs -- shadow and working copies of the low-power registers
// (switching code, hold code, toggle code) of the PRESTO generator.
//
// The tester may write the shadow copy at any time; the working copy, which
// drives the generator, takes the shadow value only at the start of a pattern.
// The programming of the generator therefore stays constant through the shift
// and capture of a pattern.  Shadow registers updated once per pattern follow
// the design; the parallel write port is this implementation's choice.
//
// Interface / timing: `we` writes `cfg_in` into the shadow copy on the next
// edge; `update` copies the shadow copy (its value before that edge) into
// `active`.  Synchronous active-low reset to all-zero codes: switching code 0
// disables low-power operation (every latch toggles).
module lp_config_regs
  import lp_bist_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    we,
  input  lp_cfg_t cfg_in,
  input  logic    update,
  output lp_cfg_t active
);

  lp_cfg_t shadow;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shadow <= '0;
      active <= '0;
    end else begin
      if (we)     shadow <= cfg_in;
      if (update) active <= shadow;
    end
  end

endmodule
