// lfsr_prpg -- pseudorandom pattern generator (PRPG) of the low-power BIST
// engine: an n-bit linear feedback shift register.
//
// Fibonacci form: every enabled cycle the state shifts one place towards the
// MSB and the XOR of the tapped stages enters at bit 0.  The taps are those of
// a primitive polynomial (lp_bist_pkg::prim_poly_taps), so the sequence has
// period 2^WIDTH - 1.  That the PRPG is an LFSR follows the design; the form,
// polynomial and seeding are this implementation's choices.
//
// Interface / timing: `load` (priority over `en`) writes `seed` on the next
// clock edge; an all-zero seed is replaced by 1 so the register cannot lock
// up.  `en` advances the state by one step per clock.  `state` is the
// register itself (no combinational path from inputs).  Synchronous
// active-low reset to the value 1.
module lfsr_prpg
  import lp_bist_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             en,
  output logic [WIDTH-1:0] state
);

  localparam logic [31:0]      TAPS32 = prim_poly_taps(WIDTH);
  localparam logic [WIDTH-1:0] TAPS   = TAPS32[WIDTH-1:0];

  initial begin
    assert (WIDTH >= 4 && WIDTH <= 32) else $fatal(1, "lfsr_prpg: WIDTH must be 4..32");
  end

  logic feedback;
  assign feedback = ^(state & TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= WIDTH'(1);
    end else if (load) begin
      state <= (seed == '0) ? WIDTH'(1) : seed;
    end else if (en) begin
      state <= {state[WIDTH-2:0], feedback};
    end
  end

endmodule
