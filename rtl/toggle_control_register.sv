// toggle_control_register -- the shift register and toggle control register
// of the PRESTO generator.
//
// During scan shifting, one weighted random bit per clock (1 with the
// probability chosen by the switching code) enters an n-bit shift register.
// At the start of every pattern its content is copied in parallel into the
// n-bit toggle control register, whose bit i puts hold latch i in toggle mode
// (1) or hold mode (0).  The fraction of 1s therefore sets the scan switching
// activity of the next pattern.  Shift register, parallel copy once per
// pattern and the meaning of the bits follow the design.
//
// Interface / timing: `shift_en` shifts `din` into bit 0; `load` copies the
// shift register into `tcr` on the next clock edge.  `init` (session start,
// priority) and the synchronous active-low reset set both registers to all 1,
// so the first pattern of a session, which has no shifted history yet, runs
// with every latch in toggle mode -- these initial values are a choice.
module toggle_control_register #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic             shift_en,
  input  logic             din,
  input  logic             load,
  output logic [WIDTH-1:0] tcr
);

  logic [WIDTH-1:0] sr;

  always_ff @(posedge clk) begin
    if (!rst_n || init) begin
      sr  <= '1;
      tcr <= '1;
    end else begin
      if (shift_en) sr <= {sr[WIDTH-2:0], din};
      if (load)     tcr <= sr;
    end
  end

endmodule
