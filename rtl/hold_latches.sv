// hold_latches -- the n hold latches H1..Hn between the PRPG and the phase
// shifter of the PRESTO generator.
//
// A latch whose enable is 1 is in toggle mode and passes the PRPG bit on; a
// latch whose enable is 0 is in hold mode and keeps its value, so the phase
// shifter outputs that depend only on held latches feed their scan chains a
// constant.  The role of the latches follows the design.  They are built here
// as enable flip-flops clocked with the rest of the generator (not as level
// sensitive latches), so a passed PRPG bit appears one clock later; this keeps
// the whole engine single-clock and free of timing loops.
//
// Interface / timing: `clear` (session start, priority) sets every latch to
// 0; otherwise on a clock edge with `shift_en` = 1, q[i] <= d[i] for every i
// with en[i] = 1.  Synchronous active-low reset to 0.
module hold_latches #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             shift_en,
  input  logic [WIDTH-1:0] en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      q <= '0;
    end else if (shift_en) begin
      q <= (en & d) | (~en & q);
    end
  end

endmodule
