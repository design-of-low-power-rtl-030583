// phase_shifter -- XOR network between the hold latches and the scan chains.
//
// Each output is the XOR of three different hold latch outputs, which
// decorrelates the bit streams entering neighbouring scan chains.  An output
// is constant while its three latches hold.  Three inputs per output follow
// the design; the tap positions (lp_bist_pkg::ps_tap: latches j, j + n/3,
// j + 2n/3 + 1, mod n) are this implementation's choice.
//
// Interface: IN_WIDTH latch outputs in, OUT_WIDTH scan chain inputs out.
// Purely combinational.
module phase_shifter
  import lp_bist_pkg::*;
#(
  parameter int unsigned IN_WIDTH  = 32,
  parameter int unsigned OUT_WIDTH = 16
) (
  input  logic [IN_WIDTH-1:0]  in,
  output logic [OUT_WIDTH-1:0] out
);

  initial begin
    assert (IN_WIDTH >= 6) else $fatal(1, "phase_shifter: IN_WIDTH must be at least 6");
  end

  for (genvar j = 0; j < OUT_WIDTH; j++) begin : g_out
    localparam int unsigned T0 = ps_tap(j, 0, IN_WIDTH);
    localparam int unsigned T1 = ps_tap(j, 1, IN_WIDTH);
    localparam int unsigned T2 = ps_tap(j, 2, IN_WIDTH);
    assign out[j] = in[T0] ^ in[T1] ^ in[T2];
  end

endmodule
