// scan_chain -- one scan chain of k scan cells of the circuit under test.
//
// In shift mode the chain moves one place per clock from cell 1 towards cell
// k, taking `scan_in` into cell 1; cell k is the scan output.  In capture mode
// every cell loads the response of the circuit under test.  Otherwise the
// cells keep their values.  The chain of cells 1..k follows the design; the
// capture port stands for the functional inputs of the scan flip-flops.
//
// Interface / timing: cells[0] is cell 1, cells[LEN-1] is cell k.
// `shift_en` has priority over `capture_en`.  Synchronous active-low reset to
// 0.
module scan_chain #(
  parameter int unsigned LEN = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  logic           capture_en,
  input  logic           scan_in,
  input  logic [LEN-1:0] capture_data,
  output logic [LEN-1:0] cells,
  output logic           scan_out
);

  initial begin
    assert (LEN >= 2) else $fatal(1, "scan_chain: LEN must be at least 2");
  end

  assign scan_out = cells[LEN-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cells <= '0;
    end else if (shift_en) begin
      cells <= {cells[LEN-2:0], scan_in};
    end else if (capture_en) begin
      cells <= capture_data;
    end
  end

endmodule
