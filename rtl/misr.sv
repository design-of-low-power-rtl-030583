// misr -- multiple-input signature register compacting the scan chain
// outputs of the BIST engine.
//
// One input per scan chain.  Every enabled clock the register shifts one place
// towards the MSB with the feedback of a primitive polynomial
// (lp_bist_pkg::prim_poly_taps) entering bit 0, and the chain outputs are
// XORed in: sig' = {sig[W-2:0], ^(sig & taps)} ^ d.  A MISR at this place
// follows the design; its polynomial and form are this implementation's
// choice.
//
// Interface / timing: `clear` (priority) resets the signature to 0 on the next
// edge; `en` compacts `d`.  Synchronous active-low reset to 0.
module misr
  import lp_bist_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] sig
);

  localparam logic [31:0]      TAPS32 = prim_poly_taps(WIDTH);
  localparam logic [WIDTH-1:0] TAPS   = TAPS32[WIDTH-1:0];

  initial begin
    assert (WIDTH >= 4 && WIDTH <= 32) else $fatal(1, "misr: WIDTH must be 4..32");
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      sig <= '0;
    end else if (en) begin
      sig <= {sig[WIDTH-2:0], ^(sig & TAPS)} ^ d;
    end
  end

endmodule
