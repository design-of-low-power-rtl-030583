// cut_model -- behavioural stand-in for the circuit under test, used only by
// the testbenches.
//
// Chain c captures its own cells rotated by one place, XORed with the cells of
// chain c+1 and a constant mask.  This gives every response bit a dependence
// on the stimulus so that the signature reflects the applied patterns.
// Combinational.
module cut_model #(
  parameter int unsigned CHAINS = 16,
  parameter int unsigned LEN    = 32
) (
  input  logic [CHAINS-1:0][LEN-1:0] scan_cells,
  output logic [CHAINS-1:0][LEN-1:0] response
);

  always_comb begin
    for (int c = 0; c < CHAINS; c++) begin
      response[c] = {scan_cells[c][LEN-2:0], scan_cells[c][LEN-1]}
                  ^ scan_cells[(c + 1) % CHAINS]
                  ^ {(LEN / 2){2'b10}};
    end
  end

endmodule
