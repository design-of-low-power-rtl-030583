// weighted_logic -- weighted random bit source of the PRESTO generator.
//
// Four AND gates combine one, two, three and four independent PRPG bits, so
// their outputs are 1 with probability 1/2, 1/4, 1/8 and 1/16.  Each AND term
// is enabled by one bit of a 4-bit code and the enabled terms are ORed.  A
// one-hot code therefore selects a power-of-two probability, several code bits
// give the probability of the OR, and code 0000 gives a constant 0.  The
// structure and the four weights follow the design.
//
// Interface: code[0] enables the 1/2 term, code[1] 1/4, code[2] 1/8, code[3]
// 1/16.  rnd[k] must come from distinct PRPG stages.  Purely combinational.
module weighted_logic
  import lp_bist_pkg::*;
(
  input  code_t             code,
  input  logic [CODE_W-1:0] rnd,
  output logic              out
);

  logic [CODE_W-1:0] term;

  always_comb begin
    for (int k = 0; k < CODE_W; k++) begin
      // term k is the AND of rnd[0..k]: probability 2^-(k+1)
      term[k] = code[k] & (&(rnd | ~((CODE_W)'((1 << (k + 1)) - 1))));
    end
    out = |term;
  end

endmodule
