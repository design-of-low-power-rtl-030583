// tb_weighted_logic -- self-checking testbench of weighted_logic.
//
// Exhaustive over the 16 codes and 16 random-input values against a sum of
// products written here; then, for each one-hot code, the probability of a 1
// over 16 equally likely inputs must be 8, 4, 2 and 1 sixteenths.
module tb_weighted_logic;

  int checks = 0;
  int failures = 0;

  logic [3:0] code, rnd;
  logic       out;

  weighted_logic dut (.code, .rnd, .out);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic exp;
  int   ones;

  initial begin
    for (int c = 0; c < 16; c++) begin
      for (int r = 0; r < 16; r++) begin
        code = 4'(c); rnd = 4'(r);
        #1;
        exp = (code[0] & rnd[0])
            | (code[1] & rnd[0] & rnd[1])
            | (code[2] & rnd[0] & rnd[1] & rnd[2])
            | (code[3] & rnd[0] & rnd[1] & rnd[2] & rnd[3]);
        check(out == exp, $sformatf("code %b rnd %b: %b", code, rnd, out));
      end
    end
    for (int k = 0; k < 4; k++) begin
      ones = 0;
      for (int r = 0; r < 16; r++) begin
        code = 4'(1 << k); rnd = 4'(r);
        #1 ones += int'(out);
      end
      check(ones == (8 >> k), $sformatf("weight of code bit %0d: %0d/16", k, ones));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
