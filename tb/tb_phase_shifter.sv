// tb_phase_shifter -- self-checking testbench of phase_shifter (32 in, 16 out).
//
// Output j must be the XOR of latches j, (j+10) mod 32 and (j+22) mod 32.
// Checked with every one-hot input (each output sees exactly its three taps)
// and with random inputs.
module tb_phase_shifter;

  int checks = 0;
  int failures = 0;

  logic [31:0] in;
  logic [15:0] out;

  phase_shifter dut (.in, .out);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_ps(input logic [31:0] x);
    logic [15:0] y;
    for (int j = 0; j < 16; j++) y[j] = x[j] ^ x[(j + 10) % 32] ^ x[(j + 22) % 32];
    return y;
  endfunction

  int fanout [16];

  initial begin
    foreach (fanout[j]) fanout[j] = 0;
    for (int i = 0; i < 32; i++) begin
      in = 32'd1 << i;
      #1;
      check(out == ref_ps(in), $sformatf("one-hot %0d: %h", i, out));
      for (int j = 0; j < 16; j++) fanout[j] += int'(out[j]);
    end
    for (int j = 0; j < 16; j++) check(fanout[j] == 3, $sformatf("output %0d has %0d taps", j, fanout[j]));
    for (int i = 0; i < 500; i++) begin
      in = $urandom;
      #1 check(out == ref_ps(in), $sformatf("random %h: %h", in, out));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
