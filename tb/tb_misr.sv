// tb_misr -- self-checking testbench of misr (16 bits).
//
// A reference signature register written here from the polynomial
// x^16 + x^15 + x^13 + x^4 + 1 is compared every clock with random data,
// enables and clears.  A single flipped input bit must change the signature.
module tb_misr;

  logic clk;
  logic rst_n = 1'b0;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0;
  int failures = 0;

  logic        clear, en;
  logic [15:0] d, sig, exp_sig, sig_a;

  misr dut (.clk, .rst_n, .clear, .en, .d, .sig);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_stream(input int unsigned s, input int flip_at, output logic [15:0] res);
    logic [15:0] dd;
    clear = 1'b1; en = 1'b0;
    @(posedge clk); #1 clear = 1'b0;
    en = 1'b1;
    for (int i = 0; i < 200; i++) begin
      dd = 16'((s * 2654435761) ^ (i * 40503));
      if (i == flip_at) dd[3] = ~dd[3];
      d = dd;
      @(posedge clk); #1;
    end
    en = 1'b0;
    res = sig;
  endtask

  initial begin
    clear = 1'b0; en = 1'b0; d = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    exp_sig = '0;
    for (int i = 0; i < 3000; i++) begin
      clear = ($urandom_range(0, 100) == 0);
      en = ($urandom_range(0, 3) != 0);
      d = 16'($urandom);
      @(posedge clk); #1;
      if (clear) exp_sig = '0;
      else if (en) exp_sig = {exp_sig[14:0], exp_sig[15] ^ exp_sig[14] ^ exp_sig[12] ^ exp_sig[3]} ^ d;
      check(sig == exp_sig, $sformatf("cycle %0d: %h vs %h", i, sig, exp_sig));
    end
    run_stream(7, -1, sig_a);
    run_stream(7, 57, exp_sig);
    check(sig_a != exp_sig, "single-bit error changes the signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
