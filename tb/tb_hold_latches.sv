// tb_hold_latches -- self-checking testbench of hold_latches.
//
// Random data and random per-latch enables; a reference array updated here
// must match q after every clock.  Latches must not move when shift_en is 0;
// clear sets them all to 0.
module tb_hold_latches;

  logic clk;
  logic rst_n = 1'b0;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0;
  int failures = 0;

  logic        clear, shift_en;
  logic [31:0] en, d, q, exp_q;

  hold_latches dut (.clk, .rst_n, .clear, .shift_en, .en, .d, .q);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b0; shift_en = 1'b0; en = '0; d = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    exp_q = '0;
    check(q == exp_q, "reset");
    for (int i = 0; i < 1000; i++) begin
      clear = ($urandom_range(0, 60) == 0);
      shift_en = ($urandom_range(0, 3) != 0);
      en = $urandom; d = $urandom;
      @(posedge clk); #1;
      if (clear) exp_q = '0;
      else if (shift_en) begin
        for (int b = 0; b < 32; b++) if (en[b]) exp_q[b] = d[b];
      end
      check(q == exp_q, $sformatf("cycle %0d: %h vs %h", i, q, exp_q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
