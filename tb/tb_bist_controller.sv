// tb_bist_controller -- self-checking testbench of bist_controller.
//
// Two instances: CHAIN_LEN = 4, NUM_PATTERNS = 3, and the default size
// (32, 64).  For each, one session is run and the cycle of `done` and the
// number of load, shift, capture and compaction cycles are compared with the
// formulas of the sequence; a second start must give the same counts.
module tb_bist_controller;

  logic clk;
  logic rst_n = 1'b0;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0;
  int failures = 0;

  logic       start_s, start_d;
  logic       sl_s, mc_s, ps_s, se_s, cap_s, me_s, busy_s, done_s;
  logic       sl_d, mc_d, ps_d, se_d, cap_d, me_d, busy_d, done_d;
  logic [1:0] idx_s;
  logic [6:0] idx_d;

  bist_controller #(.CHAIN_LEN(4), .NUM_PATTERNS(3)) dut_s (
    .clk, .rst_n, .start(start_s), .seed_load(sl_s), .misr_clear(mc_s), .pattern_start(ps_s),
    .scan_en(se_s), .capture(cap_s), .misr_en(me_s), .busy(busy_s), .done(done_s), .pattern_idx(idx_s));

  bist_controller dut_d (
    .clk, .rst_n, .start(start_d), .seed_load(sl_d), .misr_clear(mc_d), .pattern_start(ps_d),
    .scan_en(se_d), .capture(cap_d), .misr_en(me_d), .busy(busy_d), .done(done_d), .pattern_idx(idx_d));

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

  task automatic session_small();
    int cyc, nload, nshift, ncap, nmisr, nseed;
    cyc = 0; nload = 0; nshift = 0; ncap = 0; nmisr = 0; nseed = 0;
    start_s = 1'b1;
    #1 nseed += int'(sl_s && mc_s);
    @(posedge clk); #1 start_s = 1'b0;
    cyc = 1;
    while (!done_s && cyc < 1000) begin
      check(busy_s, "busy during session");
      nload += int'(ps_s); nshift += int'(se_s); ncap += int'(cap_s); nmisr += int'(me_s);
      if (ps_s) check(int'(idx_s) == nload - 1, "pattern index");
      @(posedge clk); #1 cyc++;
    end
    check(nseed == 1, "seed load and MISR clear at start");
    check(cyc == 1 + 3 * (4 + 2) + 4, $sformatf("small: done after %0d cycles", cyc));
    check(nload == 3 && ncap == 3, $sformatf("small: %0d loads %0d captures", nload, ncap));
    check(nshift == 3 * 4 + 4, $sformatf("small: %0d shifts", nshift));
    check(nmisr == 2 * 4 + 4, $sformatf("small: %0d compactions", nmisr));
    repeat (3) @(posedge clk);
    #1 check(done_s && !busy_s, "done holds");
  endtask

  task automatic session_default();
    int cyc, nload, nshift, ncap, nmisr;
    cyc = 0; nload = 0; nshift = 0; ncap = 0; nmisr = 0;
    start_d = 1'b1;
    #1 check(sl_d && mc_d && !busy_d, "default: seed load and MISR clear at start");
    @(posedge clk); #1 start_d = 1'b0;
    check(busy_d && int'(idx_d) == 0, "default: busy from pattern 0");
    cyc = 1;
    while (!done_d && cyc < 10000) begin
      nload += int'(ps_d); nshift += int'(se_d); ncap += int'(cap_d); nmisr += int'(me_d);
      @(posedge clk); #1 cyc++;
    end
    check(cyc == 1 + 64 * (32 + 2) + 32, $sformatf("default: done after %0d cycles", cyc));
    check(nload == 64 && ncap == 64 && nshift == 64 * 32 + 32 && nmisr == 63 * 32 + 32,
          $sformatf("default: %0d %0d %0d %0d", nload, ncap, nshift, nmisr));
  endtask

  initial begin
    start_s = 1'b0; start_d = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!busy_s && !done_s && !se_s && !cap_s, "idle after reset");
    session_small();
    session_small();
    session_default();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
