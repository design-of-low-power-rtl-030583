// tb_presto_generator -- self-checking testbench of presto_generator at its
// default size (32-bit PRPG, 16 outputs).
//
// The testbench plays the role of the BIST controller: one pattern_start
// clock, then 32 shift clocks, repeated.  Checked every shift clock:
//  * the phase shifter outputs equal the XOR of latches j, j+10, j+22 of the
//    previous latch values updated by a reference model of the hold latches
//    (enabled latches take the PRPG bits of the previous clock);
//  * latch enables: all 1 with switching code 0000; 0 in a hold interval;
//    the toggle control register in a toggle interval;
//  * the toggle control register loaded at a pattern start holds the last 32
//    switching bits, and its density follows the switching code;
//  * shadow registers: a code written in mid-pattern acts only from the next
//    pattern start;
//  * switching activity at the outputs falls with the low-power codes.
module tb_presto_generator;
  import lp_bist_pkg::*;

  logic clk;
  logic rst_n = 1'b0;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0;
  int failures = 0;

  logic        seed_load, shift_en, pattern_start, cfg_we, toggle_state, lp_bypass;
  logic [31:0] seed, latch_en, ref_latch, prpg_prev;
  logic [15:0] ps_out, ps_prev;
  lp_cfg_t     cfg_in;

  presto_generator dut (.clk, .rst_n, .seed_load, .seed, .shift_en, .pattern_start, .cfg_we,
                        .cfg_in, .ps_out, .latch_en, .toggle_state, .lp_bypass);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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

  // Reference of the switching bit: PRPG stages 0, 8, 16, 24 ANDed.
  function automatic logic ref_sw_bit(input logic [3:0] code, input logic [3:0] r);
    return (code[0] & r[0])
         | (code[1] & r[0] & r[1])
         | (code[2] & r[0] & r[1] & r[2])
         | (code[3] & r[0] & r[1] & r[2] & r[3]);
  endfunction

  int        ones_total, tcr_loads, ps_toggles, shifts, hold_cycles, toggle_cycles;
  logic [31:0] sw_hist;
  logic [3:0]  cur_sw;
  lp_cfg_t     shadow_exp;

  // Runs n patterns with the given codes; returns output transitions.
  task automatic run(input logic [3:0] sw, input logic [3:0] hc, input logic [3:0] tc,
                     input int n, input bit midwrite);
    cfg_in = '{switching: sw, hold: hc, toggle: tc};
    cfg_we = 1'b1;
    shadow_exp = cfg_in;
    @(posedge clk); #1 cfg_we = 1'b0;
    ones_total = 0; tcr_loads = 0; ps_toggles = 0; shifts = 0;
    hold_cycles = 0; toggle_cycles = 0;
    for (int p = 0; p < n; p++) begin
      pattern_start = 1'b1;
      @(posedge clk); #1 pattern_start = 1'b0;
      cur_sw = shadow_exp.switching;
      check(dut.cfg == shadow_exp, "working codes taken at pattern start");
      check(toggle_state == 1'b1, "pattern starts in a toggle interval");
      if (p > 0) begin
        check(dut.tcr == sw_hist, "toggle control register = last 32 switching bits");
        ones_total += $countones(dut.tcr);
        tcr_loads++;
      end
      if (midwrite && p == 1) begin
        cfg_in = '{switching: 4'b0000, hold: 4'b0000, toggle: 4'b0000};
        cfg_we = 1'b1;
        shadow_exp = cfg_in;
      end
      shift_en = 1'b1;
      ref_latch = dut.latched;
      for (int s = 0; s < 32; s++) begin
        #1;
        // enables as seen before this clock edge
        if (lp_bypass) check(latch_en == '1, "bypass enables every latch");
        else if (!toggle_state) check(latch_en == '0, "hold interval disables every latch");
        else check(latch_en == dut.tcr, "toggle interval uses the toggle control register");
        check(lp_bypass == (cur_sw == 4'b0000), "bypass follows switching code");
        if (toggle_state) toggle_cycles++; else hold_cycles++;
        prpg_prev = dut.prpg;
        sw_hist = {sw_hist[30:0], ref_sw_bit(cur_sw, {prpg_prev[24], prpg_prev[16], prpg_prev[8], prpg_prev[0]})};
        for (int b = 0; b < 32; b++) if (latch_en[b]) ref_latch[b] = prpg_prev[b];
        ps_prev = ps_out;
        @(posedge clk); #1;
        cfg_we = 1'b0;
        check(dut.latched == ref_latch, "hold latches");
        check(ps_out == ref_ps(ref_latch), "phase shifter outputs");
        ps_toggles += $countones(ps_out ^ ps_prev);
        shifts++;
      end
      shift_en = 1'b0;
      if (midwrite && p == 1)
        check(dut.cfg.switching == sw, "mid-pattern write does not act before next pattern");
    end
  endtask

  int full_tr, lp_tr;

  initial begin
    seed_load = 1'b0; shift_en = 1'b0; pattern_start = 1'b0; cfg_we = 1'b0; cfg_in = '0;
    seed = 32'h1357_9BDF; sw_hist = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    seed_load = 1'b1;
    @(posedge clk); #1 seed_load = 1'b0;
    check(dut.prpg == seed && dut.latched == '0 && dut.tcr == '1 && toggle_state,
          "session start initialises the generator");

    // low power off: every latch toggles
    run(4'b0000, 4'b0000, 4'b0000, 40, 1'b0);
    full_tr = ps_toggles;
    check(shifts == 40 * 32, "shift count");

    // toggle control register only: density 1/2, then 1/16
    run(4'b0001, 4'b0000, 4'b0000, 200, 1'b0);
    check(ones_total * 100 >= tcr_loads * 32 * 45 && ones_total * 100 <= tcr_loads * 32 * 55,
          $sformatf("density code 0001: %0d/%0d", ones_total, tcr_loads * 32));
    check(hold_cycles == 0, "zero toggle code: no hold interval");
    run(4'b1000, 4'b0000, 4'b0000, 200, 1'b0);
    check(ones_total * 1000 >= tcr_loads * 32 * 45 && ones_total * 1000 <= tcr_loads * 32 * 80,
          $sformatf("density code 1000: %0d/%0d", ones_total, tcr_loads * 32));
    lp_tr = ps_toggles;

    // hold and toggle intervals
    run(4'b0001, 4'b0010, 4'b0001, 100, 1'b0);
    check(hold_cycles > 300 && toggle_cycles > 300,
          $sformatf("hold %0d / toggle %0d cycles", hold_cycles, toggle_cycles));

    // shadow register written in mid-pattern
    run(4'b0100, 4'b0000, 4'b0000, 3, 1'b1);
    run(4'b0100, 4'b0000, 4'b0000, 2, 1'b0);

    run(4'b1000, 4'b0000, 4'b0000, 40, 1'b0);
    lp_tr = ps_toggles;
    $display("phase shifter output transitions: %0d with low power off, %0d with code 1000",
             full_tr, lp_tr);
    check(lp_tr * 4 < full_tr, $sformatf("output transitions %0d (code 1000) vs %0d (off)", lp_tr, full_tr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
