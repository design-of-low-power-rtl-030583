// tb_transition_controller -- self-checking testbench of
// transition_controller.
//
// Random phase-shifter bits and tail bits; a reference flip-flop written here
// repeats its value when the feedback is on and the two tail bits differ, and
// otherwise takes the new bit.  With the feedback on and random tails, about
// half of the shift cycles must repeat, and the stream into the chain must
// carry fewer transitions than the phase-shifter stream.
module tb_transition_controller;

  logic clk;
  logic rst_n = 1'b0;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0;
  int failures = 0;

  logic clear, shift_en, tc_enable, ps_bit, tail_km1, tail_k, scan_in, repeat_bit, exp_q, exp_rep;

  transition_controller dut (.clk, .rst_n, .clear, .shift_en, .tc_enable, .ps_bit, .tail_km1, .tail_k,
                             .scan_in, .repeat_bit);

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

  int reps, ps_tr, in_tr;
  logic prev_ps, prev_in;

  initial begin
    clear = 1'b0; shift_en = 1'b0; tc_enable = 1'b0; ps_bit = 1'b0; tail_km1 = 1'b0; tail_k = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    exp_q = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      clear = ($urandom_range(0, 50) == 0);
      shift_en = ($urandom_range(0, 3) != 0);
      tc_enable = ($urandom_range(0, 3) != 0);
      ps_bit = 1'($urandom); tail_km1 = 1'($urandom); tail_k = 1'($urandom);
      #1;
      exp_rep = tc_enable && (tail_km1 != tail_k);
      check(repeat_bit == exp_rep, $sformatf("select at %0d", i));
      @(posedge clk); #1;
      if (clear) exp_q = 1'b0;
      else if (shift_en && !exp_rep) exp_q = ps_bit;
      check(scan_in == exp_q, $sformatf("cycle %0d", i));
    end
    clear = 1'b0; shift_en = 1'b1; tc_enable = 1'b1;
    reps = 0; ps_tr = 0; in_tr = 0; prev_ps = 1'b0; prev_in = scan_in;
    for (int i = 0; i < 4000; i++) begin
      ps_bit = 1'($urandom); tail_km1 = 1'($urandom); tail_k = 1'($urandom);
      #1 reps += int'(repeat_bit);
      ps_tr += int'(ps_bit != prev_ps); prev_ps = ps_bit;
      @(posedge clk); #1;
      in_tr += int'(scan_in != prev_in); prev_in = scan_in;
    end
    check(reps > 1800 && reps < 2200, $sformatf("repeat rate %0d/4000", reps));
    check(in_tr * 10 < ps_tr * 8, $sformatf("transitions in %0d vs phase shifter %0d", in_tr, ps_tr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
