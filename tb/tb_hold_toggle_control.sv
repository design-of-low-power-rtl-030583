// tb_hold_toggle_control -- self-checking testbench of hold_toggle_control.
//
// A reference T flip-flop written here flips when the weighted bit of the
// selected code (hold code in a hold interval, toggle code in a toggle
// interval) is 1; it is compared every clock with random inputs.  Then the
// mean lengths of hold and toggle intervals are measured for hold code 0001
// (leave with probability 1/2: mean 2 cycles) and toggle code 0100 (1/8:
// mean 8 cycles), and a zero code must keep the state.
module tb_hold_toggle_control;

  logic clk;
  logic rst_n = 1'b0;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0;
  int failures = 0;

  logic       shift_en, restart, state, exp_state, w;
  logic [3:0] hold_code, toggle_code, rnd, c;

  hold_toggle_control dut (.clk, .rst_n, .shift_en, .restart, .hold_code, .toggle_code, .rnd, .state);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hold_cycles, toggle_cycles, hold_runs, toggle_runs;
  logic prev;

  initial begin
    shift_en = 1'b0; restart = 1'b0; hold_code = '0; toggle_code = '0; rnd = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    exp_state = 1'b1;
    check(state == 1'b1, "reset to toggle");
    for (int i = 0; i < 5000; i++) begin
      shift_en = ($urandom_range(0, 3) != 0);
      restart = ($urandom_range(0, 50) == 0);
      hold_code = 4'($urandom); toggle_code = 4'($urandom); rnd = 4'($urandom);
      c = exp_state ? toggle_code : hold_code;
      w = 1'b0;
      if (c[0] && rnd[0]) w = 1'b1;
      if (c[1] && rnd[1:0] == 2'b11) w = 1'b1;
      if (c[2] && rnd[2:0] == 3'b111) w = 1'b1;
      if (c[3] && rnd == 4'b1111) w = 1'b1;
      @(posedge clk); #1;
      if (restart) exp_state = 1'b1;
      else if (shift_en && w) exp_state = ~exp_state;
      check(state == exp_state, $sformatf("cycle %0d", i));
    end
    // interval statistics
    restart = 1'b0; shift_en = 1'b1; hold_code = 4'b0001; toggle_code = 4'b0100;
    hold_cycles = 0; toggle_cycles = 0; hold_runs = 0; toggle_runs = 0;
    prev = state;
    for (int i = 0; i < 40000; i++) begin
      rnd = 4'($urandom);
      @(posedge clk); #1;
      if (prev) toggle_cycles++; else hold_cycles++;
      if (state != prev) begin
        if (prev) toggle_runs++; else hold_runs++;
      end
      prev = state;
    end
    check(hold_runs > 100 && toggle_runs > 100, "intervals alternate");
    check(hold_cycles * 10 >= hold_runs * 17 && hold_cycles * 10 <= hold_runs * 23,
          $sformatf("mean hold interval %0d/%0d", hold_cycles, hold_runs));
    check(toggle_cycles * 10 >= toggle_runs * 70 && toggle_cycles * 10 <= toggle_runs * 90,
          $sformatf("mean toggle interval %0d/%0d", toggle_cycles, toggle_runs));
    // zero toggle code: stays in toggle
    restart = 1'b1; @(posedge clk); #1 restart = 1'b0;
    toggle_code = '0;
    for (int i = 0; i < 200; i++) begin
      rnd = 4'($urandom);
      @(posedge clk); #1;
    end
    check(state == 1'b1, "zero toggle code keeps toggle interval");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
