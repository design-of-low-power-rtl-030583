// tb_lp_config_regs -- self-checking testbench of lp_config_regs.
//
// Random writes of the shadow copy and random update strobes; the working
// copy must change only on an update and then take the shadow value from
// before that clock.
module tb_lp_config_regs;
  import lp_bist_pkg::*;

  logic clk;
  logic rst_n = 1'b0;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0;
  int failures = 0;

  logic    we, update;
  lp_cfg_t cfg_in, active, exp_shadow, exp_active;

  lp_config_regs dut (.clk, .rst_n, .we, .cfg_in, .update, .active);

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
    we = 1'b0; update = 1'b0; cfg_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    exp_shadow = '0; exp_active = '0;
    check(active == '0, "reset");
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); update = ($urandom_range(0, 5) == 0);
      cfg_in = lp_cfg_t'($urandom);
      @(posedge clk); #1;
      if (update) exp_active = exp_shadow;
      if (we) exp_shadow = cfg_in;
      check(active == exp_active, $sformatf("cycle %0d: %h vs %h", i, active, exp_active));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
