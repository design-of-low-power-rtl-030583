// tb_toggle_control_register -- self-checking testbench of
// toggle_control_register (32 bits).
//
// Random bits are shifted in, with random idle cycles; at random moments the
// register is loaded, and the toggle control register must then equal the
// last 32 shifted bits (newest in bit 0), and keep that value until the next
// load.  Init (and reset) set both registers to all 1.
module tb_toggle_control_register;

  logic clk;
  logic rst_n = 1'b0;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0;
  int failures = 0;

  logic        init, shift_en, din, load;
  logic [31:0] tcr, hist, exp_tcr;

  toggle_control_register dut (.clk, .rst_n, .init, .shift_en, .din, .load, .tcr);

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

  initial begin
    init = 1'b0; shift_en = 1'b0; din = 1'b0; load = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(tcr == '1, "reset: all latches toggle");
    hist = '1; exp_tcr = '1;
    for (int i = 0; i < 3000; i++) begin
      shift_en = ($urandom_range(0, 4) != 0);
      din = 1'($urandom);
      load = ($urandom_range(0, 40) == 0);
      init = ($urandom_range(0, 200) == 0);
      @(posedge clk); #1;
      if (init) begin
        exp_tcr = '1; hist = '1;
      end else begin
        if (load) exp_tcr = hist;
        if (shift_en) hist = {hist[30:0], din};
      end
      check(tcr == exp_tcr, $sformatf("cycle %0d: %h vs %h", i, tcr, exp_tcr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
