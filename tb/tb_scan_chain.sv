// tb_scan_chain -- self-checking testbench of scan_chain (32 cells).
//
// Random shift, capture and idle cycles against a reference array: shift
// moves cell i to i+1 and takes scan_in into cell 1, capture loads the
// response word, shift wins over capture, scan_out is cell k.
module tb_scan_chain;

  logic clk;
  logic rst_n = 1'b0;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0;
  int failures = 0;

  logic        shift_en, capture_en, scan_in, scan_out;
  logic [31:0] capture_data, cells, exp_cells;

  scan_chain dut (.clk, .rst_n, .shift_en, .capture_en, .scan_in, .capture_data, .cells, .scan_out);

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
    shift_en = 1'b0; capture_en = 1'b0; scan_in = 1'b0; capture_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    exp_cells = '0;
    for (int i = 0; i < 3000; i++) begin
      shift_en = ($urandom_range(0, 2) != 0);
      capture_en = ($urandom_range(0, 6) == 0);
      scan_in = 1'($urandom); capture_data = $urandom;
      @(posedge clk); #1;
      if (shift_en) begin
        for (int b = 31; b > 0; b--) exp_cells[b] = exp_cells[b-1];
        exp_cells[0] = scan_in;
      end else if (capture_en) begin
        exp_cells = capture_data;
      end
      check(cells == exp_cells, $sformatf("cycle %0d", i));
      check(scan_out == exp_cells[31], $sformatf("scan_out at %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
