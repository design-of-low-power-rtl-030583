// tb_lfsr_prpg -- self-checking testbench of lfsr_prpg.
//
// Three instances: the default 32-bit PRPG is compared step by step with a
// reference LFSR written here from the polynomial x^32 + x^22 + x^2 + x + 1;
// 8-bit and 16-bit instances must show the maximal period 2^n - 1.  Also
// checked: seed load, all-zero seed replaced by 1, hold when not enabled.
module tb_lfsr_prpg;

  logic clk;
  logic rst_n = 1'b0;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0;
  int failures = 0;

  logic        load, en;
  logic [31:0] seed, q32, ref32;
  logic [7:0]  q8;
  logic [15:0] q16;

  lfsr_prpg dut (.clk, .rst_n, .load, .seed, .en, .state(q32));
  lfsr_prpg #(.WIDTH(8))  dut8  (.clk, .rst_n, .load(1'b0), .seed(8'h0),  .en(1'b1), .state(q8));
  lfsr_prpg #(.WIDTH(16)) dut16 (.clk, .rst_n, .load(1'b0), .seed(16'h0), .en(1'b1), .state(q16));

  function automatic logic [31:0] ref_step(input logic [31:0] s);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

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

  int unsigned n8, n16;
  logic [7:0]  first8;
  logic [15:0] first16;

  initial begin
    load = 1'b0; en = 1'b0; seed = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(q32 == 32'd1, "reset value");
    // period of the 8- and 16-bit instances
    first8 = q8; first16 = q16; n8 = 0; n16 = 0;
    fork
      begin
        do begin @(posedge clk); #1 n8++; end while (q8 != first8);
      end
      begin
        do begin @(posedge clk); #1 n16++; end while (q16 != first16);
      end
    join
    check(n8 == 255, $sformatf("8-bit period %0d", n8));
    check(n16 == 65535, $sformatf("16-bit period %0d", n16));
    // seed load and stepping of the 32-bit PRPG
    seed = 32'hDEAD_BEEF; load = 1'b1;
    @(posedge clk); #1 load = 1'b0;
    check(q32 == 32'hDEAD_BEEF, "seed load");
    ref32 = q32;
    en = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      ref32 = ref_step(ref32);
      check(q32 == ref32, $sformatf("step %0d: %h vs %h", i, q32, ref32));
    end
    en = 1'b0;
    repeat (5) @(posedge clk); #1;
    check(q32 == ref32, "hold when disabled");
    seed = '0; load = 1'b1; en = 1'b1;
    @(posedge clk); #1 load = 1'b0; en = 1'b0;
    check(q32 == 32'd1, "zero seed replaced by 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
