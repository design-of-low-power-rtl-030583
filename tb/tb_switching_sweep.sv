// tb_switching_sweep -- switching-activity sweep of lp_bist_top at its default
// size: how the low-power codes lower the toggling of the scan chain inputs.
//
// For each setting one full BIST run is made (transition control off) and the
// fraction of phase-shifter outputs that change between consecutive shift
// clocks is measured, over patterns 1..63 (pattern 0 always toggles fully).
// Expected value: with a fraction p of latches in toggle mode, each enabled
// latch changes with probability 1/2, and an output (XOR of three latches)
// changes when an odd number of them change:  r(p) = (1 - (1 - p)^3) / 2.
// Hold intervals scale r by the time share of toggle intervals,
// Lt / (Lt + Lh), with L = 1 / P(leave).  Each measured rate must lie within
// 20 % of the expected one and fall as the code density falls.
module tb_switching_sweep;
  import lp_bist_pkg::*;

  localparam int unsigned N = 32;
  localparam int unsigned M = 16;
  localparam int unsigned K = 32;

  logic clk;
  logic rst_n = 1'b0;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0;
  int failures = 0;

  logic                start, cfg_we, tc_enable, scan_en, capture, busy, done;
  logic                toggle_state, lp_bypass;
  logic [N-1:0]        seed, latch_en;
  code_t               cfg_switching, cfg_hold, cfg_toggle;
  logic [M-1:0][K-1:0] cut_response, scan_cells;
  logic [M-1:0]        signature, tc_repeat;
  logic [6:0]          pattern_idx;

  lp_bist_top dut (.*);

  cut_model #(.CHAINS(M), .LEN(K)) u_cut (.scan_cells, .response(cut_response));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one BIST run; returns the measured output change rate.
  task automatic run(input code_t sw, input code_t hc, input code_t tc, output real rate);
    logic [M-1:0] prev;
    logic         prev_valid;
    int           changes, slots;
    cfg_switching = sw; cfg_hold = hc; cfg_toggle = tc; cfg_we = 1'b1;
    @(posedge clk); #1 cfg_we = 1'b0;
    seed = $urandom | 32'd1;
    start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    changes = 0; slots = 0; prev_valid = 1'b0; prev = '0;
    while (!done) begin
      // sample the generator output seen by the chains in each shift clock
      if (scan_en && pattern_idx != '0) begin
        if (prev_valid) begin
          changes += $countones(dut.ps_out ^ prev);
          slots += M;
        end
        prev = dut.ps_out;
        prev_valid = 1'b1;
      end else begin
        prev_valid = 1'b0;
      end
      @(posedge clk); #1;
    end
    rate = real'(changes) / real'(slots);
  endtask

  function automatic real r_of_p(input real p);
    return (1.0 - (1.0 - p) * (1.0 - p) * (1.0 - p)) / 2.0;
  endfunction

  real rate[6];
  real expect_rate[6];

  initial begin
    start = 1'b0; cfg_we = 1'b0; tc_enable = 1'b0; seed = 32'd1;
    cfg_switching = '0; cfg_hold = '0; cfg_toggle = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    run(4'b0000, 4'b0000, 4'b0000, rate[0]); expect_rate[0] = r_of_p(1.0);
    run(4'b0001, 4'b0000, 4'b0000, rate[1]); expect_rate[1] = r_of_p(0.5);
    run(4'b0010, 4'b0000, 4'b0000, rate[2]); expect_rate[2] = r_of_p(0.25);
    run(4'b0100, 4'b0000, 4'b0000, rate[3]); expect_rate[3] = r_of_p(0.125);
    run(4'b1000, 4'b0000, 4'b0000, rate[4]); expect_rate[4] = r_of_p(0.0625);
    // hold intervals of mean 4 clocks, toggle intervals of mean 4 clocks
    run(4'b0001, 4'b0010, 4'b0010, rate[5]); expect_rate[5] = r_of_p(0.5) * 0.5;

    for (int i = 0; i < 6; i++) begin
      $display("setting %0d: output change rate %.4f, expected %.4f", i, rate[i], expect_rate[i]);
      check(rate[i] > 0.8 * expect_rate[i] && rate[i] < 1.2 * expect_rate[i],
            $sformatf("setting %0d rate %.4f vs %.4f", i, rate[i], expect_rate[i]));
    end
    for (int i = 1; i < 5; i++) check(rate[i] < rate[i-1], $sformatf("rate falls at setting %0d", i));
    check(rate[5] < rate[1], "hold intervals lower the rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
