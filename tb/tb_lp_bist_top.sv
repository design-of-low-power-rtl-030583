// tb_lp_bist_top -- end-to-end testbench of lp_bist_top at its default size
// (32-bit PRPG, 16 chains of 32 cells, 64 patterns; no parameter override).
//
// A small behavioural circuit under test (cut_model) returns a response word
// per chain computed from the scan cells.  Four BIST sessions are run:
//   1. low-power operation off (switching code 0000), transition control off;
//   2. the same again: the signature must repeat;
//   3. toggle control register at density 1/16, transition control off;
//   4. density 1/4 with hold / toggle intervals and transition control on,
//      with the codes rewritten in mid-session (taken at the next pattern).
// Every clock, a reference model here checks: shifting (cell 1 takes the
// transition controller flip-flop, modelled here from the phase-shifter
// output and the XOR of the two tail cells, active from the second pattern), capture of the responses, the
// MISR signature, and the length of a session (1 + 64*34 + 32 clocks).
// Transitions entering the chains must fall from session 1 to 3 and 3 to 4.
// Each mechanism (bypass, toggle interval, hold interval, repeat of the
// transition controller, capture, pattern load, unload, shadow register
// update in mid-session) is counted and must occur.
module tb_lp_bist_top;
  import lp_bist_pkg::*;

  localparam int unsigned N = 32;
  localparam int unsigned M = 16;
  localparam int unsigned K = 32;
  localparam int unsigned P = 64;

  logic clk;
  logic rst_n = 1'b0;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0;
  int failures = 0;

  logic                 start, cfg_we, tc_enable, scan_en, capture, busy, done;
  logic                 toggle_state, lp_bypass;
  logic [N-1:0]         seed, latch_en;
  code_t                cfg_switching, cfg_hold, cfg_toggle;
  logic [M-1:0][K-1:0]  cut_response, scan_cells;
  logic [M-1:0]         signature, tc_repeat;
  logic [6:0]           pattern_idx;

  lp_bist_top dut (.*);

  cut_model #(.CHAINS(M), .LEN(K)) u_cut (.scan_cells, .response(cut_response));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic [M-1:0]        ref_dff, ref_sig;
  logic [M-1:0][K-1:0] old_cells, old_resp;
  logic [M-1:0]        old_ps, exp_rep;
  logic                old_scan_en, old_capture;
  int                  captures_in_session;

  // mechanism counters
  int n_bypass, n_toggle, n_hold, n_repeat, n_capture, n_load, n_unload, n_cfg_update;
  int transitions;

  initial forever begin
    @(posedge clk);
    if (rst_n) begin
      old_cells   = scan_cells;
      old_resp    = cut_response;
      old_ps      = dut.ps_out;
      old_scan_en = scan_en;
      old_capture = capture;
      for (int c = 0; c < M; c++) exp_rep[c] = scan_en && tc_enable && captures_in_session >= 1 && (scan_cells[c][K-2] != scan_cells[c][K-1]);
      if (scan_en) begin
        check(tc_repeat == exp_rep, "transition controller select");
        n_repeat += $countones(tc_repeat);
        if (lp_bypass) begin
          n_bypass++;
          check(latch_en == '1, "bypass: every latch toggles");
        end else if (toggle_state) begin
          n_toggle++;
        end else begin
          n_hold++;
          check(latch_en == '0, "hold interval: every latch holds");
        end
        if (captures_in_session == int'(P)) n_unload++;
        if (captures_in_session >= 1) begin
          ref_sig = {ref_sig[M-2:0], ref_sig[M-1] ^ ref_sig[M-2] ^ ref_sig[M-4] ^ ref_sig[3]};
          for (int c = 0; c < M; c++) ref_sig[c] ^= scan_cells[c][K-1];
        end
      end
      if (dut.pattern_start) begin
        n_load++;
        check(int'(pattern_idx) == captures_in_session, "pattern index at load");
        if (dut.u_gen.cfg != dut.u_gen.u_cfg.shadow && captures_in_session > 0) n_cfg_update++;
      end
      if (capture) begin
        n_capture++;
        captures_in_session++;
      end
      #1;
      if (old_scan_en) begin
        for (int c = 0; c < M; c++) begin
          check(scan_cells[c] == {old_cells[c][K-2:0], ref_dff[c]}, $sformatf("shift of chain %0d", c));
          transitions += int'(scan_cells[c][0] != old_cells[c][0]);
          if (!exp_rep[c]) ref_dff[c] = old_ps[c];
        end
      end else if (old_capture) begin
        check(scan_cells == old_resp, "capture of the responses");
      end
      check(signature == ref_sig, "MISR signature");
    end
  end

  task automatic program_codes(input code_t sw, input code_t hc, input code_t tc);
    cfg_switching = sw; cfg_hold = hc; cfg_toggle = tc; cfg_we = 1'b1;
    @(posedge clk); #2 cfg_we = 1'b0;
  endtask

  task automatic session(input logic [N-1:0] s, input bit tc_on, input bit rewrite,
                         output logic [M-1:0] sig, output int tr);
    int cyc;
    seed = s; tc_enable = tc_on;
    start = 1'b1;
    @(posedge clk);
    // start accepted at this edge: clear signature and sequence state
    ref_sig = '0; ref_dff = '0; captures_in_session = 0; transitions = 0;
    #2 start = 1'b0;
    cyc = 1;
    while (!done && cyc < 5000) begin
      if (rewrite && cyc == 1000) begin
        cfg_switching = 4'b0100; cfg_hold = 4'b0100; cfg_toggle = 4'b0010; cfg_we = 1'b1;
      end else begin
        cfg_we = 1'b0;
      end
      @(posedge clk); #2 cyc++;
    end
    cfg_we = 1'b0;
    check(cyc == 1 + int'(P) * (int'(K) + 2) + int'(K), $sformatf("session length %0d", cyc));
    check(captures_in_session == int'(P), "captures per session");
    check(!busy, "not busy when done");
    sig = signature;
    tr = transitions;
  endtask

  logic [M-1:0] sig1, sig2, sig3, sig4;
  int           tr1, tr2, tr3, tr4;

  initial begin
    start = 1'b0; cfg_we = 1'b0; tc_enable = 1'b0; seed = '0;
    cfg_switching = '0; cfg_hold = '0; cfg_toggle = '0;
    ref_dff = '0; ref_sig = '0; captures_in_session = 0;
    n_bypass = 0; n_toggle = 0; n_hold = 0; n_repeat = 0; n_capture = 0; n_load = 0;
    n_unload = 0; n_cfg_update = 0; transitions = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    check(!busy && !done && signature == '0, "idle after reset");

    program_codes(4'b0000, 4'b0000, 4'b0000);
    session(32'hC0FF_EE01, 1'b0, 1'b0, sig1, tr1);
    session(32'hC0FF_EE01, 1'b0, 1'b0, sig2, tr2);
    check(sig1 == sig2, "same seed and codes give the same signature");

    program_codes(4'b1000, 4'b0000, 4'b0000);
    session(32'hC0FF_EE01, 1'b0, 1'b0, sig3, tr3);

    program_codes(4'b0010, 4'b0001, 4'b0010);
    session(32'h0BAD_F00D, 1'b1, 1'b1, sig4, tr4);

    $display("transitions into the chains: off %0d (repeat run %0d), density 1/16 %0d, hold/toggle + transition control %0d",
             tr1, tr2, tr3, tr4);
    $display("signatures: %h %h %h %h", sig1, sig2, sig3, sig4);
    $display("mechanisms: bypass %0d toggle %0d hold %0d repeat %0d capture %0d load %0d unload %0d cfg_update %0d",
             n_bypass, n_toggle, n_hold, n_repeat, n_capture, n_load, n_unload, n_cfg_update);
    check(tr3 * 2 < tr1, "density 1/16 lowers transitions");
    check(tr4 < tr1, "low-power session below full toggling");
    check(n_bypass > 0, "bypass mode occurred");
    check(n_toggle > 0, "toggle interval occurred");
    check(n_hold > 0, "hold interval occurred");
    check(n_repeat > 0, "transition controller repeat occurred");
    check(n_capture == 4 * int'(P), "captures");
    check(n_load == 4 * int'(P), "pattern loads");
    check(n_unload == 4 * int'(K), "unload shifts");
    check(n_cfg_update > 0, "shadow register update in mid-session occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
