// presto_generator -- low-power pseudorandom test pattern generator with
// preselected toggling (PRESTO).
//
// An n-bit PRPG feeds n hold latches, whose outputs feed a phase shifter that
// drives the scan chains (each output the XOR of three latches).  A latch in
// toggle mode passes new PRPG data; a latch in hold mode keeps its value, so
// scan chains fed only by held latches receive constants and do not switch.
// Two mechanisms choose the latches in toggle mode:
//  * Toggle control register: during shifting, the switching weighted logic
//    (4-bit switching code: probability 1/2, 1/4, 1/8 or 1/16 of a 1) fills a
//    shift register that is copied into the toggle control register at each
//    pattern start.  Its fraction of 1s sets the switching activity.
//  * Hold/toggle T flip-flop: splits the shift period into hold intervals (all
//    latches disabled) and toggle intervals (latches enabled by the toggle
//    control register); the hold and toggle codes set their lengths.
// A switching code of 0000 turns low-power operation off: every latch toggles.
// The switching, hold and toggle codes sit behind shadow registers that take
// new values only at pattern start.  All of this follows the design; the
// widths, the PRPG stages feeding the weighted logic, and the latches being
// clocked enable flip-flops are this implementation's choices.
//
// Interface / timing: `seed_load` (session start) seeds the PRPG and puts
// every other state of the generator in its initial value (latches 0, shift
// and toggle control registers all 1, toggle interval), so a session depends
// only on the seed and the codes.  `shift_en` advances PRPG,
// shift register, T flip-flop and latches by one clock.  `pattern_start`
// loads the toggle control register, the working low-power codes and restarts
// a toggle interval.  `ps_out` comes combinationally from the latches.
// Synchronous active-low reset.
module presto_generator
  import lp_bist_pkg::*;
#(
  parameter int unsigned PRPG_WIDTH  = 32,
  parameter int unsigned NUM_OUTPUTS = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   seed_load,
  input  logic [PRPG_WIDTH-1:0]  seed,
  input  logic                   shift_en,
  input  logic                   pattern_start,
  input  logic                   cfg_we,
  input  lp_cfg_t                cfg_in,
  output logic [NUM_OUTPUTS-1:0] ps_out,
  output logic [PRPG_WIDTH-1:0]  latch_en,
  output logic                   toggle_state,
  output logic                   lp_bypass
);

  initial begin
    assert (PRPG_WIDTH >= 8) else $fatal(1, "presto_generator: PRPG_WIDTH must be at least 8");
  end

  lp_cfg_t               cfg;
  logic [PRPG_WIDTH-1:0] prpg;
  logic [PRPG_WIDTH-1:0] tcr;
  logic [PRPG_WIDTH-1:0] latched;
  logic [CODE_W-1:0]     rnd_sw;
  logic [CODE_W-1:0]     rnd_ht;
  logic                  sw_bit;

  lp_config_regs u_cfg (
    .clk    (clk),
    .rst_n  (rst_n),
    .we     (cfg_we),
    .cfg_in (cfg_in),
    .update (pattern_start),
    .active (cfg)
  );

  lfsr_prpg #(.WIDTH(PRPG_WIDTH)) u_prpg (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (seed_load),
    .seed  (seed),
    .en    (shift_en),
    .state (prpg)
  );

  // PRPG stages feeding the two weighted-logic blocks.
  for (genvar k = 0; k < CODE_W; k++) begin : g_rnd
    assign rnd_sw[k] = prpg[weight_tap(k, 0, PRPG_WIDTH)];
    assign rnd_ht[k] = prpg[weight_tap(k, PRPG_WIDTH / 8, PRPG_WIDTH)];
  end

  weighted_logic u_sw_weight (
    .code (cfg.switching),
    .rnd  (rnd_sw),
    .out  (sw_bit)
  );

  toggle_control_register #(.WIDTH(PRPG_WIDTH)) u_tcr (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     (seed_load),
    .shift_en (shift_en),
    .din      (sw_bit),
    .load     (pattern_start),
    .tcr      (tcr)
  );

  hold_toggle_control u_ht (
    .clk         (clk),
    .rst_n       (rst_n),
    .shift_en    (shift_en),
    .restart     (pattern_start | seed_load),
    .hold_code   (cfg.hold),
    .toggle_code (cfg.toggle),
    .rnd         (rnd_ht),
    .state       (toggle_state)
  );

  // Switching code 0000: low-power operation off, every latch transparent.
  assign lp_bypass = (cfg.switching == '0);
  assign latch_en  = lp_bypass ? '1 : (toggle_state ? tcr : '0);

  hold_latches #(.WIDTH(PRPG_WIDTH)) u_latch (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (seed_load),
    .shift_en (shift_en),
    .en       (latch_en),
    .d        (prpg),
    .q        (latched)
  );

  phase_shifter #(.IN_WIDTH(PRPG_WIDTH), .OUT_WIDTH(NUM_OUTPUTS)) u_ps (
    .in  (latched),
    .out (ps_out)
  );

endmodule
