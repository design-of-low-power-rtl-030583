// lp_bist_top -- low-power logic BIST engine.
//
// A PRESTO generator (PRPG, hold latches under a toggle control register and a
// hold/toggle T flip-flop, phase shifter) produces pseudorandom stimuli whose
// scan switching activity is preselected by three 4-bit codes.  Each phase
// shifter output enters one of NUM_CHAINS scan chains through a transition
// controller, which repeats the previous stimulus bit whenever the two
// response bits leaving the chain differ, lowering shift transitions further.
// Responses are compacted in a MISR; a controller counts patterns and
// sequences load / shift / capture.  The circuit under test is outside: its
// scan cells are `scan_cells`, and `cut_response` is what they capture.
// A session start re-seeds the PRPG and initialises the rest of the generator
// and the transition controllers, so a session depends only on the seed and
// the codes.  The transition controllers are active only while the chains
// shift out responses of the current run (not during pattern 0).
// The generator and the adaptive chain input follow the design; joining them
// (the PRESTO phase shifter feeding the adaptive chains) and the sizes are
// this implementation's choices.
//
// Interface / timing: program the codes with `cfg_we` (shadow registers, used
// from the next pattern on), set `seed`, pulse `start`.  `scan_en` and
// `capture` tell the circuit under test when to shift and capture.  `done`
// rises 1 + NUM_PATTERNS*(CHAIN_LEN+2) + CHAIN_LEN clocks after the start
// clock, with the final `signature`.  The observation outputs show the
// pattern number, the hold latch enables, the T flip-flop (1 = toggle
// interval), whether low-power operation is off (switching code 0000) and
// which transition controllers repeat their previous bit this clock.  Synchronous active-low reset.
module lp_bist_top
  import lp_bist_pkg::*;
#(
  parameter int unsigned PRPG_WIDTH   = 32,
  parameter int unsigned NUM_CHAINS   = 16,
  parameter int unsigned CHAIN_LEN    = 32,
  parameter int unsigned NUM_PATTERNS = 64
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 start,
  input  logic [PRPG_WIDTH-1:0]                seed,
  input  logic                                 cfg_we,
  input  code_t                                cfg_switching,
  input  code_t                                cfg_hold,
  input  code_t                                cfg_toggle,
  input  logic                                 tc_enable,
  input  logic [NUM_CHAINS-1:0][CHAIN_LEN-1:0] cut_response,
  output logic [NUM_CHAINS-1:0][CHAIN_LEN-1:0] scan_cells,
  output logic                                 scan_en,
  output logic                                 capture,
  output logic [NUM_CHAINS-1:0]                signature,
  output logic                                 busy,
  output logic                                 done,
  // observation of the low-power mechanisms
  output logic [$clog2(NUM_PATTERNS+1)-1:0]    pattern_idx,
  output logic [PRPG_WIDTH-1:0]                latch_en,
  output logic                                 toggle_state,
  output logic                                 lp_bypass,
  output logic [NUM_CHAINS-1:0]                tc_repeat
);

  logic                  seed_load;
  logic                  misr_clear;
  logic                  pattern_start;
  logic                  misr_en;
  logic [NUM_CHAINS-1:0] ps_out;
  logic [NUM_CHAINS-1:0] chain_in;
  logic [NUM_CHAINS-1:0] chain_out;
  lp_cfg_t               cfg_in;
  logic                  tc_active;

  assign cfg_in = '{switching: cfg_switching, hold: cfg_hold, toggle: cfg_toggle};

  // The chain tails hold responses of the current run only while they are being
  // compacted (patterns 1.. and the final unload): feedback only then.
  assign tc_active = tc_enable & misr_en;

  bist_controller #(.CHAIN_LEN(CHAIN_LEN), .NUM_PATTERNS(NUM_PATTERNS)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (start),
    .seed_load     (seed_load),
    .misr_clear    (misr_clear),
    .pattern_start (pattern_start),
    .scan_en       (scan_en),
    .capture       (capture),
    .misr_en       (misr_en),
    .busy          (busy),
    .done          (done),
    .pattern_idx   (pattern_idx)
  );

  presto_generator #(.PRPG_WIDTH(PRPG_WIDTH), .NUM_OUTPUTS(NUM_CHAINS)) u_gen (
    .clk           (clk),
    .rst_n         (rst_n),
    .seed_load     (seed_load),
    .seed          (seed),
    .shift_en      (scan_en),
    .pattern_start (pattern_start),
    .cfg_we        (cfg_we),
    .cfg_in        (cfg_in),
    .ps_out        (ps_out),
    .latch_en      (latch_en),
    .toggle_state  (toggle_state),
    .lp_bypass     (lp_bypass)
  );

  for (genvar c = 0; c < NUM_CHAINS; c++) begin : g_chain
    transition_controller u_tc (
      .clk        (clk),
      .rst_n      (rst_n),
      .clear      (seed_load),
      .shift_en   (scan_en),
      .tc_enable  (tc_active),
      .ps_bit     (ps_out[c]),
      .tail_km1   (scan_cells[c][CHAIN_LEN-2]),
      .tail_k     (scan_cells[c][CHAIN_LEN-1]),
      .scan_in    (chain_in[c]),
      .repeat_bit (tc_repeat[c])
    );

    scan_chain #(.LEN(CHAIN_LEN)) u_chain (
      .clk          (clk),
      .rst_n        (rst_n),
      .shift_en     (scan_en),
      .capture_en   (capture),
      .scan_in      (chain_in[c]),
      .capture_data (cut_response[c]),
      .cells        (scan_cells[c]),
      .scan_out     (chain_out[c])
    );
  end

  misr #(.WIDTH(NUM_CHAINS)) u_misr (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (misr_clear),
    .en    (misr_en),
    .d     (chain_out),
    .sig   (signature)
  );

endmodule
