// bist_controller -- pattern counter and scan sequencer of the BIST engine.
//
// A start request loads the PRPG seed and clears the signature.  Each of the
// NUM_PATTERNS patterns then takes CHAIN_LEN + 2 clocks: one LOAD clock
// (`pattern_start`: the toggle control register and the low-power registers
// take their new values), CHAIN_LEN SHIFT clocks (`scan_en`: a new stimulus
// enters the chains while the previous responses leave into the MISR) and one
// CAPTURE clock.  A final UNLOAD of CHAIN_LEN shift clocks moves the last
// responses into the MISR, after which `done` stays high until the next start.
// The pattern counter follows the design ("pattern count"); the sequence and
// its timing are this implementation's choices.
//
// Interface / timing: `start` is sampled in IDLE or DONE.  `seed_load` and
// `misr_clear` pulse for the start clock.  `misr_en` is high during SHIFT of
// patterns 1..NUM_PATTERNS-1 (pattern 0 shifts out the reset contents) and
// during UNLOAD.  `done` rises 1 + NUM_PATTERNS*(CHAIN_LEN+2) + CHAIN_LEN
// clocks after the start clock.  Synchronous active-low reset to IDLE.
module bist_controller #(
  parameter int unsigned CHAIN_LEN    = 32,
  parameter int unsigned NUM_PATTERNS = 64
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  output logic                             seed_load,
  output logic                             misr_clear,
  output logic                             pattern_start,
  output logic                             scan_en,
  output logic                             capture,
  output logic                             misr_en,
  output logic                             busy,
  output logic                             done,
  output logic [$clog2(NUM_PATTERNS+1)-1:0] pattern_idx
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_LOAD,
    S_SHIFT,
    S_CAPTURE,
    S_UNLOAD,
    S_DONE
  } state_t;

  localparam int unsigned SW = $clog2(CHAIN_LEN + 1);
  localparam int unsigned PW = $clog2(NUM_PATTERNS + 1);

  state_t        state;
  logic [SW-1:0] shift_cnt;
  logic [PW-1:0] pat_cnt;
  logic          accept;

  initial begin
    assert (CHAIN_LEN >= 2 && NUM_PATTERNS >= 1)
      else $fatal(1, "bist_controller: CHAIN_LEN >= 2 and NUM_PATTERNS >= 1 required");
  end

  assign accept        = start && (state == S_IDLE || state == S_DONE);
  assign seed_load     = accept;
  assign misr_clear    = accept;
  assign pattern_start = (state == S_LOAD);
  assign scan_en       = (state == S_SHIFT) || (state == S_UNLOAD);
  assign capture       = (state == S_CAPTURE);
  assign misr_en       = ((state == S_SHIFT) && (pat_cnt != '0)) || (state == S_UNLOAD);
  assign busy          = (state != S_IDLE) && (state != S_DONE);
  assign done          = (state == S_DONE);
  assign pattern_idx   = pat_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      shift_cnt <= '0;
      pat_cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (accept) begin
            state   <= S_LOAD;
            pat_cnt <= '0;
          end
        end
        S_LOAD: begin
          state     <= S_SHIFT;
          shift_cnt <= '0;
        end
        S_SHIFT: begin
          if (shift_cnt == SW'(CHAIN_LEN - 1)) begin
            state <= S_CAPTURE;
          end else begin
            shift_cnt <= shift_cnt + 1'b1;
          end
        end
        S_CAPTURE: begin
          shift_cnt <= '0;
          if (pat_cnt == PW'(NUM_PATTERNS - 1)) begin
            state <= S_UNLOAD;
          end else begin
            state   <= S_LOAD;
            pat_cnt <= pat_cnt + 1'b1;
          end
        end
        S_UNLOAD: begin
          if (shift_cnt == SW'(CHAIN_LEN - 1)) begin
            state <= S_DONE;
          end else begin
            shift_cnt <= shift_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
