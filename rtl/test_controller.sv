// test_controller: sequences one BIST run and keeps its verdict.
//
// The mode signal `check` chooses between normal mode (1) and test mode (0),
// as in the design description. In normal mode the controller sits in IDLE
// and holds the pattern generator at its seed. When check falls to 0 it
// enters RUN and advances the generator once per clock for RUN_LEN clocks,
// one full LFSR period, so every non-zero address is read exactly once.
// Because the memories answer one clock after their address, the compare
// slot (`cmp_en`) is the RUN flag delayed by one clock; mismatches reported
// by the response analyzer in those slots are counted. After the last
// compare the controller rests in DONE with `done` = 1 and `pass` = 1 if no
// pattern failed, until check returns to 1. Raising check during RUN
// abandons the run.
//
// Timing: from the first RUN clock to `done` is RUN_LEN + 1 clocks
// (256 for the default 8-bit generator). Counters and the verdict are
// cleared on entry to RUN.
//
// Only the mode rule comes from the design description; the run length,
// the state machine and the counters are this design's choices.
module test_controller
  import bist_pkg::*;
#(
  parameter int unsigned RUN_LEN = bist_pkg::DEPTH - 1,  // one LFSR period
  parameter int unsigned CNT_W  = $clog2(RUN_LEN + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             check,        // 0: test mode, 1: normal mode
  input  logic             mismatch,     // from the response analyzer
  output logic             lfsr_load,    // hold the generator at its seed
  output logic             lfsr_en,      // advance the generator
  output logic             cmp_en,       // this clock is a compare slot
  output ctrl_state_t      state,
  output logic             done,         // run complete, verdict valid
  output logic             pass,         // done and no mismatch seen
  output logic [CNT_W-1:0] compared,     // compare slots so far in this run
  output logic [CNT_W-1:0] failures      // mismatches so far in this run
);

  logic [CNT_W-1:0] issued;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      issued   <= '0;
      cmp_en   <= 1'b0;
      compared <= '0;
      failures <= '0;
    end else begin
      cmp_en <= (state == ST_RUN) && !check;
      if (cmp_en) begin
        compared <= compared + 1'b1;
        if (mismatch) failures <= failures + 1'b1;
      end
      unique case (state)
        ST_IDLE: if (!check) begin
          state    <= ST_RUN;
          issued   <= '0;
          compared <= '0;
          failures <= '0;
        end
        ST_RUN: begin
          if (check) begin
            state <= ST_IDLE;
          end else begin
            issued <= issued + 1'b1;
            if (issued == CNT_W'(RUN_LEN - 1)) state <= ST_DONE;
          end
        end
        ST_DONE: if (check) state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign lfsr_load = (state == ST_IDLE);
  assign lfsr_en   = (state == ST_RUN) && !check;
  assign done      = (state == ST_DONE) && !cmp_en;
  assign pass      = done && (failures == '0);

endmodule
