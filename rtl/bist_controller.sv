// bist_controller -- sequencer of one test session.
//
// A session runs through the states of bist_state_e:
//   IDLE  -> (start)           LOAD
//   LOAD  : load the padded seed into the BS-LFSR            (1 clock)
//   SEED  : step the BS-LFSR; after SEED_GAP, 2*SEED_GAP, 3*SEED_GAP and
//           4*SEED_GAP steps pulse cap[0..3] so the parallel BS-LFSR word
//           is captured as x0, y0, p0, q0               (4*SEED_GAP+1 clocks)
//   START : start the four LCGs, clear the circuits under test, the input
//           register and the detection counter              (1 clock)
//   TEST  : step the LCGs and clock the circuits; `count` counts the
//           applied patterns up to TEST_LEN                 (TEST_LEN clocks)
//   DONE  : hold the results; start begins a new session.
// SEED_GAP = B0 makes the four captured words come from fresh shifts of the
// seed rather than overlapping ones.
//
// Outputs are decoded from the state register and the cycle counter, so
// every strobe is valid in the clock in which it is asserted.
//
// The document names a session reset, two further resets and a pattern
// counter; the state sequence, the capture spacing and the counter widths
// are this design's own.
module bist_controller
  import bist_pkg::*;
#(
  parameter int unsigned TEST_LEN = bist_pkg::DEF_TEST_LEN,
  parameter int unsigned SEED_GAP = bist_pkg::DEF_B0,
  localparam int unsigned CNTW    = $clog2(TEST_LEN + 4*SEED_GAP + 2)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output bist_state_e     state,
  output logic            lfsr_load,
  output logic            lfsr_en,
  output logic [3:0]      cap,        // capture x0, y0, p0, q0
  output logic            clcg_start,
  output logic            test_en,    // LCG step, CUT clock, compare
  output logic            sess_clr,   // clear CUTs, input register, counter
  output logic [CNTW-1:0] count,      // patterns applied
  output logic            busy,
  output logic            done
);

  bist_state_e state_q, state_d;
  logic [CNTW-1:0] cnt_q, cnt_d;

  always_comb begin
    state_d = state_q;
    cnt_d   = cnt_q;
    unique case (state_q)
      ST_IDLE, ST_DONE: if (start) begin
        state_d = ST_LOAD;
        cnt_d   = '0;
      end
      ST_LOAD: begin
        state_d = ST_SEED;
        cnt_d   = '0;
      end
      ST_SEED: begin
        if (cnt_q == CNTW'(4*SEED_GAP)) begin
          state_d = ST_START;
          cnt_d   = '0;
        end else begin
          cnt_d = cnt_q + 1'b1;
        end
      end
      ST_START: begin
        state_d = ST_TEST;
        cnt_d   = '0;
      end
      ST_TEST: begin
        cnt_d = cnt_q + 1'b1;
        if (cnt_q == CNTW'(TEST_LEN - 1)) state_d = ST_DONE;
      end
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      cnt_q   <= '0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
    end
  end

  always_comb begin
    state      = state_q;
    lfsr_load  = (state_q == ST_LOAD);
    lfsr_en    = (state_q == ST_SEED) && (cnt_q != CNTW'(4*SEED_GAP));
    for (int unsigned k = 0; k < 4; k++)
      cap[k] = (state_q == ST_SEED) && (cnt_q == CNTW'((k + 1) * SEED_GAP));
    clcg_start = (state_q == ST_START);
    sess_clr   = (state_q == ST_START);
    test_en    = (state_q == ST_TEST);
    count      = (state_q == ST_TEST || state_q == ST_DONE) ? cnt_q : '0;
    busy       = (state_q != ST_IDLE) && (state_q != ST_DONE);
    done       = (state_q == ST_DONE);
  end

endmodule
