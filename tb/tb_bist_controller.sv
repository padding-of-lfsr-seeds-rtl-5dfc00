// tb_bist_controller -- self-checking test of the session sequencer.
//
// With TEST_LEN = 20 and SEED_GAP = 8, checks clock by clock after start:
// one load pulse, 32 BS-LFSR steps, capture pulses after 8, 16, 24 and 32
// steps, one CLCG start together with the session clear, exactly TEST_LEN
// test clocks with `count` equal to the number of patterns already applied,
// then done with count = TEST_LEN held. Runs two sessions back to back.
module tb_bist_controller;
  import bist_pkg::*;

  localparam int unsigned TL = 20, GAP = 8;
  localparam int unsigned CNTW = $clog2(TL + 4*GAP + 2);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  bist_state_e state;
  logic lfsr_load, lfsr_en, clcg_start, test_en, sess_clr, busy, done;
  logic [3:0] cap;
  logic [CNTW-1:0] count;
  int checks = 0, failures = 0;

  bist_controller #(.TEST_LEN(TL), .SEED_GAP(GAP)) dut (
    .clk, .rst_n, .start, .state, .lfsr_load, .lfsr_en, .cap,
    .clcg_start, .test_en, .sess_clr, .count, .busy, .done
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int loads, steps, starts, tests, cyc;
    int cap_at [4];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(state == ST_IDLE && !busy && !done, "idle after reset");
    for (int s = 0; s < 2; s++) begin
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      loads = 0; steps = 0; starts = 0; tests = 0; cyc = 0;
      for (int k = 0; k < 4; k++) cap_at[k] = -1;
      while (!done && cyc < 200) begin
        check(busy, "busy during session");
        if (lfsr_load) begin
          loads++;
          check(steps == 0, "load before stepping");
        end
        for (int k = 0; k < 4; k++)
          if (cap[k]) begin
            check(cap_at[k] == -1, "one capture pulse each");
            cap_at[k] = steps;
          end
        if (lfsr_en) steps++;
        if (clcg_start) begin
          starts++;
          check(sess_clr, "clear with CLCG start");
          check(steps == 4*GAP, "start after all seed steps");
        end
        if (test_en) begin
          check(int'(count) == tests, $sformatf("count %0d vs %0d", count, tests));
          check(starts == 1, "test after start");
          tests++;
        end
        @(negedge clk);
        cyc++;
      end
      check(loads == 1 && starts == 1, "one load, one start");
      for (int k = 0; k < 4; k++)
        check(cap_at[k] == (k + 1) * GAP,
              $sformatf("capture %0d after %0d steps", k, cap_at[k]));
      check(tests == TL, $sformatf("test clocks %0d vs %0d", tests, TL));
      check(cyc == 1 + 4*GAP + 1 + 1 + TL, $sformatf("session length %0d", cyc));
      check(done && !busy && int'(count) == TL, "done holds count");
      repeat (3) @(negedge clk);
      check(done && int'(count) == TL, "results held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
