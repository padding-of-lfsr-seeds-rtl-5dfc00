// tb_padded_clcg_bist_top -- end-to-end test of the padded-seed BS-LFSR /
// modified dual-CLCG pattern generator with the s27 fault-detection
// harness, at the default sizes (8-bit seed, up to 4 padding bits, 8-bit
// LCGs, 1250 patterns per session).
//
// Every session is predicted by a model kept in this testbench: the padded
// seed is loaded into a list model of the BS-LFSR, the four LCG seeds are
// taken after 8, 16, 24 and 32 steps, the LCGs are iterated with
// multiplications, the generated bits fill a 4-bit window that drives a
// net-array model of s27 (good and faulty), and mismatching flip-flop
// states are counted. The testbench compares, clock by clock, the
// generated bit, the LCG terms, the pattern on the circuit inputs and both
// responses, and at the end the pattern count, the detection count and the
// session length.
//
// Sessions: the seed 00110011 with the paddings "", "0" and "10" and a
// random seed with a 4-bit padding, each against several stuck-at faults,
// and the padding "10" placed in front of the seed.
// Mechanisms counted (each must occur): each padding length used, padding in front, bit swaps
// (select cn = 0 while the BS-LFSR runs), CLCG starts, B = 1, C = 1,
// Z = 1 and Z = 0, detected mismatches, completed sessions.
module tb_padded_clcg_bist_top;
  import bist_pkg::*;

  localparam int unsigned B0 = DEF_B0, PM = DEF_PAD_MAX, N = DEF_CLCG_N;
  localparam int unsigned TL = DEF_TEST_LEN, GAP = DEF_B0;
  localparam int unsigned CNTW = $clog2(TL + 4*GAP + 2);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [B0-1:0] seed = '0;
  logic [PM-1:0] pad = '0;
  logic [2:0] pad_len = '0;
  logic pad_first = 1'b0;
  stuck_fault_t fault = '0;
  logic busy, done, test_data, scan_o1, scan_o2, swap_sel, bi, ci;
  logic fault_flag, op, op1;
  bist_state_e state;
  logic [CNTW-1:0] count;
  logic [N-1:0] x, y, p, q;
  logic [3:0] cut_in;
  logic [2:0] op_ff, op_ff1;
  logic [15:0] total_faults;
  logic [B0+PM-1:0] lfsr_cells;

  int checks = 0, failures = 0;
  int n_pad_len [PM+1];
  int n_swap = 0, n_start = 0, n_b1 = 0, n_c1 = 0, n_z1 = 0, n_z0 = 0;
  int n_detect = 0, n_sessions = 0, n_front = 0;

  padded_clcg_bist_top dut (
    .clk, .rst_n, .start, .seed, .pad, .pad_len, .pad_first, .fault,
    .busy, .done, .count, .test_data, .scan_o1, .scan_o2, .swap_sel,
    .state, .x, .y, .p, .q, .bi, .ci, .cut_in, .op_ff, .op_ff1, .op, .op1,
    .fault_flag, .total_faults, .lfsr_cells
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---- BS-LFSR model ------------------------------------------------------
  logic m [B0+PM];
  int   mlen;

  function automatic logic [N-1:0] m_word();
    logic [N-1:0] w = '0;
    logic s = m[mlen-1];
    w[N-1] = s ? m[0] : m[1];
    w[N-2] = s ? m[1] : m[0];
    for (int k = 2; k < N; k++) w[N-1-k] = m[k];
    return w;
  endfunction

  task automatic m_step();
    logic fb = m[0] ^ m[mlen-1];
    for (int k = mlen - 1; k > 0; k--) m[k] = m[k-1];
    m[0] = fb;
  endtask

  // ---- s27 model ----------------------------------------------------------
  function automatic logic fx(int idx, logic v, stuck_fault_t f);
    return (f.en && int'(f.site) == idx) ? f.value : v;
  endfunction

  // Returns {next G5, G6, G7, current G5, G6, G7} for inputs and state.
  function automatic logic [5:0] s27(input logic [3:0] in, input logic [2:0] st,
                                     input stuck_fault_t f);
    logic g0, g1, g2, g3, g5, g6, g7, g8, g9, g10, g11, g12, g13, g14, g15, g16;
    g0 = fx(0, in[0], f); g1 = fx(1, in[1], f);
    g2 = fx(2, in[2], f); g3 = fx(3, in[3], f);
    g5 = fx(4, st[2], f); g6 = fx(5, st[1], f); g7 = fx(6, st[0], f);
    g14 = fx(13, !g0, f);
    g8  = fx(7, g14 && g6, f);
    g12 = fx(11, !(g1 || g7), f);
    g15 = fx(14, g12 || g8, f);
    g16 = fx(15, g3 || g8, f);
    g9  = fx(8, !(g16 && g15), f);
    g11 = fx(10, !(g5 || g9), f);
    g10 = fx(9, !(g14 || g11), f);
    g13 = fx(12, !(g2 || g12), f);
    return {g10, g11, g13, g5, g6, g7};
  endfunction

  // ---- one session ----------------------------------------------------------
  task automatic run_session(input logic [B0-1:0] s, input logic [PM-1:0] pd,
                             input int b, input stuck_fault_t f,
                             input logic front = 1'b0);
    logic [N-1:0] w [4];
    logic [N-1:0] ex, ey, ep, eq;
    logic [3:0] win;
    logic [2:0] sg, sf;
    logic [5:0] rg, rf;
    logic ez;
    int cnt, cyc;

    // Model: load and step the BS-LFSR, capture four words.
    for (int k = 0; k < B0 + PM; k++) m[k] = 1'b0;
    for (int k = 0; k < B0; k++) m[front ? k + b : k] = s[B0-1-k];
    for (int j = 0; j < b; j++) m[front ? j : B0 + j] = pd[b-1-j];
    mlen = B0 + b;
    for (int t = 1; t <= 4*GAP; t++) begin
      m_step();
      if (t % GAP == 0) w[t/GAP - 1] = m_word();
    end
    ex = N'(5 * w[0] + N'(LCG_B1));
    ey = N'(9 * w[1] + N'(LCG_B2));
    ep = N'(17 * w[2] + N'(LCG_B3));
    eq = N'(33 * w[3] + N'(LCG_B4));

    @(negedge clk);
    seed = s; pad = pd; pad_len = 3'(b); pad_first = front; fault = f; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    n_pad_len[b]++;
    if (front) n_front++;
    // LOAD state now; the padded seed is in the cells on the next clock.
    @(negedge clk);
    cyc++;
    begin
      logic [B0+PM-1:0] e_cells = '0;
      for (int k = 0; k < B0; k++) e_cells[front ? k + b : k] = s[B0-1-k];
      for (int j = 0; j < b; j++) e_cells[front ? j : B0 + j] = pd[b-1-j];
      check(state == ST_SEED && lfsr_cells == e_cells, "padded seed loaded");
    end
    while (state != ST_TEST && cyc < 100) begin
      if (state == ST_SEED && swap_sel == 1'b0) n_swap++;
      if (state == ST_START) n_start++;
      @(negedge clk);
      cyc++;
    end
    check(cyc == 1 + (4*GAP + 1) + 1 + 1, $sformatf("set-up length %0d", cyc));

    win = '0; sg = '0; sf = '0; cnt = 0;
    for (int t = 0; t < TL; t++) begin
      ez = (ex > ey) ^ (ep > eq);
      rg = s27(win, sg, '0);
      rf = s27(win, sf, f);
      check(test_data == ez, $sformatf("z at pattern %0d", t));
      check(x == ex && y == ey && p == ep && q == eq,
            $sformatf("LCG terms at pattern %0d", t));
      check(cut_in == win, $sformatf("circuit inputs at pattern %0d", t));
      check(op_ff == rg[2:0] && op_ff1 == rf[2:0],
            $sformatf("responses at pattern %0d", t));
      check(int'(count) == t, $sformatf("count at pattern %0d", t));
      if (rg[2:0] != rf[2:0]) begin cnt++; n_detect++; end
      n_b1 += int'(bi); n_c1 += int'(ci);
      if (test_data) n_z1++; else n_z0++;
      // Advance the model.
      win = {win[2:0], ez};
      sg = rg[5:3]; sf = rf[5:3];
      ex = N'(5 * ex + N'(LCG_B1)); ey = N'(9 * ey + N'(LCG_B2));
      ep = N'(17 * ep + N'(LCG_B3)); eq = N'(33 * eq + N'(LCG_B4));
      @(negedge clk);
    end
    check(done && !busy, "done after TEST_LEN patterns");
    check(int'(count) == TL, $sformatf("final count %0d", count));
    check(int'(total_faults) == cnt,
          $sformatf("detections %0d, expected %0d", total_faults, cnt));
    $display("session seed=%b pad_len=%0d pad_first=%0d fault(en=%0d site=%s sa%0d): detections %0d",
             s, b, front, f.en, f.site.name(), f.value, total_faults);
    n_sessions++;
  endtask

  initial begin
    stuck_fault_t f;
    for (int k = 0; k <= PM; k++) n_pad_len[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // Fault-free pair: no detections.
    run_session(8'b00110011, 4'b0000, 0, '0);
    check(total_faults == 0, "no detections without a fault");

    f = '{en: 1'b1, site: NET_G11, value: 1'b1};
    run_session(8'b00110011, 4'b0000, 0, f);
    run_session(8'b00110011, 4'b0000, 1, f);
    run_session(8'b00110011, 4'b0010, 2, f);
    f = '{en: 1'b1, site: NET_G8, value: 1'b0};
    run_session(8'b00110011, 4'b0010, 2, f);
    f = '{en: 1'b1, site: NET_G13, value: 1'b0};
    run_session(8'($urandom) | 8'h80, 4'($urandom), 4, f);
    f = '{en: 1'b1, site: NET_G3, value: 1'b1};
    run_session(8'($urandom) | 8'h01, 4'($urandom), 3, f);
    f = '{en: 1'b1, site: NET_G11, value: 1'b1};
    run_session(8'b00110011, 4'b0010, 2, f, 1'b1);

    for (int k = 0; k <= 4; k++)
      check(k == 3 || k == 4 || n_pad_len[k] > 0, $sformatf("padding length %0d used", k));
    check(n_pad_len[3] > 0 && n_pad_len[4] > 0, "longest paddings used");
    check(n_swap > 0, "bit swap occurred");
    check(n_front > 0, "padding placed before the seed");
    check(n_start == n_sessions, "one CLCG start per session");
    check(n_b1 > 0 && n_c1 > 0, "comparators fired");
    check(n_z1 > 0 && n_z0 > 0, "generated bit takes both values");
    check(n_detect > 0, "fault detected");
    $display("mechanisms: swaps=%0d starts=%0d B1=%0d C1=%0d Z1=%0d Z0=%0d detections=%0d sessions=%0d",
             n_swap, n_start, n_b1, n_c1, n_z1, n_z0, n_detect, n_sessions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
