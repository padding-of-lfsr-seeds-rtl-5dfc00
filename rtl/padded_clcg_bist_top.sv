// padded_clcg_bist_top -- low-transition test pattern generator built from a
// padded LFSR seed, a bit-swapping LFSR and a modified dual-CLCG, with an
// on-chip fault-detection harness around the s27 benchmark circuit.
//
// Data flow of one session (started by `start`):
//   1. The stored B0-bit seed and its padding (pad_len bits of `pad`,
//      after the seed, or before it when pad_first is set) are loaded into
//      the programmable-length bit-swapping LFSR, which then runs as a
//      (B0 + pad_len)-cell LFSR.
//   2. After SEED_GAP, 2, 3 and 4 x SEED_GAP steps the BS-LFSR's parallel
//      word is captured as the four LCG seeds x0, y0, p0, q0.
//   3. The modified dual-CLCG is started from those seeds and produces one
//      pseudorandom bit z per clock.
//   4. z is shifted into a 4-bit input register whose contents drive the
//      inputs G3..G0 of two copies of s27, one fault-free and one carrying
//      the stuck-at fault selected by `fault`. Both copies are clocked every
//      test cycle (a sliding window over the bit stream).
//   5. The fault monitor compares their flip-flop states every test cycle
//      and counts the mismatches in total_faults, for TEST_LEN cycles.
//
// Timing: 1 + (4*SEED_GAP + 1) + 1 clocks of set-up, then TEST_LEN test
// clocks; `done` rises on the clock after the last pattern and the results
// hold until the next start.
//
// What follows the document: the seed padding, the bit-swapping LFSR as the
// source of the CLCG seeds, the modified dual-CLCG as the pattern source,
// the good/faulty s27 pair and the mismatch counter. This design's own
// choices: how and when the four seeds are taken from the BS-LFSR, the
// 4-bit sliding input window, clocking the circuits every cycle, comparing
// only the flip-flop states, and the session sequencing.
module padded_clcg_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned B0       = bist_pkg::DEF_B0,
  parameter int unsigned PAD_MAX  = bist_pkg::DEF_PAD_MAX,
  parameter int unsigned N        = bist_pkg::DEF_CLCG_N,
  parameter int unsigned TEST_LEN = bist_pkg::DEF_TEST_LEN,
  parameter int unsigned SEED_GAP = bist_pkg::DEF_B0,
  parameter int unsigned R1 = bist_pkg::LCG_R1,
  parameter int unsigned R2 = bist_pkg::LCG_R2,
  parameter int unsigned R3 = bist_pkg::LCG_R3,
  parameter int unsigned R4 = bist_pkg::LCG_R4,
  parameter logic [N-1:0] B1 = N'(bist_pkg::LCG_B1),
  parameter logic [N-1:0] B2 = N'(bist_pkg::LCG_B2),
  parameter logic [N-1:0] B3 = N'(bist_pkg::LCG_B3),
  parameter logic [N-1:0] B4 = N'(bist_pkg::LCG_B4),
  parameter int unsigned FCW = 16,
  localparam int unsigned LW   = $clog2(PAD_MAX + 1),
  localparam int unsigned CNTW = $clog2(TEST_LEN + 4*SEED_GAP + 2)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [B0-1:0]      seed,          // stored seed, MSB leftmost
  input  logic [PAD_MAX-1:0] pad,           // padding, right-aligned
  input  logic [LW-1:0]      pad_len,       // padding length
  input  logic               pad_first,     // padding before the seed
  input  stuck_fault_t       fault,         // fault of the faulty copy
  output logic               busy,
  output logic               done,
  output logic [CNTW-1:0]    count,         // patterns applied
  output logic               test_data,     // z, the generated bit
  output logic               scan_o1,       // BS-LFSR Mux1 output
  output logic               scan_o2,       // BS-LFSR low-transition output
  output logic               swap_sel,      // BS-LFSR select (cell cn)
  output bist_state_e        state,         // session state
  output logic [N-1:0]       x, y, p, q,    // LCG terms
  output logic               bi,            // x > y
  output logic               ci,            // p > q
  output logic [3:0]         cut_in,        // pattern on G3..G0
  output logic [2:0]         op_ff,         // fault-free response
  output logic [2:0]         op_ff1,        // faulty response
  output logic               op,            // fault-free G17
  output logic               op1,           // faulty G17
  output logic               fault_flag,    // mismatch seen last cycle
  output logic [FCW-1:0]     total_faults,  // mismatches counted
  output logic [B0+PAD_MAX-1:0] lfsr_cells  // BS-LFSR cells, [k] = c(k+1)
);

  logic        lfsr_load, lfsr_en, clcg_start, test_en, sess_clr;
  logic [3:0]  cap;
  logic [N-1:0] lfsr_op;
  logic [N-1:0] x0_q, y0_q, p0_q, q0_q;
  logic        z;
  logic [3:0]  in_q;

  bist_controller #(.TEST_LEN(TEST_LEN), .SEED_GAP(SEED_GAP)) u_ctrl (
    .clk, .rst_n, .start, .state, .lfsr_load, .lfsr_en, .cap,
    .clcg_start, .test_en, .sess_clr, .count, .busy, .done
  );

  bs_lfsr #(.B0(B0), .PAD_MAX(PAD_MAX), .OUT_W(N)) u_bs_lfsr (
    .clk, .rst_n, .load(lfsr_load), .en(lfsr_en), .seed, .pad, .pad_len,
    .pad_first, .o1(scan_o1), .o2(scan_o2), .sel(swap_sel), .lfsr_op, .cells(lfsr_cells)
  );

  // CLCG seed registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {x0_q, y0_q, p0_q, q0_q} <= '0;
    end else begin
      if (cap[0]) x0_q <= lfsr_op;
      if (cap[1]) y0_q <= lfsr_op;
      if (cap[2]) p0_q <= lfsr_op;
      if (cap[3]) q0_q <= lfsr_op;
    end
  end

  mod_dual_clcg #(.N(N), .R1(R1), .R2(R2), .R3(R3), .R4(R4)) u_clcg (
    .clk, .rst_n, .start(clcg_start), .en(test_en),
    .x0(x0_q), .y0(y0_q), .p0(p0_q), .q0(q0_q),
    .b1(B1), .b2(B2), .b3(B3), .b4(B4),
    .x, .y, .p, .q, .bi, .ci, .z
  );

  // Input register: the generated bits shift in at bit 0.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       in_q <= '0;
    else if (sess_clr) in_q <= '0;
    else if (test_en)  in_q <= {in_q[2:0], z};
  end

  s27_cut u_cut_good (
    .clk, .rst_n, .clr(sess_clr), .en(test_en), .pi(in_q),
    .fault('0), .op_ff, .po(op)
  );

  s27_cut u_cut_faulty (
    .clk, .rst_n, .clr(sess_clr), .en(test_en), .pi(in_q),
    .fault, .op_ff(op_ff1), .po(op1)
  );

  fault_monitor #(.W(3), .CW(FCW)) u_mon (
    .clk, .rst_n, .clr(sess_clr), .en(test_en),
    .resp_good(op_ff), .resp_faulty(op_ff1),
    .fault(fault_flag), .total_faults
  );

  assign test_data = z;
  assign cut_in    = in_q;

endmodule
