// bs_lfsr -- programmable-length bit-swapping LFSR (BS-LFSR) for padded seeds.
//
// A B0-bit seed s is extended by a padding p of b = pad_len bits
// (0 <= b <= PAD_MAX) into the seed s.p of an LFSR with n = B0 + b cells, as
// in the padding scheme: "00110011" padded with "0" gives the 9-bit seed
// "001100110". Cells are numbered c1..cn from the left of the seed string;
// c1 takes the leftmost seed bit and the padding follows the seed. The
// padding is right-aligned in `pad`, so pad[b-1] is its leftmost bit.
// With pad_first set the padding is placed in front of the seed instead
// (p.s), the other placement the padding scheme allows.
//
// The LFSR is external (Fibonacci) with the feedback of x^n + x + 1: on each
// enabled clock every cell takes its left neighbour and c1 takes c1 xor cn.
// Cells beyond cn are held at zero. Changing the length only moves the point
// cn from which the feedback is taken, so one register serves every padding.
//
// Bit swapping: two 2:1 multiplexers, both selected by cn, drive the outputs
//   Mux1: input 0 = c2, input 1 = c1  -> o1
//   Mux2: input 0 = c1, input 1 = c2  -> o2
// so c1 and c2 appear swapped on o1/o2 while cn = 0. o2 is the low-transition
// scan output. lfsr_op is the parallel word {o1, o2, c3, ..., c_OUT_W}, used
// as the seed word of the next stage.
//
// Timing: load takes priority over en; both act on the rising clock edge.
// Outputs are combinational from the cell register. Reset clears all cells
// (an all-zero LFSR is stuck, so a seed must be loaded before use).
//
// Follows the document: padding by concatenation on either side, feedback x^n + x + 1,
// the two multiplexers and their input numbering, cn as the select line.
// This design's own choices: cell numbering against the seed string, the
// zeroed unused cells and the make-up of the parallel output word. For
// n = 8, 9 and 10, x^n + x + 1 is not primitive, so those lengths do not
// reach the maximal period 2^n - 1 (the 8-cell loop from 00110011 repeats
// after 63 steps).
module bs_lfsr
  import bist_pkg::*;
#(
  parameter int unsigned B0      = bist_pkg::DEF_B0,
  parameter int unsigned PAD_MAX = bist_pkg::DEF_PAD_MAX,
  parameter int unsigned OUT_W   = bist_pkg::DEF_CLCG_N,
  localparam int unsigned NMAX   = B0 + PAD_MAX,
  localparam int unsigned LW     = $clog2(PAD_MAX + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,      // load seed.padding
  input  logic               en,        // advance one step
  input  logic [B0-1:0]      seed,      // seed[B0-1] is the leftmost bit
  input  logic [PAD_MAX-1:0] pad,       // padding, right-aligned
  input  logic [LW-1:0]      pad_len,   // padding length b
  input  logic               pad_first, // 1: padding before the seed
  output logic               o1,        // Mux1 output
  output logic               o2,        // Mux2 output (low transition)
  output logic               sel,       // cn, the swap select
  output logic [OUT_W-1:0]   lfsr_op,   // {o1, o2, c3 .. c_OUT_W}
  output logic [NMAX-1:0]    cells      // cells[k] is c(k+1)
);

  initial begin
    assert (OUT_W >= 2 && OUT_W <= B0)
      else $fatal(1, "bs_lfsr: OUT_W must lie in 2..B0");
  end

  logic [LW-1:0] len_pad_q;     // padding length of the loaded seed
  logic [NMAX-1:0] c_q;
  logic [NMAX-1:0] load_val;
  logic          cn;
  logic [LW-1:0] plen;          // pad_len limited to PAD_MAX

  // Padded seed s.p: seed bits into c1..cB0, padding into cB0+1..cB0+b.
  // Padded seed p.s: padding into c1..cb, seed bits into cb+1..cb+B0.
  always_comb begin
    plen = (pad_len > LW'(PAD_MAX)) ? LW'(PAD_MAX) : pad_len;
    load_val = '0;
    for (int unsigned k = 0; k < B0; k++)
      load_val[pad_first ? k + int'(plen) : k] = seed[B0-1-k];
    for (int unsigned j = 0; j < PAD_MAX; j++)
      if (j < plen)
        load_val[pad_first ? j : B0 + j] = pad[int'(plen)-1-int'(j)];
  end

  always_comb cn = c_q[B0 + int'(len_pad_q) - 1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q       <= '0;
      len_pad_q <= '0;
    end else if (load) begin
      c_q       <= load_val;
      len_pad_q <= plen;
    end else if (en) begin
      c_q[0] <= c_q[0] ^ cn;
      for (int unsigned k = 1; k < NMAX; k++)
        c_q[k] <= (k < B0 + int'(len_pad_q)) ? c_q[k-1] : 1'b0;
    end
  end

  // Bit-swapping multiplexers.
  always_comb begin
    sel = cn;
    o1  = sel ? c_q[0] : c_q[1];
    o2  = sel ? c_q[1] : c_q[0];
    lfsr_op = '0;
    lfsr_op[OUT_W-1] = o1;
    lfsr_op[OUT_W-2] = o2;
    for (int unsigned k = 2; k < OUT_W; k++)
      lfsr_op[OUT_W-1-k] = c_q[k];
  end

  assign cells = c_q;

endmodule
