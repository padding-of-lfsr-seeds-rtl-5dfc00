// tb_bs_lfsr -- self-checking test of the programmable-length bit-swapping
// LFSR.
//
// 1. Loads the seed 00110011 with the paddings "", "0", "10" and "11" and
//    checks the cell contents against the padded seed strings 00110011,
//    001100110, 0011001110 and 0011001111; also the padding "10" placed
//    before the seed (1000110011) and a length above PAD_MAX.
// 2. For every padding length 0..4 and random seeds, steps the LFSR 200
//    times and compares o1, o2, sel, the parallel word and all cells with a
//    reference model kept in the testbench (feedback c1 xor cn, swap of c1
//    and c2 while cn = 0).
// 3. A second instance with a 6-bit seed and one padding bit runs as a
//    7-cell LFSR (x^7 + x + 1 is primitive): checks the period 127 and the
//    transition counts over one period, 64 on c1 and o1 and 32 on o2, i.e.
//    o2 saves 2^(n-2) transitions.
module tb_bs_lfsr;

  localparam int unsigned B0 = 8, PM = 4, OW = 8, NMAX = B0 + PM;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0, en = 1'b0;
  logic [B0-1:0] seed = '0;
  logic [PM-1:0] pad = '0;
  logic [2:0]    pad_len = '0;
  logic          pad_first = 1'b0;
  logic o1, o2, sel;
  logic [OW-1:0] lfsr_op;
  logic [NMAX-1:0] cells;

  int checks = 0, failures = 0;

  bs_lfsr #(.B0(B0), .PAD_MAX(PM), .OUT_W(OW)) dut (
    .clk, .rst_n, .load, .en, .seed, .pad, .pad_len, .pad_first,
    .o1, .o2, .sel, .lfsr_op, .cells
  );

  // Second instance: 6-bit seed + 1 padding bit = 7 cells.
  logic [5:0] seed7 = 6'b100000;
  logic       pad7 = 1'b0;
  logic       len7 = 1'b1;
  logic       load7 = 1'b0, en7 = 1'b0;
  logic       o1_7, o2_7, sel_7;
  logic [5:0] op_7;
  logic [6:0] cells_7;

  bs_lfsr #(.B0(6), .PAD_MAX(1), .OUT_W(6)) dut7 (
    .clk, .rst_n, .load(load7), .en(en7), .seed(seed7), .pad(pad7),
    .pad_len(len7), .pad_first(1'b0), .o1(o1_7), .o2(o2_7), .sel(sel_7), .lfsr_op(op_7),
    .cells(cells_7)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference model state: m[k] is cell c(k+1).
  logic m [NMAX];
  int   mlen;

  task automatic model_load(input logic [B0-1:0] s, input logic [PM-1:0] p,
                            input int b, input logic front);
    for (int k = 0; k < NMAX; k++) m[k] = 1'b0;
    for (int k = 0; k < B0; k++) m[front ? k + b : k] = s[B0-1-k];
    for (int j = 0; j < b; j++) m[front ? j : B0 + j] = p[b-1-j];
    mlen = B0 + b;
  endtask

  task automatic model_step();
    logic fb;
    fb = m[0] ^ m[mlen-1];
    for (int k = mlen - 1; k > 0; k--) m[k] = m[k-1];
    m[0] = fb;
  endtask

  task automatic compare_outputs(input string tag);
    logic e_sel, e_o1, e_o2;
    logic [OW-1:0] e_op;
    logic [NMAX-1:0] e_cells;
    e_sel = m[mlen-1];
    e_o1  = e_sel ? m[0] : m[1];
    e_o2  = e_sel ? m[1] : m[0];
    e_op  = '0;
    e_op[OW-1] = e_o1;
    e_op[OW-2] = e_o2;
    for (int k = 2; k < OW; k++) e_op[OW-1-k] = m[k];
    for (int k = 0; k < NMAX; k++) e_cells[k] = m[k];
    check(sel == e_sel && o1 == e_o1 && o2 == e_o2 && lfsr_op == e_op
          && cells == e_cells, tag);
  endtask

  function automatic logic [NMAX-1:0] str_cells(input string s);
    logic [NMAX-1:0] r = '0;
    for (int k = 0; k < s.len(); k++) r[k] = (s[k] == "1");
    return r;
  endfunction

  task automatic do_load(input logic [B0-1:0] s, input logic [PM-1:0] p,
                         input int b, input logic front = 1'b0);
    @(negedge clk);
    seed = s; pad = p; pad_len = 3'(b); pad_first = front; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    model_load(s, p, (b > PM) ? PM : b, front);
  endtask

  initial begin
    int t_c1, t_o1, t_o2, period;
    logic p_c1, p_o1, p_o2;
    logic [6:0] first;

    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 1. Padded seeds of the worked example.
    do_load(8'b00110011, 4'b0000, 0);
    check(cells == str_cells("00110011"), "seed 00110011, empty padding");
    do_load(8'b00110011, 4'b0000, 1);
    check(cells == str_cells("001100110"), "seed 00110011, padding 0");
    do_load(8'b00110011, 4'b0010, 2);
    check(cells == str_cells("0011001110"), "seed 00110011, padding 10");
    do_load(8'b00110011, 4'b0011, 2);
    check(cells == str_cells("0011001111"), "seed 00110011, padding 11");
    do_load(8'b00110011, 4'b1000, 4);
    check(cells == str_cells("001100111000"), "seed 00110011, padding 1000");
    do_load(8'b00110011, 4'b0010, 2, 1'b1);
    check(cells == str_cells("1000110011"), "padding 10 before seed 00110011");
    do_load(8'b00110011, 4'b0111, 7);
    check(cells == str_cells("001100110111"), "padding length above PAD_MAX is limited");

    // 2. Stepping against the reference model, every length.
    for (int b = 0; b <= PM; b++) begin
      for (int rep = 0; rep < 3; rep++) begin
        do_load(8'($urandom) | 8'h01, 4'($urandom), b, logic'(rep % 2));
        compare_outputs($sformatf("after load, b=%0d", b));
        en = 1'b1;
        for (int t = 0; t < 200; t++) begin
          @(negedge clk);
          model_step();
          compare_outputs($sformatf("b=%0d step %0d", b, t + 1));
        end
        en = 1'b0;
      end
    end
    // Hold when en is low.
    @(negedge clk);
    compare_outputs("hold with en low");

    // 3. Seven-cell maximal LFSR: period and transition savings.
    @(negedge clk);
    load7 = 1'b1;
    @(negedge clk);
    load7 = 1'b0;
    first = cells_7;
    p_c1 = cells_7[0]; p_o1 = o1_7; p_o2 = o2_7;
    t_c1 = 0; t_o1 = 0; t_o2 = 0; period = 0;
    en7 = 1'b1;
    for (int t = 1; t <= 127; t++) begin
      @(negedge clk);
      if (cells_7 != first && t == 127) period = -1;
      if (cells_7 == first && period == 0) period = t;
      t_c1 += int'(cells_7[0] != p_c1);
      t_o1 += int'(o1_7 != p_o1);
      t_o2 += int'(o2_7 != p_o2);
      p_c1 = cells_7[0]; p_o1 = o1_7; p_o2 = o2_7;
    end
    en7 = 1'b0;
    check(period == 127, $sformatf("7-cell period %0d, expected 127", period));
    check(t_c1 == 64, $sformatf("c1 transitions %0d, expected 64", t_c1));
    check(t_o1 == 64, $sformatf("o1 transitions %0d, expected 64", t_o1));
    check(t_o2 == 32, $sformatf("o2 transitions %0d, expected 32", t_o2));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
