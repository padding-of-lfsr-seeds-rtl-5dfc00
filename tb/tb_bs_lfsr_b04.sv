// tb_bs_lfsr_b04 -- the bit-swapping LFSR at the size of the larger padding
// example: a 28-bit seed with the paddings "" , "01" and "0100", i.e. LFSRs
// of 28, 30 and 32 cells (B0 = 28, PAD_MAX = 4).
//
// For random 28-bit seeds and each of the three paddings the testbench
// checks the loaded cells against the padded seed and then steps the LFSR
// 500 times, comparing o1, o2, the select and all cells with a reference
// model (feedback c1 xor cn, c1/c2 swapped while cn = 0). It also counts
// transitions on c1 and o2 over the run; o2 must show fewer.
module tb_bs_lfsr_b04;

  localparam int unsigned B0 = 28, PM = 4, OW = 8, NMAX = B0 + PM;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [B0-1:0] seed = '0;
  logic [PM-1:0] pad = '0;
  logic [2:0] pad_len = '0;
  logic o1, o2, sel;
  logic [OW-1:0] lfsr_op;
  logic [NMAX-1:0] cells;
  int checks = 0, failures = 0;

  bs_lfsr #(.B0(B0), .PAD_MAX(PM), .OUT_W(OW)) dut (
    .clk, .rst_n, .load, .en, .seed, .pad, .pad_len, .pad_first(1'b0),
    .o1, .o2, .sel, .lfsr_op, .cells
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
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic m [NMAX];
  int mlen;

  initial begin
    logic [NMAX-1:0] e;
    logic es, e1, e2;
    logic [PM-1:0] pads [3];
    int lens [3];
    int t_c1, t_o2;
    logic p_c1, p_o2;
    pads[0] = 4'b0000; lens[0] = 0;
    pads[1] = 4'b0001; lens[1] = 2;     // "01"
    pads[2] = 4'b0100; lens[2] = 4;     // "0100"
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    t_c1 = 0; t_o2 = 0;
    for (int rep = 0; rep < 3; rep++) begin
      for (int j = 0; j < 3; j++) begin
        @(negedge clk);
        seed = B0'($urandom) | B0'(1); pad = pads[j]; pad_len = 3'(lens[j]);
        load = 1'b1;
        @(negedge clk);
        load = 1'b0;
        for (int k = 0; k < NMAX; k++) m[k] = 1'b0;
        for (int k = 0; k < B0; k++) m[k] = seed[B0-1-k];
        for (int i = 0; i < lens[j]; i++) m[B0+i] = pad[lens[j]-1-i];
        mlen = B0 + lens[j];
        for (int k = 0; k < NMAX; k++) e[k] = m[k];
        check(cells == e, $sformatf("padded seed, %0d cells", mlen));
        p_c1 = cells[0]; p_o2 = o2;
        en = 1'b1;
        for (int t = 0; t < 500; t++) begin
          logic fb;
          @(negedge clk);
          fb = m[0] ^ m[mlen-1];
          for (int k = NMAX - 1; k > 0; k--) m[k] = (k < mlen) ? m[k-1] : 1'b0;
          m[0] = fb;
          for (int k = 0; k < NMAX; k++) e[k] = m[k];
          es = m[mlen-1];
          e1 = es ? m[0] : m[1];
          e2 = es ? m[1] : m[0];
          check(cells == e && sel == es && o1 == e1 && o2 == e2,
                $sformatf("%0d cells, step %0d", mlen, t + 1));
          t_c1 += int'(cells[0] != p_c1);
          t_o2 += int'(o2 != p_o2);
          p_c1 = cells[0]; p_o2 = o2;
        end
        en = 1'b0;
      end
    end
    check(t_o2 < t_c1, $sformatf("o2 transitions %0d below c1 transitions %0d", t_o2, t_c1));
    $display("transitions: c1 %0d, o2 %0d", t_c1, t_o2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
