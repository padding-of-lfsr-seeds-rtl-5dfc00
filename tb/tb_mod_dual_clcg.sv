// tb_mod_dual_clcg -- self-checking test of the modified dual-CLCG.
//
// Starts the generator from random seeds and the default multipliers
// (5, 9, 17, 33) and increments, then checks on every clock the four terms
// against x = 5x + b1, y = 9y + b2, p = 17p + b3, q = 33q + b4 (mod 256),
// B = (x > y), C = (p > q) and Z = B xor C. One output bit per clock is
// checked: z is compared on every consecutive clock after start, with no
// skipped cycles. Over 256 clocks (one full LCG period) the number of ones
// must lie between 64 and 192, and the bit stream must repeat with the
// LCG period 2^8 = 256.
module tb_mod_dual_clcg;

  localparam int unsigned N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, en = 1'b0;
  logic [N-1:0] x0 = '0, y0 = '0, p0 = '0, q0 = '0;
  logic [N-1:0] b1 = 8'd1, b2 = 8'd3, b3 = 8'd5, b4 = 8'd7;
  logic [N-1:0] x, y, p, q;
  logic bi, ci, z;
  int checks = 0, failures = 0;

  mod_dual_clcg dut (
    .clk, .rst_n, .start, .en, .x0, .y0, .p0, .q0, .b1, .b2, .b3, .b4,
    .x, .y, .p, .q, .bi, .ci, .z
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

  initial begin
    logic [N-1:0] ex, ey, ep, eq;
    logic eb, ec;
    int ones;
    logic zs [512];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      @(negedge clk);
      x0 = N'($urandom); y0 = N'($urandom); p0 = N'($urandom); q0 = N'($urandom);
      start = 1'b1;
      ex = N'(5 * x0 + b1); ey = N'(9 * y0 + b2);
      ep = N'(17 * p0 + b3); eq = N'(33 * q0 + b4);
      @(negedge clk);
      start = 1'b0; en = 1'b1;
      ones = 0;
      for (int t = 0; t < 512; t++) begin
        eb = (ex > ey); ec = (ep > eq);
        zs[t] = z;
        check(x == ex && y == ey && p == ep && q == eq,
              $sformatf("terms at step %0d", t));
        check(bi == eb && ci == ec, $sformatf("B, C at step %0d", t));
        check(z == (eb ^ ec), $sformatf("Z at step %0d", t));
        if (t < 256) ones += int'(z);
        @(negedge clk);
        ex = N'(5 * ex + b1); ey = N'(9 * ey + b2);
        ep = N'(17 * ep + b3); eq = N'(33 * eq + b4);
      end
      en = 1'b0;
      for (int t = 0; t < 256; t++)
        check(zs[t] == zs[t+256], $sformatf("Z repeats with period 256, bit %0d", t));
      check(ones >= 64 && ones <= 192, $sformatf("ones in 256 bits: %0d", ones));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
