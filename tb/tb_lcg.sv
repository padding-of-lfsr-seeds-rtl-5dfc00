// tb_lcg -- self-checking test of the shift-and-add linear congruential
// generator.
//
// Drives random seeds and odd increments into an 8-bit LCG with R = 2
// (a = 5) and compares every term with x_{i+1} = 5 x_i + b mod 256 computed
// here with a multiplication. Checks the one-clock latency from start to
// x_1, that the register holds while en is low, and that with b odd the
// sequence returns to its first term after exactly 256 steps and not before.
module tb_lcg;

  localparam int unsigned N = 8, R = 2, A = 1 + (1 << R);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, en = 1'b0;
  logic [N-1:0] x0 = '0, b = '0, x_next;
  int checks = 0, failures = 0;

  lcg #(.N(N), .R(R)) dut (.clk, .rst_n, .start, .en, .x0, .b, .x_next);

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
    logic [N-1:0] e, first;
    int period;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(x_next == '0, "reset value");

    for (int rep = 0; rep < 8; rep++) begin
      @(negedge clk);
      x0 = N'($urandom); b = N'($urandom) | N'(1); start = 1'b1;
      e = N'(A * x0 + b);
      @(negedge clk);
      start = 1'b0;
      check(x_next == e, $sformatf("x1 after start: %0d vs %0d", x_next, e));
      // Hold.
      repeat (2) @(negedge clk);
      check(x_next == e, "hold while en low");
      en = 1'b1;
      first = x_next; period = 0;
      for (int t = 1; t <= 256; t++) begin
        @(negedge clk);
        e = N'(A * e + b);
        check(x_next == e, $sformatf("term %0d", t));
        if (x_next == first && period == 0) period = t;
      end
      en = 1'b0;
      check(period == 256, $sformatf("period %0d, expected 256", period));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
