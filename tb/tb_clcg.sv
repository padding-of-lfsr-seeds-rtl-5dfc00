// tb_clcg -- self-checking test of the coupled LCG.
//
// Two LCGs with a = 5 and a = 9 are started from random seeds and odd
// increments; every clock the testbench recomputes both terms with
// multiplications and checks u, v and the comparator output gt = (u > v).
// Also checks that both ones and zeros occur on gt.
module tb_clcg;

  localparam int unsigned N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, en = 1'b0;
  logic [N-1:0] u0 = '0, v0 = '0, bu = '0, bv = '0, u, v;
  logic gt;
  int checks = 0, failures = 0;

  clcg #(.N(N), .RU(2), .RV(3)) dut (
    .clk, .rst_n, .start, .en, .u0, .v0, .bu, .bv, .u, .v, .gt
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
    logic [N-1:0] eu, ev;
    int ones = 0, zeros = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 5; rep++) begin
      @(negedge clk);
      u0 = N'($urandom); v0 = N'($urandom);
      bu = N'($urandom) | N'(1); bv = N'($urandom) | N'(1);
      start = 1'b1;
      eu = N'(5 * u0 + bu); ev = N'(9 * v0 + bv);
      @(negedge clk);
      start = 1'b0; en = 1'b1;
      for (int t = 0; t < 300; t++) begin
        check(u == eu && v == ev, $sformatf("terms at step %0d", t));
        check(gt == (eu > ev), $sformatf("comparator at step %0d", t));
        if (gt) ones++; else zeros++;
        @(negedge clk);
        eu = N'(5 * eu + bu); ev = N'(9 * ev + bv);
      end
      en = 1'b0;
    end
    check(ones > 0 && zeros > 0, "comparator output toggles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
