// tb_fault_monitor -- self-checking test of the response comparator and
// detection counter.
//
// Applies random pairs of 3-bit responses (equal about half the time) with
// en toggling randomly, and checks the registered fault flag and the
// running count against a count kept in the testbench. Then checks clr,
// and saturation of a 4-bit counter at 15.
module tb_fault_monitor;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [2:0] g = '0, f = '0;
  logic fault;
  logic [15:0] total;
  logic [2:0] g4 = '0, f4 = '0;
  logic fault4;
  logic [3:0] total4;
  int checks = 0, failures = 0;

  fault_monitor #(.W(3), .CW(16)) dut (
    .clk, .rst_n, .clr, .en, .resp_good(g), .resp_faulty(f),
    .fault, .total_faults(total)
  );
  fault_monitor #(.W(3), .CW(4)) dut4 (
    .clk, .rst_n, .clr, .en, .resp_good(g4), .resp_faulty(f4),
    .fault(fault4), .total_faults(total4)
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
    int exp_cnt = 0;
    logic exp_flag = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(total == 0 && fault == 1'b0, "reset");
    for (int t = 0; t < 500; t++) begin
      g = 3'($urandom);
      f = ($urandom % 2) ? g : 3'($urandom);
      en = 1'($urandom % 4 != 0);
      @(negedge clk);
      if (en) begin
        exp_flag = (g != f);
        if (g != f) exp_cnt++;
      end
      check(fault == exp_flag, $sformatf("flag at %0d", t));
      check(int'(total) == exp_cnt, $sformatf("count %0d vs %0d", total, exp_cnt));
    end
    check(exp_cnt > 50, "mismatches occurred");
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(total == 0 && fault == 1'b0, "clear");
    // Saturation.
    en = 1'b1; g4 = 3'd1; f4 = 3'd2;
    repeat (20) @(negedge clk);
    check(total4 == 4'd15 && fault4, "4-bit counter saturates at 15");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
