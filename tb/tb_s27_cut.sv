// tb_s27_cut -- self-checking test of the s27 circuit under test and its
// stuck-at fault injection.
//
// The reference is a table-driven model of s27: an array of net values
// evaluated in topological order, where the selected net is overwritten by
// the stuck value right after it is computed. For the fault-free circuit
// and for each of the 32 single stuck-at faults (16 nets x 0/1) the
// testbench applies 64 random input vectors, clocks the flip-flops and
// compares op_ff = {G5, G6, G7} and po = G17 on every clock. It also checks
// a few known fault-free values from reset, and that clr and en work.
module tb_s27_cut;
  import bist_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [3:0] pi = '0;
  stuck_fault_t fault = '0;
  logic [2:0] op_ff;
  logic po;
  int checks = 0, failures = 0;

  s27_cut dut (.clk, .rst_n, .clr, .en, .pi, .fault, .op_ff, .po);

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

  // Net indices follow s27_net_e: G0..G3, G5..G16 -> 0..15, G17 -> 16.
  logic st [3];             // model flip-flops G5, G6, G7
  logic nv [17];

  function automatic logic fx(int idx, logic v, stuck_fault_t f);
    return (f.en && int'(f.site) == idx) ? f.value : v;
  endfunction

  task automatic model_eval(input logic [3:0] in, input stuck_fault_t f);
    for (int k = 0; k < 4; k++) nv[k] = fx(k, in[k], f);
    nv[4] = fx(4, st[0], f);                         // G5
    nv[5] = fx(5, st[1], f);                         // G6
    nv[6] = fx(6, st[2], f);                         // G7
    nv[13] = fx(13, !nv[0], f);                      // G14
    nv[7]  = fx(7,  nv[13] && nv[5], f);             // G8
    nv[11] = fx(11, !(nv[1] || nv[6]), f);           // G12
    nv[14] = fx(14, nv[11] || nv[7], f);             // G15
    nv[15] = fx(15, nv[3] || nv[7], f);              // G16
    nv[8]  = fx(8,  !(nv[15] && nv[14]), f);         // G9
    nv[10] = fx(10, !(nv[4] || nv[8]), f);           // G11
    nv[9]  = fx(9,  !(nv[13] || nv[10]), f);         // G10
    nv[12] = fx(12, !(nv[2] || nv[11]), f);          // G13
    nv[16] = !nv[10];                                // G17
  endtask

  initial begin
    stuck_fault_t f;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // Known values from the reset state 000 with inputs 0000.
    pi = 4'b0000; fault = '0;
    #1;
    check(op_ff == 3'b000 && po == 1'b1, "reset state, G17 = 1");
    en = 1'b1;
    @(negedge clk);
    check(op_ff == 3'b000, "next state from 000 with 0000 is 000");
    // G0 = 1: G14 = 0, G8 = 0, G12 = 1, G15 = 1, G16 = 0, G9 = 1, G11 = 0,
    // G10 = 1, G13 = 0 -> next state G5 G6 G7 = 100.
    pi = 4'b0001;
    @(negedge clk);
    check(op_ff == 3'b100, "next state from 000 with G0 = 1 is 100");

    for (int fi = -1; fi < 32; fi++) begin
      f = '0;
      if (fi >= 0) begin
        f.en = 1'b1; f.site = s27_net_e'(fi / 2); f.value = logic'(fi % 2);
      end
      fault = f;
      en = 1'b0; clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      check(op_ff == {fx(4, 1'b0, f), fx(5, 1'b0, f), fx(6, 1'b0, f)},
            $sformatf("clear, fault %0d", fi));
      st[0] = 1'b0; st[1] = 1'b0; st[2] = 1'b0;
      en = 1'b1;
      for (int t = 0; t < 64; t++) begin
        pi = 4'($urandom);
        #1;
        model_eval(pi, f);
        check(po == nv[16], $sformatf("G17, fault %0d, vector %0d", fi, t));
        check(op_ff == {nv[4], nv[5], nv[6]},
              $sformatf("state, fault %0d, vector %0d", fi, t));
        @(negedge clk);
        st[0] = nv[9]; st[1] = nv[10]; st[2] = nv[12];
      end
      // Hold with en low.
      en = 1'b0;
      pi = ~pi;
      @(negedge clk);
      #1;
      model_eval(pi, f);
      check(op_ff == {nv[4], nv[5], nv[6]}, $sformatf("hold, fault %0d", fi));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
