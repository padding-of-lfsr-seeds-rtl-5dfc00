// fault_monitor -- response comparator and detection counter.
//
// On every clock with en high it compares the response of the fault-free
// circuit with that of the faulty circuit. On a mismatch it sets `fault`
// for that cycle and adds one to `total_faults`; on a match it clears
// `fault`. The count therefore is the number of compared patterns whose
// response revealed the fault, which is how the test session scores a
// pattern source. The counter saturates at its maximum instead of wrapping.
//
// Interface: W-bit responses, CW-bit counter. `clr` (synchronous) and rst_n
// (asynchronous) clear both outputs. Outputs are registered: they show the
// comparison of the previous enabled clock.
//
// Follows the document: the comparison of the two responses, the fault
// flag and the running total. Counting per mismatching cycle, saturation
// and the clear input are this design's choices.
module fault_monitor #(
  parameter int unsigned W  = 3,
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [W-1:0]  resp_good,
  input  logic [W-1:0]  resp_faulty,
  output logic          fault,
  output logic [CW-1:0] total_faults
);

  logic mismatch;
  always_comb mismatch = (resp_good != resp_faulty);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fault        <= 1'b0;
      total_faults <= '0;
    end else if (clr) begin
      fault        <= 1'b0;
      total_faults <= '0;
    end else if (en) begin
      fault <= mismatch;
      if (mismatch && total_faults != '1)
        total_faults <= total_faults + 1'b1;
    end
  end

endmodule
