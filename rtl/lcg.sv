// lcg -- linear congruential generator x_{i+1} = a * x_i + b mod 2^N with
// a = 1 + 2^R.
//
// The multiplier is built without a multiplier: an R-bit logical left shift
// forms 2^R * x_i and one adder sums x_i, 2^R * x_i and b; the modulus 2^N is
// the natural wrap of the N-bit adder. A 2:1 multiplexer in front of the
// datapath picks the seed x0 while `start` is high and the fed-back register
// otherwise, so the first clock with start high writes x_1 = a*x0 + b and
// every later enabled clock writes the next term. x_next is x_{i+1} as held in
// the register.
//
// Timing: one term per clock while start or en is high; the register holds
// otherwise. Reset clears the register.
//
// Follows the document: the seed multiplexer with its start select, the
// shifter, the three-input addition and the register in the loop. This
// design's own choices: the enable input, the reset value, and fixing a as
// 1 + 2^R through a parameter while b is an input. With R >= 2 and b odd
// the period is the full 2^N.
module lcg #(
  parameter int unsigned N = bist_pkg::DEF_CLCG_N,
  parameter int unsigned R = bist_pkg::LCG_R1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,    // take x0 as x_i
  input  logic         en,       // advance one term
  input  logic [N-1:0] x0,       // seed
  input  logic [N-1:0] b,        // increment
  output logic [N-1:0] x_next    // x_{i+1}
);

  logic [N-1:0] x_q;
  logic [N-1:0] x_i;
  logic [N-1:0] x_shl;
  logic [N-1:0] sum;

  always_comb begin
    x_i   = start ? x0 : x_q;          // Mux4
    x_shl = x_i << R;                  // 2^R * x_i mod 2^N
    sum   = x_i + x_shl + b;           // a * x_i + b mod 2^N
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           x_q <= '0;
    else if (start || en) x_q <= sum;
  end

  assign x_next = x_q;

endmodule
