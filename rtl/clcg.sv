// clcg -- coupled linear congruential generator: two LCGs started and
// stepped together, and a comparator whose output is 1 when the first LCG's
// term is greater than the second's (B_i = [x_{i+1} > y_{i+1}], or
// C_i = [p_{i+1} > q_{i+1}] for the second pair).
//
// Interface: seeds u0 and v0 and increments bu and bv; multipliers
// 1 + 2^RU and 1 + 2^RV are parameters. `gt` is combinational from the two
// LCG registers, so it is valid from the clock after start and changes once
// per enabled clock.
//
// Follows the document: two LCGs feeding one magnitude comparator (unsigned,
// strict greater-than). The unsigned reading of the comparison is this
// design's choice.
module clcg #(
  parameter int unsigned N  = bist_pkg::DEF_CLCG_N,
  parameter int unsigned RU = bist_pkg::LCG_R1,
  parameter int unsigned RV = bist_pkg::LCG_R2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         en,
  input  logic [N-1:0] u0,
  input  logic [N-1:0] v0,
  input  logic [N-1:0] bu,
  input  logic [N-1:0] bv,
  output logic [N-1:0] u,      // first LCG term
  output logic [N-1:0] v,      // second LCG term
  output logic         gt      // u > v
);

  lcg #(.N(N), .R(RU)) u_lcg_u (
    .clk, .rst_n, .start, .en, .x0(u0), .b(bu), .x_next(u)
  );

  lcg #(.N(N), .R(RV)) u_lcg_v (
    .clk, .rst_n, .start, .en, .x0(v0), .b(bv), .x_next(v)
  );

  always_comb gt = (u > v);

endmodule
