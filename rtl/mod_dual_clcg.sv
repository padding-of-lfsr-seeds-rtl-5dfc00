// mod_dual_clcg -- modified dual-CLCG pseudorandom bit generator.
//
// Four LCGs run in lock step:
//   x_{i+1} = a1 x_i + b1,  y_{i+1} = a2 y_i + b2   (controlled CLCG)
//   p_{i+1} = a3 p_i + b3,  q_{i+1} = a4 q_i + b4   (controller CLCG)
// all mod 2^N, with a_k = 1 + 2^Rk. Two comparators give
// B_i = [x_{i+1} > y_{i+1}] and C_i = [p_{i+1} > q_{i+1}], and the output bit
// is their sum mod 2, Z_i = B_i xor C_i. Unlike the older dual-CLCG, which
// keeps B_i only when C_i = 0 and therefore needs an output buffer and a
// controller, this version emits one bit on every clock.
//
// Interface: `start` loads the four seeds (x_1.. appear on the next clock),
// `en` advances all four LCGs; b1..b4 are inputs. z is combinational from
// the LCG registers and is valid from the clock after start.
//
// Follows the document: equations (1)-(5) and the one-bit-per-clock
// behaviour. This design's own choices: the multiplier shifts R1..R4 and
// the start/enable handshake.
module mod_dual_clcg #(
  parameter int unsigned N  = bist_pkg::DEF_CLCG_N,
  parameter int unsigned R1 = bist_pkg::LCG_R1,
  parameter int unsigned R2 = bist_pkg::LCG_R2,
  parameter int unsigned R3 = bist_pkg::LCG_R3,
  parameter int unsigned R4 = bist_pkg::LCG_R4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         en,
  input  logic [N-1:0] x0, y0, p0, q0,   // seeds
  input  logic [N-1:0] b1, b2, b3, b4,   // increments
  output logic [N-1:0] x, y, p, q,       // current terms
  output logic         bi,               // B_i
  output logic         ci,               // C_i
  output logic         z                 // Z_i
);

  clcg #(.N(N), .RU(R1), .RV(R2)) u_controlled (
    .clk, .rst_n, .start, .en,
    .u0(x0), .v0(y0), .bu(b1), .bv(b2), .u(x), .v(y), .gt(bi)
  );

  clcg #(.N(N), .RU(R3), .RV(R4)) u_controller (
    .clk, .rst_n, .start, .en,
    .u0(p0), .v0(q0), .bu(b3), .bv(b4), .u(p), .v(q), .gt(ci)
  );

  always_comb z = bi ^ ci;

endmodule
