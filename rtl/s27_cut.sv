// s27_cut -- the ISCAS'89 s27 benchmark circuit, used as the circuit under
// test, with an optional single stuck-at fault.
//
// s27 has four primary inputs G0..G3, three D flip-flops G5, G6, G7, one
// primary output G17 and ten gates:
//   G14 = NOT G0          G8  = AND(G14, G6)     G12 = NOR(G1, G7)
//   G15 = OR(G12, G8)     G16 = OR(G3, G8)       G9  = NAND(G16, G15)
//   G11 = NOR(G5, G9)     G10 = NOR(G14, G11)    G13 = NOR(G2, G12)
//   G17 = NOT G11         G5 <= G10, G6 <= G11, G7 <= G13
// This is the published benchmark netlist; the surrounding test scheme only
// names the circuit.
//
// Fault injection: when fault.en is set, the net fault.site is forced to
// fault.value wherever it is read (a stem fault). A fault-free copy is the
// same module with fault.en = 0. The forcing is ordinary logic, so the faulty
// copy synthesises like the good one.
//
// Interface: pi = {G3, G2, G1, G0}; op_ff = {G5, G6, G7} is the flip-flop
// state, i.e. the scan-out response; po is G17. The flip-flops capture on
// the rising clock edge while en is high; clr (synchronous) and rst_n
// (asynchronous) put them to 000. Both the clear and the enable are this
// design's additions for running it inside a test session.
module s27_cut
  import bist_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [3:0]   pi,
  input  stuck_fault_t fault,
  output logic [2:0]   op_ff,
  output logic         po
);

  logic g5_q, g6_q, g7_q;
  logic g0, g1, g2, g3, g5, g6, g7;
  logic g8, g9, g10, g11, g12, g13, g14, g15, g16;

  // Value of net `site` after the optional stuck-at fault.
  function automatic logic fnet(s27_net_e site, logic v, stuck_fault_t f);
    return (f.en && f.site == site) ? f.value : v;
  endfunction

  always_comb begin
    g0  = fnet(NET_G0, pi[0], fault);
    g1  = fnet(NET_G1, pi[1], fault);
    g2  = fnet(NET_G2, pi[2], fault);
    g3  = fnet(NET_G3, pi[3], fault);
    g5  = fnet(NET_G5, g5_q, fault);
    g6  = fnet(NET_G6, g6_q, fault);
    g7  = fnet(NET_G7, g7_q, fault);
    g14 = fnet(NET_G14, ~g0, fault);
    g8  = fnet(NET_G8,  g14 & g6, fault);
    g12 = fnet(NET_G12, ~(g1 | g7), fault);
    g15 = fnet(NET_G15, g12 | g8, fault);
    g16 = fnet(NET_G16, g3 | g8, fault);
    g9  = fnet(NET_G9,  ~(g16 & g15), fault);
    g11 = fnet(NET_G11, ~(g5 | g9), fault);
    g10 = fnet(NET_G10, ~(g14 | g11), fault);
    g13 = fnet(NET_G13, ~(g2 | g12), fault);
    po  = ~g11;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {g5_q, g6_q, g7_q} <= 3'b000;
    end else if (clr) begin
      {g5_q, g6_q, g7_q} <= 3'b000;
    end else if (en) begin
      g5_q <= g10;
      g6_q <= g11;
      g7_q <= g13;
    end
  end

  assign op_ff = {g5, g6, g7};

endmodule
