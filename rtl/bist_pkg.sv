// bist_pkg -- constants and types shared by the padded-seed / modified
// dual-CLCG test pattern generator.
//
// The seed width (8 bits) and the CLCG word width (8 bits) are the sizes of
// the worked example this design follows. The longest padding, PAD_MAX = 4,
// is the rule L = min{16, B0/2} for the first padding iteration with B0 = 8.
// The LCG multipliers (1 + 2^R) and increments b are this design's own
// choice: R >= 2 makes a = 1 mod 4 and an odd b gives each 8-bit LCG its full
// period of 2^8, which the modified dual-CLCG relies on.
package bist_pkg;

  localparam int unsigned DEF_B0      = 8;   // seed length in bits
  localparam int unsigned DEF_PAD_MAX = 4;   // longest padding, min(16, B0/2)
  localparam int unsigned DEF_CLCG_N  = 8;   // LCG word width n (modulus 2^n)

  // Shift amounts R (a = 1 + 2^R) and increments b of the four LCGs,
  // in the order x, y, p, q.
  localparam int unsigned LCG_R1 = 2, LCG_R2 = 3, LCG_R3 = 4, LCG_R4 = 5;
  localparam int unsigned LCG_B1 = 1, LCG_B2 = 3, LCG_B3 = 5, LCG_B4 = 7;

  // Number of patterns applied in one session.
  localparam int unsigned DEF_TEST_LEN = 1250;

  // Nets of s27 on which a single stuck-at fault can be placed.
  typedef enum logic [3:0] {
    NET_G0  = 4'd0,  NET_G1  = 4'd1,  NET_G2  = 4'd2,  NET_G3  = 4'd3,
    NET_G5  = 4'd4,  NET_G6  = 4'd5,  NET_G7  = 4'd6,  NET_G8  = 4'd7,
    NET_G9  = 4'd8,  NET_G10 = 4'd9,  NET_G11 = 4'd10, NET_G12 = 4'd11,
    NET_G13 = 4'd12, NET_G14 = 4'd13, NET_G15 = 4'd14, NET_G16 = 4'd15
  } s27_net_e;

  typedef struct packed {
    logic     en;      // 1: fault present
    s27_net_e site;    // faulty net
    logic     value;   // stuck-at value
  } stuck_fault_t;

  // Session controller states.
  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,   // waiting for start
    ST_LOAD  = 3'd1,   // padded seed enters the BS-LFSR
    ST_SEED  = 3'd2,   // BS-LFSR runs, four CLCG seeds are captured
    ST_START = 3'd3,   // LCGs take their seeds
    ST_TEST  = 3'd4,   // patterns applied, responses compared
    ST_DONE  = 3'd5    // session finished, results held
  } bist_state_e;

endpackage
