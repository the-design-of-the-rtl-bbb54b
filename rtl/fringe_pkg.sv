// fringe_pkg: constants, command-word layouts and the phase-number rule
// shared by the fringe rotator modules.
//
// The synthesizer counts a 50 MHz clock down by 500 (two binary stages
// followed by three divide-by-five stages) to give 100 kHz. The initial
// phase n_p (0..499) is sent as eleven bits B1..B11: three 3-bit digits
// in the range 0..4, weighted 100, 20 and 4, and two single bits weighted
// 2 and 1 (the two binary stages). The rate is an 18-bit setting of a
// binary rate multiplier plus a sign bit.
//
// Command word layouts follow the text (MSB first on the wire): word 1
// carries the sign of rate in its MSB and the rate in the next 18 bits;
// word 2 carries B1..B11 in its 11 MSBs. The remaining bits are unused
// here, since their assignment was left open.
package fringe_pkg;

  localparam int unsigned WORD_BITS  = 24;
  localparam int unsigned RATE_BITS  = 18;
  localparam int unsigned PHASE_BITS = 11;
  localparam int unsigned N_DIV      = 500;   // main counter modulus

  typedef struct packed {
    logic                 sign;    // 1: add counts (raise frequency)
    logic [RATE_BITS-1:0] rate;    // rate multiplier setting M
    logic [4:0]           unused;
  } word1_t;

  typedef struct packed {
    logic [2:0]  d100;             // B1..B3, 0..4, weight 100
    logic [2:0]  d20;              // B4..B6, 0..4, weight 20
    logic [2:0]  d4;               // B7..B9, 0..4, weight 4
    logic        b2;               // B10, weight 2
    logic        b1;               // B11, weight 1
    logic [12:0] unused;
  } word2_t;

  typedef struct packed {
    logic [2:0] d100;
    logic [2:0] d20;
    logic [2:0] d4;
    logic       b2;
    logic       b1;
  } phase_bits_t;

  // Phase number n_p from the eleven phase bits.
  function automatic logic [8:0] phase_number(phase_bits_t p);
    return 9'(100 * p.d100 + 20 * p.d20 + 4 * p.d4 + 2 * p.b2 + p.b1);
  endfunction

endpackage
