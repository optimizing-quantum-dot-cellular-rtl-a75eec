// Shared types and constants of the Hamming (6,3) code generator and error detector.
//
// A Hamming (6,3) message carries three data bits D1..D3 and three parity bits P1..P3.
// The bit positions follow the rule that each parity bit checks the data bits at
// two positions: P1 checks positions 3 and 5, P2 checks 3 and 6, P3 checks 5 and 6.
// That places the bits as
//
//   position : 1  2  3  4  5  6
//   bit      : P1 P2 D1 P3 D2 D3
//
// and a message is held as codeword_t, a vector indexed by position 1..6.
// The structs name the bits in the order D1..D3, P1..P3 and EDP1..EDP3, first member
// in the most significant bit.
package hamming63_pkg;

  typedef struct packed {
    logic d1;
    logic d2;
    logic d3;
  } data_t;

  typedef struct packed {
    logic p1;
    logic p2;
    logic p3;
  } parity_t;

  // Error-detector parity bits: all zero when the message is a valid code word.
  typedef struct packed {
    logic edp1;
    logic edp2;
    logic edp3;
  } edp_t;

  // Pass-through (garbage) outputs of the detector's second gate stage.
  typedef struct packed {
    logic d1_x_d2;
    logic d2_x_d3;
    logic d3_x_d1;
  } pair_t;

  typedef logic [6:1] codeword_t;

  localparam int unsigned POS_P1 = 1;
  localparam int unsigned POS_P2 = 2;
  localparam int unsigned POS_D1 = 3;
  localparam int unsigned POS_P3 = 4;
  localparam int unsigned POS_D2 = 5;
  localparam int unsigned POS_D3 = 6;

  // Width of the packed message, data and EDP words.
  localparam int unsigned CODE_BITS = 6;
  localparam int unsigned DATA_BITS = $bits(data_t);
  localparam int unsigned EDP_BITS  = $bits(edp_t);

endpackage
