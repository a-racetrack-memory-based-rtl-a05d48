// Shared types and constants of the racetrack-memory radix-4 Booth multiplier.
//
// booth_ctl_t carries the five control signals that the Booth encoder derives
// from one 3-bit multiplier group (zero, one, two, ne_one, ne_two). Exactly one
// of them is set for every group.
//
// The resistance constants describe the magnetic full adder at the level of its
// sense amplifiers. Resistances are integers in units of half a low-state MTJ
// resistance, so that R_H = 2.5 R_L is exact: R_L = 2 units, R_H = 5 units. The
// ratio is the one the design is built around; the unit is this design's choice.
package rm_pkg;

  typedef struct packed {
    logic zero;    // partial product is 0
    logic one;     // +1 x multiplicand
    logic two;     // +2 x multiplicand
    logic ne_one;  // -1 x multiplicand
    logic ne_two;  // -2 x multiplicand
  } booth_ctl_t;

  // Resistance width and values, in units of R_L/2.
  localparam int unsigned RES_W = 6;
  localparam int unsigned R_L   = 2;
  localparam int unsigned R_H   = 5;

endpackage
