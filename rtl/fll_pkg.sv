// fll_pkg: types shared by the blocks of the period-processing frequency locked loop.
//
// The loop runs from one system clock. The three clocks of the loop (Sc at
// frequency fc, S1 at f1 and S2 at f2) are carried as one-clock enable pulses
// bundled in ticks_t, and the three control pulses that end every output
// period (P1, P2, R) are bundled in ctrl_t. The default counter width of
// eight bits is the width of the realised loop; the other defaults are
// choices of this design.
package fll_pkg;

  // Width of the measuring counters and of the period generator.
  localparam int unsigned WIDTH_DEFAULT = 8;
  // Resolution of the programmable ratio f1/fc = ratio / 2**RATIO_BITS.
  localparam int unsigned RATIO_BITS_DEFAULT = 8;

  // Clock enables: c is Sc (fc); f1 and f2 are S1 and S2, two disjoint
  // subsets of the Sc ticks, so that f1 + f2 = fc holds exactly.
  typedef struct packed {
    logic c;
    logic f1;
    logic f2;
  } ticks_t;

  // Control pulses issued at the end of each output period.
  typedef struct packed {
    logic p1;  // preset the period generator with N_b
    logic p2;  // preset counter 2 with the content of counter 1
    logic r;   // clear counter 1
  } ctrl_t;

endpackage
