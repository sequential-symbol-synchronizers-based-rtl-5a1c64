// Shared types and constants of the pulse-comparison symbol synchronizers.
//
// Everything in this design is discrete time: one sample clock runs at
// SAMPLES_PER_BIT ticks per data bit, and the continuous-time pulses of the
// phase comparators (Pv, Pf, Pe) become sample-wide levels of that clock.
// The four synchronizer variants differ only in their phase comparator:
//   B_M  both transitions, bit rate, manual (fixed delay T/2)
//   B_A  both transitions, bit rate, automatic (second flip-flop)
//   P_M4 positive transitions, quarter rate, manual
//   P_A4 positive transitions, quarter rate, automatic
// The phase error is carried as a signed count of half units (Pe = err/2),
// because the quarter-rate automatic comparator subtracts a half-amplitude
// fixed pulse.
package sync_pkg;

  typedef enum logic [1:0] {
    B_M  = 2'd0,
    B_A  = 2'd1,
    P_M4 = 2'd2,
    P_A4 = 2'd3
  } variant_e;

  // The four quarter-rate clocks: CF, CQ (CF delayed 90 degrees = one bit),
  // COF (CF inverted) and COQ (CQ inverted). Their rising edges follow one
  // another one bit apart: CF, CQ, COF, COQ.
  typedef struct packed {
    logic cf;
    logic cq;
    logic cof;
    logic coq;
  } quad_clk_t;

  // Phase error in half units: -2 .. +2 represents Pe = -1 .. +1.
  typedef logic signed [2:0] err_t;

endpackage
