`timescale 1ns/1ps
// timed_async_pkg: timing constraints shared by the controllers' delay-line
// model and by the testbenches that play the controllers' environments.
//
// Every constraint is a bound [min,max] in ns (the SCSI example uses abstract
// time units, simulated as ns) on the time from an enabling event to the
// event it enables. The numbers are the ones the controllers were designed
// against; the nominal values used for the delay line are the mid-points of
// its bounds, a choice of this design. The testbenches draw random delays
// inside each bound.
package timed_async_pkg;

  typedef struct packed {
    int unsigned min_ps;
    int unsigned max_ps;
  } bound_t;

  // SCSI protocol controller: environment answers in [20,50].
  localparam bound_t SCSI_ENV   = '{min_ps: 20000, max_ps: 50000};

  // MMU memory-data-load cycle (ns).
  localparam bound_t MMU_REQ    = '{min_ps: 30000, max_ps: 80000};  // mdlo fall -> mdli rise: [30,inf), upper end chosen for simulation
  localparam bound_t MMU_ACC    = '{min_ps: 30000, max_ps: 80000};  // mslo rise -> msli rise: [30,inf), upper end chosen for simulation
  localparam bound_t MMU_ACKRST = '{min_ps:  5000, max_ps: 30000};  // request fall -> acknowledge fall: [5,30]
  localparam bound_t MMU_REG    = '{min_ps:  2000, max_ps:  9000};  // rao -> rai: [2,9]
  localparam bound_t MMU_CMP    = '{min_ps:  2500, max_ps: 13000};  // bo -> bi: [2.5,13]

  // DRAM controller delay line and refresh timing (ns).
  localparam bound_t DRAM_A     = '{min_ps: 10000, max_ps: 20000};  // ras -> a
  localparam bound_t DRAM_B     = '{min_ps: 25000, max_ps: 35000};  // ras -> b
  localparam bound_t DRAM_C     = '{min_ps: 20000, max_ps: 30000};  // rfreq -> c
  localparam bound_t DRAM_RFLOW = '{min_ps: 55000, max_ps: 65000};  // rfreq fall -> rfreq rise
  localparam bound_t DRAM_RFGAP = '{min_ps: 50000, max_ps: 90000};  // c rise -> next rfreq fall: [50,inf), upper end chosen for simulation

  // Nominal delay-line taps: mid-points of the bounds above.
  localparam realtime A_NOM = 15.0;
  localparam realtime B_NOM = 30.0;
  localparam realtime C_NOM = 25.0;

endpackage
