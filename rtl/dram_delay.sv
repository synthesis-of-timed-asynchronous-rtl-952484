`timescale 1ns/1ps
// dram_delay: behavioural model of the DRAM controller's delay line.
//
// This is an analog timing element, not logic: it reproduces only the delays
// the controller was designed against. Tap a follows ras after A_DELAY
// (bound [10,20] ns), tap b follows ras after B_DELAY ([25,35] ns) and tap c
// follows the refresh request rfreq after C_DELAY ([20,30] ns). The
// controller uses a and b to time the row-to-column sequence and c to time
// the start of a refresh. Which signals feed the delay line and the bounds
// follow the controller's specification; the nominal delays (mid-points)
// are this model's choice. Delays are inertial, which is harmless because
// every pulse on ras and rfreq is much longer than the delays.
module dram_delay
  import timed_async_pkg::*;
#(
  parameter realtime A_DELAY = A_NOM,
  parameter realtime B_DELAY = B_NOM,
  parameter realtime C_DELAY = C_NOM
) (
  input  logic ras,
  input  logic rfreq,
  output logic a,
  output logic b,
  output logic c
);

  assign #(A_DELAY) a = ras;
  assign #(B_DELAY) b = ras;
  assign #(C_DELAY) c = rfreq;

endmodule
