`timescale 1ns/1ps
// gc_element: generalized C-element, the state-holding gate every output of
// the timed controllers is built from.
//
// The output rises when the pull-up guard set_g is true, falls when the
// pull-down guard clr_g is true, and keeps its value while neither is true.
// In CMOS this is a pull-up and a pull-down transistor network around a weak
// keeper; here the keeper is written as a level-sensitive latch whose enable
// is (set_g | clr_g) and whose data is set_g. The two guards must never be
// true together (that would be interference, a short circuit in the
// transistor version); the controllers are built so that, under their
// timing constraints, they are not, and their testbenches check it.
//
// Interface: rst forces the output to INIT (the reset state of the signal in
// its specification); set_g / clr_g are the two guards; q is the output.
// Timing: DELAY (default 0) from the internal node to q. A gate's delay is
// bounded in the timing analysis ([0,1] ns in the memory management unit,
// [0,5] units in the SCSI example), so both ends of the bound can be
// simulated. The delay is inertial, and synthesis ignores it.
//
// The gate itself follows the description of a generalized C-element; the
// reset input and the latch form are choices of this design. The latch is
// the intended state-holding element, not an inference accident.
//
// Tools report this gate as a latch, and when it sits in a controller they
// report the guard inputs as circular combinational logic: both are the
// intended behaviour of a state-holding asynchronous gate, not faults.
module gc_element #(
  parameter logic    INIT  = 1'b0,
  parameter realtime DELAY = 0.0
) (
  input  logic rst,
  input  logic set_g,
  input  logic clr_g,
  output logic q
);

  logic node;

  always_latch begin
    if (rst)
      node = INIT;
    else if (set_g || clr_g)
      node = set_g;
  end

  if (DELAY > 0.0) begin : g_delay
    assign #(DELAY) q = node;
  end else begin : g_nodelay
    assign q = node;
  end

endmodule
