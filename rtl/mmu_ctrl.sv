`timescale 1ns/1ps
// mmu_ctrl: timed controller for the memory-data-load cycle of a memory
// management unit that turns a 16-bit memory address into a 24-bit real
// address (8 bits from a segmentation register, 16 from an address
// comparator path).
//
// Handshakes: the processor requests with mdli and is acknowledged on mdlo;
// the segmentation register and the address comparator are started together
// by rao and bo and answer on rai and bi; the memory interface is requested on
// mslo and answers on msli. One load runs:
//   mdli rises -> rao, bo rise -> rai, bi rise -> mslo rises
//   -> rao, bo fall (rai, bi fall later) and msli rises -> mdlo rises
//   -> mslo falls (msli falls later) and mdli falls -> mdlo falls.
// The specification is the concurrent (reshuffled) one with persistence
// rules. Timing constraints (processor requests no faster than every 30 ns,
// memory access at least 30 ns, acknowledge resets 5..30 ns after the
// request resets, register 2..9 ns, comparator 2.5..13 ns, gates 0..1 ns)
// make 6 of the 15 output rules redundant, and rao and bo can share a gate.
//
// Gates (guard "=>" transition), ten literals:
//   mdli & msli           => mdlo rises     !mdli => mdlo falls
//   rai & bi              => mslo rises      mdlo => mslo falls
//   mdli & !mdlo & !mslo  => rao, bo rise    mslo => rao, bo fall
// These are the published timed guards; bo is a copy of rao because the
// two share one gate.
//
// Interface: rst (asynchronous, active high) clears all outputs; that is the
// initial marking, where the first event is mdli rising. Timing: each output
// follows its guards after GATE_DELAY (default 0; the bound is [0,1] ns);
// the environment must keep to the bounds above.
//
// Lint: each output is a latch (the generalized C-element), and the outputs
// feed each other's guards; both are intended in a clockless controller.
module mmu_ctrl #(
  parameter realtime GATE_DELAY = 0.0
) (
  input  logic rst,
  input  logic mdli,
  input  logic msli,
  input  logic rai,
  input  logic bi,
  output logic mdlo,
  output logic mslo,
  output logic rao,
  output logic bo
);

  logic rabo;

  gc_element #(.INIT(1'b0), .DELAY(GATE_DELAY)) u_mdlo (
    .rst  (rst),
    .set_g(mdli && msli),
    .clr_g(!mdli),
    .q    (mdlo)
  );

  gc_element #(.INIT(1'b0), .DELAY(GATE_DELAY)) u_mslo (
    .rst  (rst),
    .set_g(rai && bi),
    .clr_g(mdlo),
    .q    (mslo)
  );

  gc_element #(.INIT(1'b0), .DELAY(GATE_DELAY)) u_rabo (
    .rst  (rst),
    .set_g(mdli && !mdlo && !mslo),
    .clr_g(mslo),
    .q    (rabo)
  );

  assign rao = rabo;
  assign bo  = rabo;

endmodule
