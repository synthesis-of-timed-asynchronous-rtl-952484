`timescale 1ns/1ps
// dram_ctrl: timed DRAM controller between a synchronous processor bus and a
// DRAM array, with refresh, write and read cycles.
//
// Inputs come from an arbiter (asw and asr: address strobe of a write or a
// read, dds: data strobe, rfreq: refresh request, all active low) and from a
// delay line (a, b: ras delayed by [10,20] and [25,35] ns; c: rfreq delayed
// by [20,30] ns). Outputs ras, cas, we and dtack are active low, rfip
// (refresh in progress) and selca (select column address) active high.
// Cycles (input burst / output burst), each returning to the idle state:
//   refresh: rfreq falls / rfip rises; c falls / ras falls;
//            a, b fall and rfreq rises / rfip falls, ras rises; a, b, c rise.
//   write:   asw falls / ras falls; a falls / dtack, we fall, selca rises;
//            b, dds fall / cas falls; asw, dds rise / ras, cas, dtack, we
//            rise, selca falls; a, b rise.
//   read:    asr, dds fall / ras falls; a falls / dtack falls, selca rises;
//            b falls / cas falls; asr, dds rise / ras, cas, dtack rise,
//            selca falls; a, b rise.
// Timing analysis of the three cycles, unrolled into one long cycle, shows
// the rules from a to ras and to rfip redundant, so a appears in neither gate.
//
// Gates (pull-up guard "=>" rise, pull-down guard "=>" fall):
//   rfip : !rfreq                              | rfreq & !b
//   we   : asw & dds                           | !asw & !a
//   ras  : rfreq & !b & dtack | asw&dds&asr&c  | !rfreq & !c | !asw | !asr & !dds
//   cas  : asw & dds & asr                     | !b & (!asr | !asw & !dds)
//   dtack: asw & dds & asr                     | !a & (!asw | !asr)
//   selca = !dtack (shares the dtack gate through an inverter)
// These guards follow the published complex-gate implementation; where its
// cas gate drawings disagree on the polarity of asr in the pull-down, the
// version that lets cas fall in a read cycle (!asr) is used.
//
// Interface: rst (asynchronous, active high) sets the idle state: ras, cas,
// we, dtack high, rfip and selca low. Timing: GATE_DELAY (default 0; the
// unmarked rules allow [0,2] ns) from inputs to outputs; the arbiter must present one cycle at a time, in fundamental mode
// (inputs of the next burst only after the outputs of the last one).
//
// Lint: each of the five gates is a latch, and the outputs feed back into
// the guards directly (dtack into ras) and through the delay line (ras into
// a and b); both are intended in a clockless controller.
module dram_ctrl #(
  parameter realtime GATE_DELAY = 0.0
) (
  input  logic rst,
  input  logic asw,
  input  logic asr,
  input  logic dds,
  input  logic rfreq,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic ras,
  output logic cas,
  output logic we,
  output logic dtack,
  output logic selca,
  output logic rfip
);

  logic idle_strobes;  // asw, asr and dds all released
  assign idle_strobes = asw && asr && dds;

  gc_element #(.INIT(1'b0), .DELAY(GATE_DELAY)) u_rfip (
    .rst  (rst),
    .set_g(!rfreq),
    .clr_g(rfreq && !b),
    .q    (rfip)
  );

  gc_element #(.INIT(1'b1), .DELAY(GATE_DELAY)) u_we (
    .rst  (rst),
    .set_g(asw && dds),
    .clr_g(!asw && !a),
    .q    (we)
  );

  gc_element #(.INIT(1'b1), .DELAY(GATE_DELAY)) u_ras (
    .rst  (rst),
    .set_g((rfreq && !b && dtack) || (idle_strobes && c)),
    .clr_g((!rfreq && !c) || !asw || (!asr && !dds)),
    .q    (ras)
  );

  gc_element #(.INIT(1'b1), .DELAY(GATE_DELAY)) u_cas (
    .rst  (rst),
    .set_g(idle_strobes),
    .clr_g(!b && (!asr || (!asw && !dds))),
    .q    (cas)
  );

  gc_element #(.INIT(1'b1), .DELAY(GATE_DELAY)) u_dtack (
    .rst  (rst),
    .set_g(idle_strobes),
    .clr_g(!a && (!asw || !asr)),
    .q    (dtack)
  );

  assign selca = !dtack;

endmodule
