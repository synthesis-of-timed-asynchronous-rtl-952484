`timescale 1ns/1ps
// scsi_ctrl: timed SCSI protocol controller.
//
// The controller handshakes with two environment signals, ack and go, and
// drives three outputs, req, rdy and q. One cycle of its specification
// (a cyclic constraint graph) is:
//   req falls -> ack falls and rdy rises;  rdy rises -> go rises and q falls;
//   go rises -> rdy falls;  ack falls and rdy falls -> req rises;
//   rdy falls -> go falls;  go falls and req rises -> q rises;
//   ack rises and q rises -> req falls (next cycle).
// The environment answers within [20,50] time units, the controller within
// [0,5]. With those bounds q always falls at least 15 units before rdy can
// fall, so the rule "q falls -> rdy falls" is redundant and q is left out of
// the rdy pull-down guard. The same bounds make the state in which ack=0,
// rdy=0, req=0 and q=1 unreachable, so the req pull-up needs no q.
//
// Each output is one generalized C-element (guard "=>" transition):
//   !ack & !rdy => req rises       ack & q  => req falls
//   !req &  q   => rdy rises       go       => rdy falls
//    req & !go  => q rises         rdy      => q falls
// The req gate and the removal of q from the rdy pull-down follow the
// published timed implementation. The q gate comes from the specification's
// rules, and the context signal q of rdy rising from the published
// analysis of the states where rdy must not rise. Ten literals in total.
//
// Interface: rst (asynchronous, active high) puts the outputs in the state
// reached just before req falls: req=1, rdy=0, q=1 (with ack=1, go=0 from
// the environment). Timing: each output follows its guards after
// its own delay, REQ_DELAY, RDY_DELAY or Q_DELAY (default 0; the
// specification allows [0,5] for each); correct operation
// needs the environment to keep to its [20,50] bounds.
//
// Lint: req, rdy and q feed each other's guards (req -> rdy -> q -> req), so
// tools report circular combinational logic and three latches. That feedback
// through state-holding gates is the controller itself and stands as is.
module scsi_ctrl #(
  parameter realtime REQ_DELAY = 0.0,
  parameter realtime RDY_DELAY = 0.0,
  parameter realtime Q_DELAY   = 0.0
) (
  input  logic rst,
  input  logic ack,
  input  logic go,
  output logic req,
  output logic rdy,
  output logic q
);

  gc_element #(.INIT(1'b1), .DELAY(REQ_DELAY)) u_req (
    .rst  (rst),
    .set_g(!ack && !rdy),
    .clr_g(ack && q),
    .q    (req)
  );

  gc_element #(.INIT(1'b0), .DELAY(RDY_DELAY)) u_rdy (
    .rst  (rst),
    .set_g(!req && q),
    .clr_g(go),
    .q    (rdy)
  );

  gc_element #(.INIT(1'b1), .DELAY(Q_DELAY)) u_q (
    .rst  (rst),
    .set_g(req && !go),
    .clr_g(rdy),
    .q    (q)
  );

endmodule
