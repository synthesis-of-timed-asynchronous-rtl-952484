`timescale 1ns/1ps
// timed_async_top: the three timed asynchronous controllers side by side.
//
//   * SCSI protocol controller (scsi_ctrl): environment inputs ack, go;
//     outputs req, rdy, q.
//   * MMU memory-data-load controller (mmu_ctrl): handshakes with the
//     processor (mdli/mdlo), the segmentation register (rao/rai), the
//     address comparator (bo/bi) and the memory interface (mslo/msli).
//   * DRAM controller subsystem: dram_ctrl, its delay line dram_delay
//     (taps a, b from ras, tap c from rfreq) and the address path
//     dram_addr_path (refresh counter and address multiplexers). The
//     arbiter that would produce asw, asr, dds and rfreq from the
//     processor bus and the refresh clock is outside; its outputs are
//     ports here.
// The controllers share only the reset. Everything is clockless: outputs
// react to input transitions, and correctness relies on the environment
// keeping to the timing bounds listed in timed_async_pkg. The grouping into
// one top is this design's; each controller matches its own specification.
//
// Lint: the SCSI outputs, and ras through the delay line, are reported as
// circular combinational logic, and the controllers' gates as latches. These
// loops are the asynchronous feedback of the controllers and stand as is.
module timed_async_top #(
  parameter int unsigned DRAM_ADDR_W = 10
) (
  input  logic                   rst,
  // SCSI protocol controller
  input  logic                   scsi_ack,
  input  logic                   scsi_go,
  output logic                   scsi_req,
  output logic                   scsi_rdy,
  output logic                   scsi_q,
  // MMU controller
  input  logic                   mmu_mdli,
  input  logic                   mmu_msli,
  input  logic                   mmu_rai,
  input  logic                   mmu_bi,
  output logic                   mmu_mdlo,
  output logic                   mmu_mslo,
  output logic                   mmu_rao,
  output logic                   mmu_bo,
  // DRAM controller: from the arbiter
  input  logic                   dram_asw,
  input  logic                   dram_asr,
  input  logic                   dram_dds,
  input  logic                   dram_rfreq,
  input  logic [DRAM_ADDR_W-1:0] dram_row_addr,
  input  logic [DRAM_ADDR_W-1:0] dram_col_addr,
  // DRAM controller: to the DRAM array and the processor
  output logic                   dram_ras,
  output logic                   dram_cas,
  output logic                   dram_we,
  output logic                   dram_dtack,
  output logic                   dram_selca,
  output logic                   dram_rfip,
  output logic [DRAM_ADDR_W-1:0] dram_addr,
  output logic [DRAM_ADDR_W-1:0] dram_refresh_addr
);

  scsi_ctrl u_scsi (
    .rst(rst),
    .ack(scsi_ack),
    .go (scsi_go),
    .req(scsi_req),
    .rdy(scsi_rdy),
    .q  (scsi_q)
  );

  mmu_ctrl u_mmu (
    .rst (rst),
    .mdli(mmu_mdli),
    .msli(mmu_msli),
    .rai (mmu_rai),
    .bi  (mmu_bi),
    .mdlo(mmu_mdlo),
    .mslo(mmu_mslo),
    .rao (mmu_rao),
    .bo  (mmu_bo)
  );

  logic tap_a, tap_b, tap_c;

  dram_delay u_delay (
    .ras  (dram_ras),
    .rfreq(dram_rfreq),
    .a    (tap_a),
    .b    (tap_b),
    .c    (tap_c)
  );

  dram_ctrl u_dram (
    .rst  (rst),
    .asw  (dram_asw),
    .asr  (dram_asr),
    .dds  (dram_dds),
    .rfreq(dram_rfreq),
    .a    (tap_a),
    .b    (tap_b),
    .c    (tap_c),
    .ras  (dram_ras),
    .cas  (dram_cas),
    .we   (dram_we),
    .dtack(dram_dtack),
    .selca(dram_selca),
    .rfip (dram_rfip)
  );

  dram_addr_path #(.ADDR_W(DRAM_ADDR_W)) u_addr (
    .rst         (rst),
    .row_addr    (dram_row_addr),
    .col_addr    (dram_col_addr),
    .selca       (dram_selca),
    .rfip        (dram_rfip),
    .dram_addr   (dram_addr),
    .refresh_addr(dram_refresh_addr)
  );

endmodule
