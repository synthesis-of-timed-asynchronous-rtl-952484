`timescale 1ns/1ps
// tb_timed_async_top: end-to-end testbench of the whole design, at its
// default parameters.
//
// Three environments run at the same time, each inside the timing bounds its
// controller was designed for:
//   * SCSI: ack follows req and go follows rdy after [20,50].
//   * MMU: a processor model issues loads (mdli) no sooner than 30 ns after
//     the last one ended; segmentation-register and comparator models answer
//     rao / bo after [2,9] / [2.5,13] ns; a memory-interface model answers
//     mslo after an access time of at least 30 ns and withdraws its
//     acknowledge 5..30 ns after the request.
//   * DRAM: an arbiter/processor model issues refresh, write and read cycles
//     one at a time, in fundamental mode, with random addresses.
// Checks: every output transition of every controller happens only in a
// state its specification allows (its enabling transitions have happened);
// the DRAM controller's outputs after each burst; the DRAM address seen at
// the row strobe, the column strobe and during refresh; the refresh row
// advancing after every refresh. The run goes on until the refresh counter
// has wrapped around; the SCSI cycles, MMU loads, the three DRAM cycle
// kinds, the row-to-column address switch and the refresh counter wrap are
// each counted, and one that never happened is a failure.
module tb_timed_async_top;
  import timed_async_pkg::*;

  localparam int unsigned AW = 10;   // the top's default DRAM address width

  logic rst;
  logic scsi_ack, scsi_go, scsi_req, scsi_rdy, scsi_q;
  logic mmu_mdli, mmu_msli, mmu_rai, mmu_bi, mmu_mdlo, mmu_mslo, mmu_rao, mmu_bo;
  logic dram_asw, dram_asr, dram_dds, dram_rfreq;
  logic [AW-1:0] dram_row_addr, dram_col_addr, dram_addr, dram_refresh_addr;
  logic dram_ras, dram_cas, dram_we, dram_dtack, dram_selca, dram_rfip;

  timed_async_top dut (
    .rst(rst),
    .scsi_ack(scsi_ack), .scsi_go(scsi_go),
    .scsi_req(scsi_req), .scsi_rdy(scsi_rdy), .scsi_q(scsi_q),
    .mmu_mdli(mmu_mdli), .mmu_msli(mmu_msli), .mmu_rai(mmu_rai), .mmu_bi(mmu_bi),
    .mmu_mdlo(mmu_mdlo), .mmu_mslo(mmu_mslo), .mmu_rao(mmu_rao), .mmu_bo(mmu_bo),
    .dram_asw(dram_asw), .dram_asr(dram_asr), .dram_dds(dram_dds),
    .dram_rfreq(dram_rfreq),
    .dram_row_addr(dram_row_addr), .dram_col_addr(dram_col_addr),
    .dram_ras(dram_ras), .dram_cas(dram_cas), .dram_we(dram_we),
    .dram_dtack(dram_dtack), .dram_selca(dram_selca), .dram_rfip(dram_rfip),
    .dram_addr(dram_addr), .dram_refresh_addr(dram_refresh_addr)
  );

  int checks = 0;
  int failures = 0;
  bit live = 0;

  // mechanisms
  int n_scsi = 0, n_load = 0, n_refresh = 0, n_write = 0, n_read = 0;
  int n_colswitch = 0, n_wrap = 0;

  task automatic fail(string what);
    failures++;
    $display("%t FAIL: %s", $realtime, what);
  endtask

  task automatic rand_delay(int unsigned lo_ps, int unsigned hi_ps);
    #(real'($urandom_range(hi_ps, lo_ps)) / 1000.0);
  endtask

  // ------------------------------------------------------------- SCSI ----
  // environment
  always @(scsi_req) if (live) begin
    logic v;
    v = scsi_req;
    rand_delay(SCSI_ENV.min_ps, SCSI_ENV.max_ps);
    scsi_ack = v;
  end
  always @(scsi_rdy) if (live) begin
    logic v;
    v = scsi_rdy;
    rand_delay(SCSI_ENV.min_ps, SCSI_ENV.max_ps);
    scsi_go = v;
  end
  // each output transition only where the specification enables it. The
  // gates have zero delay, so a chain such as q rising -> req falling ->
  // rdy rising -> q falling settles in one time step; only the environment
  // inputs, which never move in zero time, are therefore checked at each
  // edge, and the edge counts are compared at the end.
  int scsi_edges [6];   // req fall/rise, rdy fall/rise, q fall/rise
  always @(negedge scsi_req) if (live) begin
    checks++; n_scsi++; scsi_edges[0]++;
    if (!scsi_ack) fail("SCSI req fell before ack rose");
  end
  always @(posedge scsi_req) if (live) begin
    checks++; scsi_edges[1]++;
    if (scsi_ack) fail("SCSI req rose before ack fell");
  end
  always @(negedge scsi_rdy) if (live) begin
    checks++; scsi_edges[2]++;
    if (!scsi_go) fail("SCSI rdy fell before go rose");
  end
  always @(posedge scsi_rdy) if (live) scsi_edges[3]++;
  always @(negedge scsi_q)   if (live) scsi_edges[4]++;
  always @(posedge scsi_q) if (live) begin
    checks++; scsi_edges[5]++;
    if (scsi_go) fail("SCSI q rose before go fell");
  end

  // -------------------------------------------------------------- MMU ----
  always @(mmu_rao) if (live) begin
    logic v;
    v = mmu_rao;
    rand_delay(MMU_REG.min_ps, MMU_REG.max_ps);
    mmu_rai = v;
  end
  always @(mmu_bo) if (live) begin
    logic v;
    v = mmu_bo;
    rand_delay(MMU_CMP.min_ps, MMU_CMP.max_ps);
    mmu_bi = v;
  end
  always @(mmu_mslo) if (live) begin
    logic v;
    v = mmu_mslo;
    if (v) rand_delay(MMU_ACC.min_ps, MMU_ACC.max_ps);
    else   rand_delay(MMU_ACKRST.min_ps, MMU_ACKRST.max_ps);
    mmu_msli = v;
  end
  // processor: request, wait for the acknowledge, withdraw, wait for release
  task automatic mmu_processor();
    forever begin
      rand_delay(MMU_REQ.min_ps, MMU_REQ.max_ps);
      mmu_mdli = 1;
      wait (mmu_mdlo);
      rand_delay(MMU_ACKRST.min_ps, MMU_ACKRST.max_ps);
      mmu_mdli = 0;
      wait (!mmu_mdlo);
    end
  endtask
  always @(posedge mmu_rao) if (live) begin
    checks++;
    if (!(mmu_mdli && !mmu_rai && mmu_bo)) fail("MMU rao rose early");
  end
  always @(posedge mmu_mslo) if (live) begin
    checks++;
    if (!(mmu_rai && mmu_bi && !mmu_msli)) fail("MMU mslo rose early");
  end
  always @(negedge mmu_rao) if (live) begin
    checks++;
    if (!(mmu_mslo && !mmu_bo)) fail("MMU rao fell early");
  end
  always @(posedge mmu_mdlo) if (live) begin
    checks++; n_load++;
    if (!mmu_msli) fail("MMU mdlo rose early");
  end
  always @(negedge mmu_mslo) if (live) begin
    checks++;
    if (!(mmu_mdlo && !mmu_rao && !mmu_bo)) fail("MMU mslo fell early");
  end
  always @(negedge mmu_mdlo) if (live) begin
    checks++;
    if (!(!mmu_mdli && !mmu_mslo)) fail("MMU mdlo fell early");
  end

  // ------------------------------------------------------------- DRAM ----
  function automatic logic [5:0] dram_outs();
    return {dram_ras, dram_cas, dram_we, dram_dtack, dram_selca, dram_rfip};
  endfunction

  task automatic expect_outs(logic [5:0] exp, string what);
    #0.01;
    checks++;
    if (dram_outs() !== exp)
      fail($sformatf("DRAM %s: outputs %b, expected %b", what, dram_outs(), exp));
  endtask

  task automatic expect_addr(logic [AW-1:0] exp, string what);
    checks++;
    if (dram_addr !== exp)
      fail($sformatf("DRAM %s: address %0d, expected %0d", what, dram_addr, exp));
  endtask

  logic [AW-1:0] ref_row;

  task automatic dram_refresh();
    realtime t0, hold;
    t0 = $realtime;
    dram_rfreq = 0;
    expect_outs(6'b111101, "refresh request");
    expect_addr(ref_row, "refresh row");
    wait (!dut.tap_c);
    expect_outs(6'b011101, "refresh row strobe");
    expect_addr(ref_row, "refresh row at ras");
    hold = real'($urandom_range(DRAM_RFLOW.max_ps, DRAM_RFLOW.min_ps)) / 1000.0;
    if ($realtime - t0 < hold) #(hold - ($realtime - t0));
    dram_rfreq = 1;
    wait (!dut.tap_b);
    expect_outs(6'b111100, "refresh end");
    if (ref_row == '1) n_wrap++;
    ref_row = ref_row + 1'b1;
    checks++;
    if (dram_refresh_addr !== ref_row) fail("DRAM refresh row did not advance");
    wait (dut.tap_a && dut.tap_b && dut.tap_c);
    n_refresh++;
    rand_delay(DRAM_RFGAP.min_ps, DRAM_RFGAP.max_ps);
  endtask

  task automatic dram_access(bit write);
    logic [AW-1:0] row, col;
    row = AW'($urandom);
    col = AW'($urandom);
    dram_row_addr = row;
    dram_col_addr = col;
    #1;
    if (write) begin
      dram_asw = 0;
      expect_outs(6'b011100, "write strobe");
    end else begin
      dram_asr = 0;
      rand_delay(0, 5000);
      dram_dds = 0;
      expect_outs(6'b011100, "read strobes");
    end
    expect_addr(row, "row address at ras");
    wait (!dut.tap_a);
    expect_outs(write ? 6'b010010 : 6'b011010, "tap a");
    expect_addr(col, "column address after selca");
    n_colswitch++;
    if (write) begin
      rand_delay(0, 30000);
      dram_dds = 0;
    end
    wait (!dut.tap_b && !dram_dds);
    expect_outs(write ? 6'b000010 : 6'b001010, "column strobe");
    expect_addr(col, "column address at cas");
    rand_delay(5000, 40000);
    if (write) dram_asw = 1; else dram_asr = 1;
    rand_delay(0, 3000);
    dram_dds = 1;
    expect_outs(6'b111100, "release");
    wait (dut.tap_a && dut.tap_b && dut.tap_c);
    if (write) n_write++; else n_read++;
    rand_delay(0, 40000);
  endtask

  task automatic dram_arbiter();
    // one of each kind first, then random, until the refresh row wraps
    int n = 0;
    while (n_wrap == 0) begin
      int kind;
      kind = (n < 3) ? n : int'($urandom_range(2, 0));
      // refreshes are made more frequent so that the counter wraps soon
      if (n >= 3 && $urandom_range(3, 0) != 0) kind = 0;
      case (kind)
        0: dram_refresh();
        1: dram_access(1'b1);
        default: dram_access(1'b0);
      endcase
      n++;
    end
  endtask

  // ------------------------------------------------------------- main ----
  initial begin
    foreach (scsi_edges[e]) scsi_edges[e] = 0;
    rst = 1;
    scsi_ack = 1; scsi_go = 0;
    mmu_mdli = 0; mmu_msli = 0; mmu_rai = 0; mmu_bi = 0;
    dram_asw = 1; dram_asr = 1; dram_dds = 1; dram_rfreq = 1;
    dram_row_addr = '0; dram_col_addr = '0;
    ref_row = '0;
    #50;
    checks++;
    if ({scsi_req, scsi_rdy, scsi_q} !== 3'b101 || {mmu_mdlo, mmu_mslo, mmu_rao, mmu_bo} !== 4'b0000)
      fail("reset state");
    expect_outs(6'b111100, "reset");
    live = 1;
    rst = 0;
    fork
      mmu_processor();
    join_none
    dram_arbiter();
    #500;
    live = 0;
    #200;
    // each SCSI output moves once each way per cycle (the last cycle may
    // have started: req fallen, rdy risen, q fallen)
    for (int e = 0; e < 6; e++) begin
      int d;
      d = scsi_edges[e] - scsi_edges[1];
      checks++;
      if (d < 0 || d > 1) fail($sformatf("SCSI edge %0d count %0d against %0d", e, scsi_edges[e], scsi_edges[1]));
    end
    checks += 7;
    if (n_scsi == 0)      fail("no SCSI cycle");
    if (n_load == 0)      fail("no MMU load");
    if (n_refresh == 0)   fail("no DRAM refresh");
    if (n_write == 0)     fail("no DRAM write");
    if (n_read == 0)      fail("no DRAM read");
    if (n_colswitch == 0) fail("no row-to-column switch");
    if (n_wrap == 0)      fail("refresh counter never wrapped");
    $display("scsi_cycles=%0d mmu_loads=%0d refresh=%0d write=%0d read=%0d col_switch=%0d wraps=%0d",
             n_scsi, n_load, n_refresh, n_write, n_read, n_colswitch, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
