`timescale 1ns/1ps
// tb_dram_ctrl: self-checking testbench of the timed DRAM controller.
//
// The controller runs with its delay-line model (taps a, b from ras, tap c
// from rfreq). The testbench acts as the arbiter and the processor: it issues
// a random sequence of refresh, write and read cycles, one at a time, with
// random delays, and keeps to fundamental mode (each input burst only after
// the outputs of the previous burst). After every burst it compares all six
// outputs with the values the cycle's specification gives for that point:
//   refresh: rfreq low -> rfip high; c low -> ras low;
//            b low and rfreq high -> rfip low, ras high; taps high -> idle.
//   write:   asw low -> ras low; a low -> dtack, we low, selca high;
//            b and dds low -> cas low; asw, dds high -> all released.
//   read:    asr, dds low -> ras low; a low -> dtack low, selca high;
//            b low -> cas low; asr, dds high -> all released.
// It also counts every output transition in each cycle (a glitch or a
// misfire changes the count), checks that the row-to-column time
// (ras low to cas low) is at least the b tap delay, that no gate has both
// guards true, and that each cycle type ran. Every gate runs with a 2 ns
// delay, the upper bound of the unmarked rules (the zero-delay case is
// covered by the end-to-end testbench), and outputs are compared two gate
// delays after each burst. The delay line runs at the corner of its bounds
// where tap a is slowest (20 ns) and tap b fastest (25 ns), the tightest case
// for the rules that the timing analysis removed (a falling before ras and
// rfip change), with tap c at 30 ns.
module tb_dram_ctrl;
  import timed_async_pkg::*;

  localparam int NCYC = 300;
  localparam realtime GATE_DELAY = 2.0;  // upper bound of a gate's delay

  typedef enum logic [1:0] {CYC_REFRESH, CYC_WRITE, CYC_READ} cycle_e;

  logic rst;
  logic asw, asr, dds, rfreq;
  logic a, b, c;
  logic ras, cas, we, dtack, selca, rfip;

  // the delay line at the corner that leaves a and b closest together
  dram_delay #(
    .A_DELAY(real'(DRAM_A.max_ps) / 1000.0),
    .B_DELAY(real'(DRAM_B.min_ps) / 1000.0),
    .C_DELAY(real'(DRAM_C.max_ps) / 1000.0)
  ) u_delay (.ras(ras), .rfreq(rfreq), .a(a), .b(b), .c(c));

  dram_ctrl #(.GATE_DELAY(GATE_DELAY)) dut (
    .rst(rst), .asw(asw), .asr(asr), .dds(dds), .rfreq(rfreq),
    .a(a), .b(b), .c(c),
    .ras(ras), .cas(cas), .we(we), .dtack(dtack), .selca(selca), .rfip(rfip)
  );

  int checks = 0;
  int failures = 0;
  int ncyc [3];
  int tr [6];            // transitions of ras, cas, we, dtack, selca, rfip
  realtime t_ras_fall;
  bit monitor_on = 0;

  always @(ras)   if (monitor_on) begin tr[0]++; if (!ras) t_ras_fall = $realtime; end
  always @(cas)   if (monitor_on) tr[1]++;
  always @(we)    if (monitor_on) tr[2]++;
  always @(dtack) if (monitor_on) tr[3]++;
  always @(selca) if (monitor_on) tr[4]++;
  always @(rfip)  if (monitor_on) tr[5]++;

  // the active-low outputs and the two active-high ones, in one vector
  function automatic logic [5:0] outs();
    return {ras, cas, we, dtack, selca, rfip};
  endfunction

  task automatic expect_outs(logic [5:0] exp, string what);
    #(2.0 * GATE_DELAY + 0.01);
    checks++;
    if (outs() !== exp) begin
      failures++;
      $display("%t FAIL: %s: ras,cas,we,dtack,selca,rfip = %b, expected %b",
               $realtime, what, outs(), exp);
    end
  endtask

  task automatic expect_count(int exp [6], string what);
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (tr[i] != exp[i]) begin
        failures++;
        $display("%t FAIL: %s: output %0d made %0d transitions, expected %0d",
                 $realtime, what, i, tr[i], exp[i]);
      end
      tr[i] = 0;
    end
  endtask

  task automatic rand_delay(int unsigned lo_ps, int unsigned hi_ps);
    #(real'($urandom_range(hi_ps, lo_ps)) / 1000.0);
  endtask

  task automatic wait_idle_taps();
    wait (a && b && c);
  endtask

  task automatic do_refresh();
    realtime t0;
    int exp [6] = '{2, 0, 0, 0, 0, 2};
    t0 = $realtime;
    rfreq = 0;
    expect_outs(6'b111101, "refresh request");
    wait (!c);
    expect_outs(6'b011101, "refresh row strobe");
    // hold the request for [55,65] ns from its start
    begin
      realtime hold;
      hold = real'($urandom_range(DRAM_RFLOW.max_ps, DRAM_RFLOW.min_ps)) / 1000.0;
      if ($realtime - t0 < hold) #(hold - ($realtime - t0));
    end
    rfreq = 1;
    wait (!b);
    expect_outs(6'b111100, "refresh end");
    wait_idle_taps();
    expect_outs(6'b111100, "refresh idle");
    expect_count(exp, "refresh");
    // next request no sooner than 50 ns after c rises
    rand_delay(DRAM_RFGAP.min_ps, DRAM_RFGAP.max_ps);
  endtask

  task automatic do_access(bit write);
    int exp [6];
    if (write) exp = '{2, 2, 2, 2, 2, 0};
    else       exp = '{2, 2, 0, 2, 2, 0};
    if (write) begin
      asw = 0;
      expect_outs(6'b011100, "write strobe");
    end else begin
      asr = 0;
      rand_delay(0, 5000);
      dds = 0;
      expect_outs(6'b011100, "read strobes");
    end
    wait (!a);
    expect_outs(write ? 6'b010010 : 6'b011010, "tap a");
    if (write) begin
      // the processor drives its data strobe some time after the acknowledge
      rand_delay(0, 30000);
      dds = 0;
    end
    wait (!b && !dds);
    expect_outs(write ? 6'b000010 : 6'b001010, "column strobe");
    checks++;
    if ($realtime - t_ras_fall < DRAM_B.min_ps / 1000.0) begin
      failures++;
      $display("%t FAIL: row-to-column time %0t", $realtime, $realtime - t_ras_fall);
    end
    // the processor ends the bus cycle
    rand_delay(5000, 40000);
    if (write) asw = 1; else asr = 1;
    rand_delay(0, 3000);
    dds = 1;
    expect_outs(6'b111100, "release");
    wait_idle_taps();
    expect_outs(6'b111100, write ? "write idle" : "read idle");
    expect_count(exp, write ? "write" : "read");
    rand_delay(0, 40000);
  endtask

  // no gate may have its pull-up and pull-down guards true together
  initial begin
    #20;
    forever begin
      #0.5;
      checks++;
      if ((dut.u_ras.set_g && dut.u_ras.clr_g) || (dut.u_cas.set_g && dut.u_cas.clr_g) ||
          (dut.u_we.set_g && dut.u_we.clr_g) || (dut.u_dtack.set_g && dut.u_dtack.clr_g) ||
          (dut.u_rfip.set_g && dut.u_rfip.clr_g)) #0.001;
      if ((dut.u_ras.set_g && dut.u_ras.clr_g) || (dut.u_cas.set_g && dut.u_cas.clr_g) ||
          (dut.u_we.set_g && dut.u_we.clr_g) || (dut.u_dtack.set_g && dut.u_dtack.clr_g) ||
          (dut.u_rfip.set_g && dut.u_rfip.clr_g)) begin
        failures++;
        $display("%t FAIL: interference in a gate", $realtime);
      end
    end
  end

  initial begin
    cycle_e kind;
    foreach (tr[i]) tr[i] = 0;
    foreach (ncyc[i]) ncyc[i] = 0;
    t_ras_fall = 0;
    rst = 1; asw = 1; asr = 1; dds = 1; rfreq = 1;
    #50;                      // let the delay line settle to idle
    expect_outs(6'b111100, "reset");
    rst = 0;
    #1;
    expect_outs(6'b111100, "idle after reset");
    monitor_on = 1;
    for (int n = 0; n < NCYC; n++) begin
      // the first three cycles are one of each kind, then random
      kind = (n < 3) ? cycle_e'(n) : cycle_e'($urandom_range(2, 0));
      ncyc[kind]++;
      case (kind)
        CYC_REFRESH: do_refresh();
        CYC_WRITE:   do_access(1'b1);
        default:     do_access(1'b0);
      endcase
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (ncyc[k] == 0) failures++;
    end
    $display("refresh=%0d write=%0d read=%0d", ncyc[0], ncyc[1], ncyc[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(NCYC * 400.0 + 1000.0);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
