`timescale 1ns/1ps
// tb_mmu_ctrl: self-checking testbench of the timed MMU controller
// (memory-data-load cycle).
//
// The testbench plays the processor (mdli), the memory interface (msli), the
// segmentation register (rai) and the address comparator (bi). Each answers
// after a random delay inside its bound: a new request no sooner than 30 ns
// after the last acknowledge was withdrawn, memory access at least 30 ns,
// acknowledges withdrawn 5..30 ns after their requests, register 2..9 ns,
// comparator 2.5..13 ns; a quarter of the delays sit at each end of their
// bound. A monitor holds the controller to the full
// specification with persistence rules (15 rules on output transitions,
// listed below), although the implementation only realises 9 of them.
// Every gate runs with the largest delay allowed, 1 ns (the zero-delay case
// is covered by the end-to-end testbench). Checks:
//   * every transition that occurs must be enabled by the specification;
//   * every output transition occurs within 1 ns of being enabled;
//   * no gate has its pull-up and pull-down guards true together;
//   * rao and bo always move together (they share a gate);
//   * the load latency, mdli rising to mdlo rising, lies within what the
//     bounds allow: at least 32.5 ns, at most 13 + 80 + 3 ns;
//   * every transition occurs once per load.
module tb_mmu_ctrl;
  import timed_async_pkg::*;

  localparam int NCYC  = 200;
  localparam int NSIG  = 8;          // mdli, msli, rai, bi, mdlo, mslo, rao, bo
  localparam int NEV   = 2 * NSIG;   // event 2*s+1 = rise, 2*s = fall
  localparam int NRULE = 23;
  localparam realtime OUT_MAX = 1.0;

  // signal numbers
  localparam int S_MDLI = 0, S_MSLI = 1, S_RAI = 2, S_BI = 3, S_MDLO = 4, S_MSLO = 5, S_RAO = 6, S_BO = 7;
  function automatic int rise(int s); return 2 * s + 1; endfunction
  function automatic int fall(int s); return 2 * s;     endfunction

  typedef struct {
    int en;    // enabling event
    int ed;    // enabled event
    int mark;  // initial marking (occurrence-index offset)
  } rule_t;

  rule_t rules [NRULE];
  initial begin
    // environment rules
    rules[0]  = '{fall(S_MDLO), rise(S_MDLI), 1};
    rules[1]  = '{rise(S_RAO),  rise(S_RAI),  0};
    rules[2]  = '{rise(S_BO),   rise(S_BI),   0};
    rules[3]  = '{fall(S_RAO),  fall(S_RAI),  0};
    rules[4]  = '{fall(S_BO),   fall(S_BI),   0};
    rules[5]  = '{rise(S_MSLO), rise(S_MSLI), 0};
    rules[6]  = '{fall(S_MSLO), fall(S_MSLI), 0};
    rules[7]  = '{rise(S_MDLO), fall(S_MDLI), 0};
    rules[8]  = '{rise(S_MDLI), rise(S_RAO),  0};
    // output rules
    rules[9]  = '{fall(S_RAI),  rise(S_RAO),  1};
    rules[10] = '{rise(S_MDLI), rise(S_BO),   0};
    rules[11] = '{fall(S_BI),   rise(S_BO),   1};
    rules[12] = '{rise(S_RAI),  rise(S_MSLO), 0};
    rules[13] = '{rise(S_BI),   rise(S_MSLO), 0};
    rules[14] = '{fall(S_MSLI), rise(S_MSLO), 1};
    rules[15] = '{rise(S_MSLO), fall(S_RAO),  0};
    rules[16] = '{rise(S_MSLO), fall(S_BO),   0};
    rules[17] = '{rise(S_MSLI), rise(S_MDLO), 0};
    rules[18] = '{fall(S_MDLI), fall(S_MDLO), 0};
    rules[19] = '{fall(S_MSLO), fall(S_MDLO), 0};
    rules[20] = '{rise(S_MDLO), fall(S_MSLO), 0};
    rules[21] = '{fall(S_RAO),  fall(S_MSLO), 0};
    rules[22] = '{fall(S_BO),   fall(S_MSLO), 0};
  end

  logic rst;
  logic mdli, msli, rai, bi;
  logic mdlo, mslo, rao, bo;

  mmu_ctrl #(.GATE_DELAY(OUT_MAX)) dut (
    .rst(rst), .mdli(mdli), .msli(msli), .rai(rai), .bi(bi),
    .mdlo(mdlo), .mslo(mslo), .rao(rao), .bo(bo)
  );

  int checks = 0;
  int failures = 0;
  int cnt [NEV];
  realtime en_time [NEV];
  logic    en_flag [NEV];
  logic [NSIG-1:0] prev;
  bit running = 0;
  event upd;
  realtime t_req;
  int lat_samples = 0;
  realtime lat_min = 1.0e9, lat_max = 0.0;

  function automatic logic [NSIG-1:0] sigs();
    return {bo, rao, mslo, mdlo, bi, rai, msli, mdli};
  endfunction

  function automatic bit is_output(int s);
    return s >= S_MDLO;
  endfunction

  function automatic bit enabled(int ev);
    for (int r = 0; r < NRULE; r++)
      if (rules[r].ed == ev && cnt[rules[r].en] < cnt[ev] + 1 - rules[r].mark)
        return 0;
    return 1;
  endfunction

  // next event of a signal: its opposite transition
  function automatic int next_ev(int s, logic [NSIG-1:0] v);
    return v[s] ? fall(s) : rise(s);
  endfunction

  task automatic refresh_enables();
    for (int s = 0; s < NSIG; s++) begin
      int ev;
      ev = next_ev(s, prev);
      for (int d = 0; d < 2; d++) begin
        int e;
        e = 2 * s + d;
        if (e == ev && enabled(e)) begin
          if (!en_flag[e]) begin en_flag[e] = 1; en_time[e] = $realtime; end
        end else en_flag[e] = 0;
      end
    end
  endtask

  // monitor: account for every change of the eight signals
  always @(mdli, msli, rai, bi, mdlo, mslo, rao, bo) begin
    if (running) begin
      logic [NSIG-1:0] now, diff;
      bit progress;
      now  = sigs();
      diff = now ^ prev;
      // several transitions may show up in one step: take them in an
      // order in which each is enabled
      do begin
        progress = 0;
        for (int s = 0; s < NSIG; s++) begin
          if (diff[s]) begin
            int ev;
            ev = next_ev(s, prev);
            if (enabled(ev)) begin
              checks++;
              if (is_output(s)) begin
                checks++;
                if (!en_flag[ev] || $realtime - en_time[ev] > OUT_MAX + 0.0005) begin
                  failures++;
                  $display("%t FAIL: output event %0d late", $realtime, ev);
                end
              end
              if (ev == rise(S_MDLI)) t_req = $realtime;
              if (ev == rise(S_MDLO)) begin
                realtime lat;
                lat = $realtime - t_req;
                checks++;
                lat_samples++;
                if (lat < lat_min) lat_min = lat;
                if (lat > lat_max) lat_max = lat;
                if (lat < 32.5 || lat > 96.0) begin
                  failures++;
                  $display("%t FAIL: load latency %0t", $realtime, lat);
                end
              end
              cnt[ev]++;
              prev[s] = now[s];
              diff[s] = 0;
              progress = 1;
              refresh_enables();
            end
          end
        end
      end while (progress && diff != 0);
      if (diff != 0) begin
        checks++;
        failures++;
        $display("%t FAIL: transition(s) %b not enabled by the specification", $realtime, diff);
        prev = now;
        refresh_enables();
      end
      ->upd;
    end
  end

  // outputs may not stay enabled past their bound; guards never collide
  initial begin
    wait (running);
    forever begin
      #0.5;
      for (int e = 2 * S_MDLO; e < NEV; e++)
        if (en_flag[e] && $realtime - en_time[e] > OUT_MAX + 0.5) begin
          failures++;
          $display("%t FAIL: output event %0d enabled but not firing", $realtime, e);
          en_flag[e] = 0;
        end
      checks++;
      // a guard pair caught true in the same step as an input change is
      // re-sampled 1 ps later; only a lasting collision is a failure
      if ((dut.u_mdlo.set_g && dut.u_mdlo.clr_g) || (dut.u_mslo.set_g && dut.u_mslo.clr_g) ||
          (dut.u_rabo.set_g && dut.u_rabo.clr_g) || (rao != bo)) #0.001;
      if ((dut.u_mdlo.set_g && dut.u_mdlo.clr_g) || (dut.u_mslo.set_g && dut.u_mslo.clr_g) ||
          (dut.u_rabo.set_g && dut.u_rabo.clr_g) || (rao != bo)) begin
        failures++;
        $display("%t FAIL: interference in a gate, or rao and bo apart %b", $realtime, sigs());
      end
    end
  end

  // environment: each input answers after a delay inside its bound
  function automatic bound_t env_bound(int ev);
    case (ev)
      2 * S_MDLI + 1: return MMU_REQ;
      2 * S_MSLI + 1: return MMU_ACC;
      2 * S_MDLI, 2 * S_MSLI: return MMU_ACKRST;
      2 * S_RAI, 2 * S_RAI + 1: return MMU_REG;
      default: return MMU_CMP;
    endcase
  endfunction

  task automatic env(int s, ref logic sig);
    forever begin
      int ev;
      ev = next_ev(s, prev);
      if (cnt[ev] >= NCYC) break;
      while (!enabled(ev)) @(upd);
      begin
        bound_t bd;
        bd = env_bound(ev);
        // a quarter of the time the lower end, a quarter the upper end
        case ($urandom_range(3, 0))
          0:       #(real'(bd.min_ps) / 1000.0);
          1:       #(real'(bd.max_ps) / 1000.0);
          default: #(real'($urandom_range(bd.max_ps, bd.min_ps)) / 1000.0);
        endcase
      end
      sig = ~sig;
      @(upd);
    end
  endtask

  initial begin
    foreach (cnt[i]) begin cnt[i] = 0; en_flag[i] = 0; en_time[i] = 0; end
    rst = 1; mdli = 0; msli = 0; rai = 0; bi = 0;
    #10;
    checks++;
    if ({bo, rao, mslo, mdlo} != 4'b0000) begin
      failures++;
      $display("FAIL: reset state %b", {bo, rao, mslo, mdlo});
    end
    prev = sigs();
    running = 1;
    refresh_enables();
    rst = 0;
    fork
      env(S_MDLI, mdli);
      env(S_MSLI, msli);
      env(S_RAI, rai);
      env(S_BI, bi);
    join_none
    wait (cnt[fall(S_MSLI)] >= NCYC && cnt[fall(S_MDLO)] >= NCYC);
    #100;
    // every transition once per load
    for (int e = 0; e < NEV; e++) begin
      checks++;
      if (cnt[e] != NCYC) begin
        failures++;
        $display("FAIL: event %0d occurred %0d times, expected %0d", e, cnt[e], NCYC);
      end
    end
    checks++;
    if (lat_samples != NCYC) failures++;
    $display("loads=%0d latency min=%0t max=%0t", cnt[rise(S_MDLO)], lat_min, lat_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(NCYC * 300.0 + 1000.0);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
