`timescale 1ns/1ps
// tb_scsi_ctrl: self-checking testbench of the timed SCSI protocol controller.
//
// The testbench plays the environment: ack follows req and go follows rdy,
// each after a random delay inside the environment bound [20,50]. A monitor
// holds the controller to its full specification, written below as a list
// of rules (enabling event, enabled event, initial marking), including the
// rule "q falls -> rdy falls" that the implementation leaves out. The gates
// run with different delays inside their [0,5] bound: rdy 0, req 2.5, q 5.
// That is the case where q falls latest relative to rdy (the zero-delay case
// is covered by the end-to-end testbench). Environment delays favour the ends
// of their bound. Checks:
//   * every transition that occurs must be enabled: for its i-th occurrence,
//     every rule into it must have seen occurrence i - marking of its
//     enabling event;
//   * every output transition must occur within 5 units of becoming enabled,
//     and none may stay enabled longer;
//   * the pull-up and pull-down guards of a gate are never true together;
//   * the time from q falling to rdy falling lies in [15,55], the bound that
//     makes the left-out rule redundant, and comes within 0.5 of 15;
//   * after the run every transition has occurred the same number of times;
//   * every state passed through, (ack,go,req,rdy,q), is one of the 16 states
//     that remain reachable under the timing bounds, and all 16 are reached
//     (without the bounds four more would be: 00001, 00011, 10111, 01011).
module tb_scsi_ctrl;
  import timed_async_pkg::*;

  localparam int NCYC  = 200;
  localparam int NSIG  = 5;          // ack, go, req, rdy, q
  localparam int NEV   = 2 * NSIG;   // event 2*s+1 = rise, 2*s = fall
  localparam int NRULE = 14;
  localparam realtime OUT_MAX = 5.0;
  // gate delays inside the [0,5] bound: rdy fast and q slow bring the
  // q-to-rdy separation down to its bound of 15; req in the middle
  localparam realtime REQ_DELAY = 2.5;
  localparam realtime RDY_DELAY = 0.0;
  localparam realtime Q_DELAY   = 5.0;

  // signal numbers
  localparam int S_ACK = 0, S_GO = 1, S_REQ = 2, S_RDY = 3, S_Q = 4;
  function automatic int rise(int s); return 2 * s + 1; endfunction
  function automatic int fall(int s); return 2 * s;     endfunction

  typedef struct {
    int en;    // enabling event
    int ed;    // enabled event
    int mark;  // initial marking (occurrence-index offset)
  } rule_t;

  rule_t rules [NRULE];
  initial begin
    rules[0]  = '{fall(S_REQ), fall(S_ACK), 0};
    rules[1]  = '{fall(S_REQ), rise(S_RDY), 0};
    rules[2]  = '{rise(S_RDY), rise(S_GO),  0};
    rules[3]  = '{rise(S_RDY), fall(S_Q),   0};
    rules[4]  = '{rise(S_GO),  fall(S_RDY), 0};
    rules[5]  = '{fall(S_Q),   fall(S_RDY), 0};
    rules[6]  = '{fall(S_ACK), rise(S_REQ), 0};
    rules[7]  = '{fall(S_RDY), rise(S_REQ), 0};
    rules[8]  = '{fall(S_RDY), fall(S_GO),  0};
    rules[9]  = '{fall(S_GO),  rise(S_Q),   0};
    rules[10] = '{rise(S_REQ), rise(S_Q),   0};
    rules[11] = '{rise(S_REQ), rise(S_ACK), 0};
    rules[12] = '{rise(S_ACK), fall(S_REQ), 1};
    rules[13] = '{rise(S_Q),   fall(S_REQ), 1};
  end

  logic rst;
  logic ack, go;
  logic req, rdy, q;

  scsi_ctrl #(.REQ_DELAY(REQ_DELAY), .RDY_DELAY(RDY_DELAY), .Q_DELAY(Q_DELAY)) dut (
    .rst(rst), .ack(ack), .go(go), .req(req), .rdy(rdy), .q(q)
  );

  int checks = 0;
  int failures = 0;
  int cnt [NEV];
  realtime en_time [NEV];
  logic    en_flag [NEV];
  logic [NSIG-1:0] prev;
  bit running = 0;
  event upd;
  realtime t_qfall;
  int qr_samples = 0;
  realtime qr_min = 1.0e9;
  bit seen [32];

  // the states reachable under the timing bounds, as (ack,go,req,rdy,q)
  localparam logic [4:0] TIMED_STATES [16] = '{
    5'b10001, 5'b10011, 5'b10010, 5'b00010, 5'b11010, 5'b01010, 5'b11000, 5'b01000,
    5'b01100, 5'b10000, 5'b11100, 5'b00000, 5'b00100, 5'b10100, 5'b00101, 5'b10101
  };

  function automatic bit timed_state(logic [4:0] v);
    foreach (TIMED_STATES[i]) if (TIMED_STATES[i] == v) return 1;
    return 0;
  endfunction

  // prev is ordered {q, rdy, req, go, ack}; the table above is (ack,...,q)
  task automatic visit();
    logic [4:0] v;
    v = {prev[S_ACK], prev[S_GO], prev[S_REQ], prev[S_RDY], prev[S_Q]};
    checks++;
    if (!timed_state(v)) begin
      failures++;
      $display("%t FAIL: state %b (ack,go,req,rdy,q) is not reachable under the bounds",
               $realtime, v);
    end
    seen[v] = 1;
  endtask

  function automatic logic [NSIG-1:0] sigs();
    return {q, rdy, req, go, ack};
  endfunction

  function automatic bit is_output(int s);
    return s >= S_REQ;
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

  // monitor: account for every change of the five signals
  always @(ack, go, req, rdy, q) begin
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
                  $display("%t FAIL: output event %0d late (enabled %0b, after %0t)",
                           $realtime, ev, en_flag[ev], $realtime - en_time[ev]);
                end
              end
              if (ev == fall(S_Q)) t_qfall = $realtime;
              if (ev == fall(S_RDY)) begin
                checks++;
                qr_samples++;
                if ($realtime - t_qfall < qr_min) qr_min = $realtime - t_qfall;
                if ($realtime - t_qfall < 15.0 - 0.0005 || $realtime - t_qfall > 55.0 + 0.0005) begin
                  failures++;
                  $display("%t FAIL: rdy fell %0t after q", $realtime, $realtime - t_qfall);
                end
              end
              cnt[ev]++;
              prev[s] = now[s];
              diff[s] = 0;
              progress = 1;
              refresh_enables();
              visit();
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
      for (int e = 2 * S_REQ; e < NEV; e++)
        if (en_flag[e] && $realtime - en_time[e] > OUT_MAX + 0.5) begin
          failures++;
          $display("%t FAIL: output event %0d enabled but not firing", $realtime, e);
          en_flag[e] = 0;
        end
      checks++;
      // a guard pair caught true in the same step as an input change is
      // re-sampled 1 ps later; only a lasting collision is a failure
      if ((dut.u_req.set_g && dut.u_req.clr_g) || (dut.u_rdy.set_g && dut.u_rdy.clr_g) ||
          (dut.u_q.set_g && dut.u_q.clr_g)) #0.001;
      if ((dut.u_req.set_g && dut.u_req.clr_g) || (dut.u_rdy.set_g && dut.u_rdy.clr_g) ||
          (dut.u_q.set_g && dut.u_q.clr_g)) begin
        failures++;
        $display("%t FAIL: interference in a gate", $realtime);
      end
    end
  end

  // an environment delay in [20,50]: a quarter of the time the lower end, a
  // quarter the upper end (the corners the timing analysis turns on), else
  // uniform
  function automatic realtime env_delay();
    case ($urandom_range(3, 0))
      0:       return real'(SCSI_ENV.min_ps) / 1000.0;
      1:       return real'(SCSI_ENV.max_ps) / 1000.0;
      default: return real'($urandom_range(SCSI_ENV.max_ps, SCSI_ENV.min_ps)) / 1000.0;
    endcase
  endfunction

  // environment: ack follows req, go follows rdy, each after [20,50]
  task automatic env(int s, ref logic sig);
    forever begin
      int ev;
      ev = next_ev(s, prev);
      if (cnt[ev] >= NCYC) break;
      while (!enabled(ev)) @(upd);
      #(env_delay());
      sig = ~sig;
      @(upd);
    end
  endtask

  initial begin
    foreach (cnt[i]) begin cnt[i] = 0; en_flag[i] = 0; en_time[i] = 0; end
    rst = 1; ack = 1; go = 0;
    #10;
    checks++;
    if ({q, rdy, req} != 3'b101) begin
      failures++;
      $display("FAIL: reset state req=%b rdy=%b q=%b", req, rdy, q);
    end
    // req is enabled to fall as soon as reset is released
    prev = sigs();
    visit();
    running = 1;
    refresh_enables();
    rst = 0;
    fork
      env(S_ACK, ack);
      env(S_GO, go);
    join_none
    wait (cnt[rise(S_ACK)] >= NCYC);
    #60;
    // one full cycle is one occurrence of each of the ten transitions; with
    // the environment stopped, the next cycle gets as far as req falling,
    // rdy rising and q falling
    for (int e = 0; e < NEV; e++) begin
      int expct;
      expct = (e == fall(S_REQ) || e == rise(S_RDY) || e == fall(S_Q)) ? NCYC + 1 : NCYC;
      checks++;
      if (cnt[e] != expct) begin
        failures++;
        $display("FAIL: event %0d occurred %0d times, expected %0d", e, cnt[e], expct);
      end
    end
    checks++;
    if (qr_samples != NCYC) failures++;
    // the bound of 15 is tight: with these gate delays it must be reached
    checks++;
    if (qr_min > 15.5) begin
      failures++;
      $display("FAIL: smallest q-to-rdy separation %0.3f, expected about 15", qr_min);
    end
    $display("smallest q-to-rdy separation %0.3f", qr_min);
    begin
      int nseen;
      nseen = 0;
      foreach (seen[i]) nseen += seen[i];
      checks++;
      if (nseen != 16) begin
        failures++;
        $display("FAIL: %0d distinct states reached, expected the 16 of the timed state graph", nseen);
      end
      $display("states=%0d", nseen);
      foreach (TIMED_STATES[i])
        if (!seen[TIMED_STATES[i]]) $display("state %b never reached", TIMED_STATES[i]);
    end
    $display("cycles=%0d", cnt[fall(S_REQ)]);
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
