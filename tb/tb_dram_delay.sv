`timescale 1ns/1ps
// tb_dram_delay: self-checking testbench of the delay-line model.
//
// Toggles ras and rfreq at random intervals longer than the longest tap and
// measures when each tap follows: a and b must follow ras after A_DELAY and
// B_DELAY, c must follow rfreq after C_DELAY, and each delay must lie inside
// the bound the controller was designed for ([10,20], [25,35], [20,30] ns).
module tb_dram_delay;
  import timed_async_pkg::*;

  localparam int NTOG = 200;

  logic ras, rfreq;
  logic a, b, c;

  dram_delay dut (.ras(ras), .rfreq(rfreq), .a(a), .b(b), .c(c));

  int checks = 0;
  int failures = 0;
  realtime t_ras, t_rfreq;
  bit started = 0;

  function automatic bit near(realtime x, realtime y);
    return (x - y < 0.002) && (y - x < 0.002);
  endfunction

  task automatic check_tap(string name, realtime dt, realtime nominal, bound_t bd);
    checks++;
    if (!near(dt, nominal) || dt < bd.min_ps / 1000.0 || dt > bd.max_ps / 1000.0) begin
      failures++;
      $display("%t FAIL: tap %s followed after %0t", $realtime, name, dt);
    end
  endtask

  always @(a) if (started) check_tap("a", $realtime - t_ras, A_NOM, DRAM_A);
  always @(b) if (started) check_tap("b", $realtime - t_ras, B_NOM, DRAM_B);
  always @(c) if (started) check_tap("c", $realtime - t_rfreq, C_NOM, DRAM_C);

  initial begin
    ras = 1; rfreq = 1;
    #100;
    checks++;
    if (!(a && b && c)) failures++;
    started = 1;
    for (int n = 0; n < NTOG; n++) begin
      if ($urandom_range(1, 0) == 1) begin
        ras = ~ras; t_ras = $realtime;
      end else begin
        rfreq = ~rfreq; t_rfreq = $realtime;
      end
      #(40.0 + real'($urandom_range(20000, 0)) / 1000.0);
      checks++;
      if (a !== ras || b !== ras || c !== rfreq) begin
        failures++;
        $display("%t FAIL: taps did not settle", $realtime);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NTOG * 70.0 + 500.0);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
