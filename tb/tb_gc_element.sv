`timescale 1ns/1ps
// tb_gc_element: self-checking testbench of the generalized C-element.
//
// Drives random sequences of the two guards (never both true, as in the
// controllers) and asynchronous resets, and compares the output after every
// step with a reference kept by the testbench: set on the pull-up guard,
// cleared on the pull-down guard, held otherwise, INIT under reset. Three
// instances are checked: INIT 0 and 1 with no delay, and INIT 0 with a
// 0.4 ns output delay, which must still show the old value 0.2 ns after a
// step and the new one 1 ns after it.
module tb_gc_element;

  localparam int NSTEP = 2000;

  logic rst;
  logic set_g, clr_g;
  logic q0, q1, q2;
  logic ref0, ref1, old0;

  gc_element #(.INIT(1'b0)) dut0 (.rst(rst), .set_g(set_g), .clr_g(clr_g), .q(q0));
  gc_element #(.INIT(1'b1)) dut1 (.rst(rst), .set_g(set_g), .clr_g(clr_g), .q(q1));
  gc_element #(.INIT(1'b0), .DELAY(0.4)) dut2 (.rst(rst), .set_g(set_g), .clr_g(clr_g), .q(q2));

  int checks = 0;
  int failures = 0;
  int holds = 0;

  initial begin
    rst = 1; set_g = 0; clr_g = 0;
    ref0 = 0; ref1 = 1;
    old0 = 0;
    for (int n = 0; n < NSTEP; n++) begin
      #0.2;
      checks++;
      if (n > 0 && q2 !== old0) begin
        failures++;
        $display("%t FAIL: step %0d delayed output changed early", $realtime, n);
      end
      #0.8;
      checks++;
      if (q0 !== ref0 || q1 !== ref1 || q2 !== ref0) begin
        failures++;
        $display("%t FAIL: step %0d rst=%b set=%b clr=%b q=%b%b%b ref=%b%b",
                 $realtime, n, rst, set_g, clr_g, q0, q1, q2, ref0, ref1);
      end
      old0 = ref0;
      // next stimulus
      rst = ($urandom_range(19, 0) == 0);
      case ($urandom_range(2, 0))
        0: begin set_g = 1; clr_g = 0; end
        1: begin set_g = 0; clr_g = 1; end
        default: begin set_g = 0; clr_g = 0; end
      endcase
      if (rst) begin
        ref0 = 0; ref1 = 1;
      end else if (set_g) begin
        ref0 = 1; ref1 = 1;
      end else if (clr_g) begin
        ref0 = 0; ref1 = 0;
      end else begin
        holds++;
      end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NSTEP * 1.0 + 100.0);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
