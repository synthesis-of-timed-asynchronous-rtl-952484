`timescale 1ns/1ps
// tb_dram_addr_path: self-checking testbench of the DRAM address path.
//
// Runs more refresh pulses (rfip high then low) than there are rows, so the
// refresh counter wraps, interleaved with processor accesses that switch
// selca. After every step the DRAM address is compared with a reference:
// the refresh row while rfip is high, else the column address while selca is
// high, else the row address; the refresh row must advance by one (mod
// 2**ADDR_W) at the end of every refresh and stay put otherwise.
module tb_dram_addr_path;

  localparam int unsigned ADDR_W = 10;
  localparam int NREF = (1 << ADDR_W) + 50;

  logic              rst;
  logic [ADDR_W-1:0] row_addr, col_addr;
  logic              selca, rfip;
  logic [ADDR_W-1:0] dram_addr, refresh_addr;

  dram_addr_path #(.ADDR_W(ADDR_W)) dut (
    .rst(rst), .row_addr(row_addr), .col_addr(col_addr), .selca(selca),
    .rfip(rfip), .dram_addr(dram_addr), .refresh_addr(refresh_addr)
  );

  int checks = 0;
  int failures = 0;
  int wraps = 0;
  logic [ADDR_W-1:0] ref_row;

  task automatic check(string what);
    logic [ADDR_W-1:0] exp;
    #1;
    exp = rfip ? ref_row : (selca ? col_addr : row_addr);
    checks++;
    if (dram_addr !== exp || refresh_addr !== ref_row) begin
      failures++;
      $display("%t FAIL: %s: dram_addr=%0d refresh_addr=%0d, expected %0d / %0d",
               $realtime, what, dram_addr, refresh_addr, exp, ref_row);
    end
  endtask

  initial begin
    rst = 0; rfip = 0; selca = 0; row_addr = '0; col_addr = '0;
    ref_row = '0;
    #1 rst = 1;   // a rising edge, whatever rst started at
    #5;
    rst = 0;
    check("after reset");
    for (int n = 0; n < NREF; n++) begin
      // a processor access: row, then column
      row_addr = ADDR_W'($urandom);
      col_addr = ADDR_W'($urandom);
      check("row");
      selca = 1;
      check("column");
      selca = 0;
      check("access end");
      // a refresh
      rfip = 1;
      check("refresh");
      rfip = 0;
      if (ref_row == '1) wraps++;
      ref_row = ref_row + 1'b1;
      check("refresh end");
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NREF * 10.0 + 100.0);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
