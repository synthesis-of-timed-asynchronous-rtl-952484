`timescale 1ns/1ps
// dram_addr_path: address side of the DRAM controller.
//
// Three parts: a refresh address counter with its incrementer, a multiplexer
// that puts the row address on the DRAM pins and switches to the column
// address when the controller raises selca, and a multiplexer that gives the
// refresh address the pins while a refresh is in progress (rfip high).
// The counter holds the row refreshed next and steps by one at the end of
// every refresh cycle (rfip falling), wrapping around after 2**ADDR_W rows.
//
// The parts and their connections follow the controller's block diagram;
// the width ADDR_W, the moment the counter steps and its reset to row 0 are
// choices of this design. Interface: row_addr / col_addr from the processor
// address, selca and rfip from dram_ctrl, dram_addr to the DRAM array,
// refresh_addr for observation. Timing: the multiplexers are combinational;
// the counter is a register clocked by the falling edge of rfip and reset
// asynchronously by rst.
module dram_addr_path #(
  parameter int unsigned ADDR_W = 10
) (
  input  logic              rst,
  input  logic [ADDR_W-1:0] row_addr,
  input  logic [ADDR_W-1:0] col_addr,
  input  logic              selca,
  input  logic              rfip,
  output logic [ADDR_W-1:0] dram_addr,
  output logic [ADDR_W-1:0] refresh_addr
);

  logic [ADDR_W-1:0] refresh_next;

  assign refresh_next = refresh_addr + 1'b1;  // INC

  always_ff @(negedge rfip or posedge rst) begin
    if (rst)
      refresh_addr <= '0;
    else
      refresh_addr <= refresh_next;
  end

  always_comb begin
    if (rfip)
      dram_addr = refresh_addr;
    else if (selca)
      dram_addr = col_addr;
    else
      dram_addr = row_addr;
  end

endmodule
